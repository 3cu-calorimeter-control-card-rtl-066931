// spi_reg_slave: SPI slave through which the GBT-SCA's SPI master reads and
// writes the FPGA's ECS registers.
//
// ECS reaches the card over the slow-control field of the GBT link and the
// GBT-SCA, which offers I2C, SPI, JTAG and GPIO masters. Which of them talks
// to the FPGA, and with which framing, is this design's choice: SPI mode 0
// (SCK idle low, both sides sample on the rising edge and change on the
// falling edge), chip select active low, MSB first, one 24-bit transfer per
// access:
//   bit 23      1 = read, 0 = write
//   bits 22..16 register address
//   bits 15..0  write data (MOSI) or read data (MISO)
// For a read the slave drives the register's value on MISO from the 8th
// falling SCK edge on, so the master samples it on rising edges 9 to 24.
// A write is performed once the 24th bit has been received; a transfer cut
// short by chip select going high writes nothing. MISO is low outside the
// data phase.
//
// All three SPI inputs are synchronized into clk (the 40 MHz FPGA clock) and
// the SCK edges are found there, so SCK must stay below clk/8 (5 MHz); the SCA
// sets its SPI clock by a divider.
//
// Register bus side: addr_o is held from the end of the command byte to the
// next transfer; wr_o is a one-cycle pulse with wdata_o; rdata_i is read on
// the cycle of the 8th falling SCK edge.
module spi_reg_slave
  import ccu3_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sck_i,
  input  logic              cs_n_i,
  input  logic              mosi_i,
  output logic              miso_o,
  output logic              wr_o,
  output logic [REG_AW-1:0] addr_o,
  output logic [REG_DW-1:0] wdata_o,
  input  logic [REG_DW-1:0] rdata_i
);

  localparam int unsigned XFER_BITS = 1 + REG_AW + REG_DW;  // 24
  localparam int unsigned CMD_BITS  = 1 + REG_AW;           // 8

  logic       sck_s, cs_n_s, mosi_s, sck_q;
  logic       sck_rise, sck_fall, active;

  sync_2ff #(.WIDTH(3), .RESET_VAL(3'b010)) u_sync (
    .clk   (clk),
    .rst_n (rst_n),
    .d_i   ({sck_i, cs_n_i, mosi_i}),
    .q_o   ({sck_s, cs_n_s, mosi_s})
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sck_q <= 1'b0;
    else        sck_q <= sck_s;
  end

  assign active   = ~cs_n_s;
  assign sck_rise = active &  sck_s & ~sck_q;
  assign sck_fall = active & ~sck_s &  sck_q;

  logic [4:0]           nbits;    // bits received in this transfer
  logic [XFER_BITS-1:0] shin;
  logic                 rd_q;
  logic [REG_DW-1:0]    shout;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbits   <= '0;
      shin    <= '0;
      rd_q    <= 1'b0;
      addr_o  <= '0;
      wdata_o <= '0;
      wr_o    <= 1'b0;
      shout   <= '0;
      miso_o  <= 1'b0;
    end else begin
      wr_o <= 1'b0;
      if (!active) begin
        nbits  <= '0;
        miso_o <= 1'b0;
      end else begin
        if (sck_rise && nbits < 5'(XFER_BITS)) begin
          shin  <= {shin[XFER_BITS-2:0], mosi_s};
          nbits <= nbits + 5'd1;
          if (nbits == 5'(CMD_BITS - 1)) begin
            rd_q   <= shin[CMD_BITS-2];
            addr_o <= {shin[REG_AW-2:0], mosi_s};
          end
          if (nbits == 5'(XFER_BITS - 1) && !rd_q) begin
            wdata_o <= {shin[REG_DW-2:0], mosi_s};
            wr_o    <= 1'b1;
          end
        end
        if (sck_fall) begin
          if (nbits == 5'(CMD_BITS) && rd_q) begin
            shout  <= {rdata_i[REG_DW-2:0], 1'b0};
            miso_o <= rdata_i[REG_DW-1];
          end else if (nbits > 5'(CMD_BITS) && nbits < 5'(XFER_BITS)) begin
            shout  <= {shout[REG_DW-2:0], 1'b0};
            miso_o <= shout[REG_DW-1];
          end else begin
            miso_o <= 1'b0;
          end
        end
      end
    end
  end

  // A write strobe lasts one cycle.
  assert property (@(posedge clk) disable iff (!rst_n) wr_o |=> !wr_o);

endmodule
