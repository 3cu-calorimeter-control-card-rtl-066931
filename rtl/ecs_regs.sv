// ecs_regs: the FPGA registers that the Experiment Control System reaches
// through the GBT-SCA.
//
// Register map (16-bit registers, 7-bit addresses; the map is this design's
// own, the contents follow the card's functions):
//   0x01 FAULT_STATUS  R    one sticky bit per FEB slot: a delatcher fault
//                      W1C  was seen; writing 1 to a bit clears it
//   0x02 FAULT_LINE    R    present (synchronized) level of each delatcher
//                           line, 1 = released, 0 = low
//   0x03 DELATCH_PD    R/W  1 = pull the slot's delatcher line low, which
//                           keeps that FEB switched off until cleared
//   0x04 CRATE_ID      R    the 8-bit crate Id read from the backplane
// Other addresses read as zero and ignore writes.
//
// Bus: a write happens on a clock edge where wr_i is high (addr_i, wdata_i);
// rdata_o is combinational from addr_i. clear_o is a one-cycle pulse on the
// cycle after the FAULT_STATUS write. The crate Id pins are static straps;
// they still go through a two-flop synchronizer. Reset clears DELATCH_PD, so
// after reset no board is held off.
module ecs_regs
  import ccu3_pkg::*;
#(
  parameter int unsigned N_FEB_P = N_FEB
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // register bus
  input  logic                  wr_i,
  input  logic [REG_AW-1:0]     addr_i,
  input  logic [REG_DW-1:0]     wdata_i,
  output logic [REG_DW-1:0]     rdata_o,
  // fault monitor
  input  logic [N_FEB_P-1:0]    fault_status_i,
  input  logic [N_FEB_P-1:0]    fault_line_i,
  output logic [N_FEB_P-1:0]    fault_clear_o,
  output logic [N_FEB_P-1:0]    delatch_pd_o,
  // backplane
  input  logic [CRATE_ID_W-1:0] crate_id_i
);

  initial assert (N_FEB_P <= REG_DW)
    else $error("ecs_regs: more FEB slots than register bits");

  logic [CRATE_ID_W-1:0] crate_id_s;

  sync_2ff #(.WIDTH(CRATE_ID_W)) u_sync_id (
    .clk   (clk),
    .rst_n (rst_n),
    .d_i   (crate_id_i),
    .q_o   (crate_id_s)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      delatch_pd_o  <= '0;
      fault_clear_o <= '0;
    end else begin
      fault_clear_o <= '0;
      if (wr_i) begin
        unique case (addr_i)
          REG_FAULT_STATUS: fault_clear_o <= wdata_i[N_FEB_P-1:0];
          REG_DELATCH_PD:   delatch_pd_o  <= wdata_i[N_FEB_P-1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rdata_o = '0;
    unique case (addr_i)
      REG_FAULT_STATUS: rdata_o[N_FEB_P-1:0]    = fault_status_i;
      REG_FAULT_LINE:   rdata_o[N_FEB_P-1:0]    = fault_line_i;
      REG_DELATCH_PD:   rdata_o[N_FEB_P-1:0]    = delatch_pd_o;
      REG_CRATE_ID:     rdata_o[CRATE_ID_W-1:0] = crate_id_s;
      default: ;
    endcase
  end

endmodule
