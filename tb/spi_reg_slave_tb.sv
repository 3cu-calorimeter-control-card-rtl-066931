// spi_reg_slave_tb: self-checking test of spi_reg_slave.
//
// A model of the GBT-SCA SPI master (mode 0, MSB first, 24-bit transfers,
// SCK at 5 MHz against a 40 MHz system clock) talks to the slave, behind
// which sits a 128-word register array kept by the test. Checks: every write
// transfer produces exactly one write strobe with the right address and data;
// every read returns the array's word on MISO; MISO stays low during the
// command byte; a transfer cut short by chip select writes nothing and the
// next transfer still works.
module spi_reg_slave_tb;
  import ccu3_pkg::*;

  localparam realtime T_SCK_HALF = 100ns;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              sck = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic              wr;
  logic [REG_AW-1:0] addr;
  logic [REG_DW-1:0] wdata, rdata;
  logic [REG_DW-1:0] regs [2**REG_AW];

  int checks = 0, failures = 0, nwrites = 0;

  spi_reg_slave dut (
    .clk(clk), .rst_n(rst_n), .sck_i(sck), .cs_n_i(cs_n), .mosi_i(mosi), .miso_o(miso),
    .wr_o(wr), .addr_o(addr), .wdata_o(wdata), .rdata_i(rdata)
  );

  always #12.5 clk = ~clk;

  assign rdata = regs[addr];
  always @(posedge clk) if (wr) begin
    regs[addr] <= wdata;
    nwrites++;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [REG_DW-1:0] got, logic [REG_DW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // One transfer of nbits (24 for a full one); returns what MISO carried.
  task automatic xfer(logic [23:0] out, int nbits, output logic [23:0] in);
    in = '0;
    cs_n = 1'b0;
    #(T_SCK_HALF);
    for (int b = 23; b > 23 - nbits; b--) begin
      mosi = out[b];
      #(T_SCK_HALF);
      sck = 1'b1;
      in[b] = miso;
      #(T_SCK_HALF);
      sck = 1'b0;
    end
    #(T_SCK_HALF);
    cs_n = 1'b1;
    mosi = 1'b0;
    #(2 * T_SCK_HALF);
  endtask

  task automatic spi_write(logic [REG_AW-1:0] a, logic [REG_DW-1:0] d);
    logic [23:0] in;
    int n0 = nwrites;
    xfer({1'b0, a, d}, 24, in);
    check(REG_DW'(nwrites - n0), 1, "one write strobe per write");
    check(regs[a], d, "written word");
  endtask

  task automatic spi_read(logic [REG_AW-1:0] a);
    logic [23:0] in;
    logic [REG_DW-1:0] exp = regs[a];
    int n0 = nwrites;
    xfer({1'b1, a, 16'h0000}, 24, in);
    check(in[15:0], exp, "read data");
    check(REG_DW'(in[23:16]), '0, "MISO low in command byte");
    check(REG_DW'(nwrites - n0), 0, "no write strobe on read");
  endtask

  initial begin
    logic [23:0] in;
    for (int i = 0; i < 2**REG_AW; i++) regs[i] = REG_DW'($urandom);
    #100ns;
    rst_n = 1'b1;
    #200ns;

    // directed: a few writes and reads back
    spi_write(7'h03, 16'hBEEF);
    spi_read(7'h03);
    spi_write(7'h7F, 16'h8001);
    spi_read(7'h7F);
    spi_read(7'h00);

    // aborted write: 12 bits then chip select high
    begin
      int n0;
      logic [REG_DW-1:0] keep;
      n0   = nwrites;
      keep = regs[7'h11];
      xfer({1'b0, 7'h11, 16'h1234}, 12, in);
      check(REG_DW'(nwrites - n0), 0, "aborted transfer writes nothing");
      check(regs[7'h11], keep, "aborted transfer leaves register");
    end
    spi_read(7'h11);

    // random mix
    for (int n = 0; n < 150; n++) begin
      logic [REG_AW-1:0] a;
      a = REG_AW'($urandom);
      if ($urandom_range(0, 1) != 0) spi_write(a, REG_DW'($urandom));
      else                      spi_read(a);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
