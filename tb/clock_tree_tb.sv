// clock_tree_tb: self-checking test of the clock_tree behavioural model.
//
// Drives the four GBTX clock inputs, the external clock and the selector with
// random levels, then checks shortly before and shortly after the buffer
// delay that each output still shows the old value of its source and then
// the new one: slots 0-7 follow GBTX output 0, slots 8-15 output 1, the FPGA
// clock output 2, the serializer clock output 3, and with the selector set
// the three 40 MHz paths follow the external clock instead. Finally it runs
// real clocks through the tree and counts FEB clock edges.
module clock_tree_tb;

  localparam int      N   = 16;
  localparam realtime TBUF = 800ps;

  logic [3:0]   gclk = '0;
  logic         eclk = 1'b0, sel = 1'b0;
  logic [N-1:0] feb;
  logic         fpga, fser;

  int checks = 0, failures = 0;

  clock_tree dut (
    .gbt_clk_i(gclk), .ext_clk_i(eclk), .ext_sel_i(sel),
    .feb_clk_o(feb), .fpga_clk_o(fpga), .fpga_ser_clk_o(fser)
  );

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N+1:0] expected(logic [3:0] g, logic e, logic s);
    logic [N+1:0] v;
    for (int i = 0; i < N; i++) v[i] = s ? e : (i < N/2 ? g[0] : g[1]);
    v[N]   = s ? e : g[2];
    v[N+1] = g[3];
    return v;
  endfunction

  task automatic check(logic [N+1:0] exp, string what);
    checks++;
    if ({fser, fpga, feb} !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, {fser, fpga, feb}, exp);
    end
  endtask

  int feb_edges = 0;
  always @(posedge feb[N-1]) feb_edges++;

  initial begin
    logic [N+1:0] old_v, new_v;
    #5ns;
    old_v = expected(gclk, eclk, sel);
    check(old_v, "initial");
    for (int n = 0; n < 500; n++) begin
      gclk = 4'($urandom);
      eclk = 1'($urandom);
      sel  = ($urandom_range(0, 3) == 0);
      new_v = expected(gclk, eclk, sel);
      #(TBUF - 10ps);
      check(old_v, "before buffer delay");
      #20ps;
      check(new_v, "after buffer delay");
      #1ns;
      old_v = new_v;
    end
    // running clocks: 40 MHz on the GBTX half-crate output, 20 edges
    sel = 1'b0;
    feb_edges = 0;
    repeat (40) begin
      #12.5ns;
      gclk[1] = ~gclk[1];
    end
    #2ns;
    checks++;
    if (feb_edges != 20) begin
      failures++;
      $display("FAIL %0d FEB clock edges, expected 20", feb_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
