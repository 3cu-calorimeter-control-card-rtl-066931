// fault_monitor_tb: self-checking test of fault_monitor.
//
// Each delatcher line is modelled as an open-drain wire: low when the FEB's
// delatcher is in fault or when the monitor pulls it down (pd_o). The test
// injects faults at random points inside the clock period and checks that:
// the slot's status bit is set within three clock edges and no other bit
// moves; the live level shows on line_o; writing ones to clear_i clears just
// those bits; a fault arriving in the cycle of a clear survives; a pull-down
// requested by force_i reaches pd_o one cycle later, drives the line low and
// is not taken for a fault, nor is its release, even for a one-cycle request.
module fault_monitor_tb;

  localparam int N = 16;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] fault = '0;        // delatcher in fault
  logic [N-1:0] force_r = '0, clear = '0;
  logic [N-1:0] pd, line_s, status;
  wire  [N-1:0] line_n = ~(fault | pd);

  int checks = 0, failures = 0;

  fault_monitor dut (
    .clk(clk), .rst_n(rst_n), .line_n_i(line_n), .force_i(force_r), .clear_i(clear),
    .pd_o(pd), .line_o(line_s), .status_o(status)
  );

  always #12.5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] got, logic [N-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  // Fault on slot i, starting at a random point of the period, lasting len cycles.
  // Returns after checking the status bit appears within three edges.
  task automatic inject(int i, int len, logic [N-1:0] exp_before);
    int edges;
    @(negedge clk);
    #($urandom_range(0, 12));
    fault[i] = 1'b1;
    edges = 0;
    while (status[i] !== 1'b1 && edges < 6) begin
      @(posedge clk); #1;
      edges++;
    end
    checks++;
    if (edges > 3) begin
      failures++;
      $display("FAIL slot %0d: status after %0d edges", i, edges);
    end
    check(status, exp_before | (N'(1) << i), "status after fault");
    check(N'(line_s[i]), '0, "line level during fault");
    repeat (len) @(posedge clk);
    fault[i] = 1'b0;
    repeat (4) @(posedge clk);
    #1 check(N'(line_s[i]), N'(1), "line level after fault");
  endtask

  task automatic clear_bits(logic [N-1:0] m);
    @(negedge clk);
    clear = m;
    @(negedge clk);
    clear = '0;
  endtask

  initial begin
    logic [N-1:0] exp;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    #1;
    check(status, '0, "status after reset");
    check(line_s, '1, "lines after reset");
    check(pd, '0, "pull-down after reset");

    // every slot, one fault each
    exp = '0;
    for (int i = 0; i < N; i++) begin
      inject(i, $urandom_range(1, 20), exp);
      exp[i] = 1'b1;
    end
    check(status, '1, "all slots recorded");

    // write-one-to-clear of a subset
    clear_bits(16'hA5A5);
    #1 check(status, 16'h5A5A, "partial clear");
    clear_bits('1);
    #1 check(status, '0, "full clear");

    // fault arriving in the cycle of a clear of the same bit
    fault[3] = 1'b1;
    @(posedge clk);                // first synchronizer stage
    @(posedge clk);                // second stage: falling edge seen
    @(negedge clk);
    clear = 16'h0008;              // clear sampled on the edge that sets bit 3
    @(posedge clk); #1;
    clear = '0;
    check(status, 16'h0008, "set wins over clear");
    fault[3] = 1'b0;
    repeat (4) @(posedge clk);
    clear_bits('1);

    // pull-down by ECS: line goes low, no fault recorded, none on release
    @(negedge clk);
    force_r = 16'h0F01;
    @(posedge clk); #1;
    check(pd, 16'h0F01, "pull-down one cycle after request");
    repeat (5) @(posedge clk); #1;
    check(line_s & 16'h0F01, '0, "forced lines read low");
    check(status, '0, "no fault from own pull-down");
    @(negedge clk);
    force_r = '0;
    repeat (8) @(posedge clk); #1;
    check(pd, '0, "pull-down released");
    check(line_s, '1, "lines released");
    check(status, '0, "no fault from release");

    // single-cycle pull-down request
    @(negedge clk);
    force_r = 16'h8000;
    @(negedge clk);
    force_r = '0;
    repeat (8) @(posedge clk); #1;
    check(status, '0, "no fault from short pull-down");

    // random faults on random slots
    exp = '0;
    for (int n = 0; n < 200; n++) begin
      int i;
      i = $urandom_range(0, N-1);
      if (exp[i]) begin             // clear first so the new edge is visible
        clear_bits(N'(1) << i);
        exp[i] = 1'b0;
      end
      inject(i, $urandom_range(1, 5), exp);
      exp[i] = 1'b1;
      if ($urandom_range(0, 9) == 0) begin
        logic [N-1:0] m;
        m = N'($urandom);
        clear_bits(m);
        exp &= ~m;
        #1 check(status, exp, "random clear");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
