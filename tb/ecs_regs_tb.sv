// ecs_regs_tb: self-checking test of ecs_regs.
//
// Drives the register bus directly. Checks the read value of every register
// against the inputs the test applies, that DELATCH_PD is written and read
// back and resets to zero, that a write to FAULT_STATUS produces a one-cycle
// clear pulse carrying the written mask, that writes elsewhere change
// nothing, that unmapped addresses read zero, and that the crate Id appears
// after its two-flop synchronizer.
module ecs_regs_tb;
  import ccu3_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              wr = 1'b0;
  logic [REG_AW-1:0] addr = '0;
  logic [REG_DW-1:0] wdata = '0, rdata;
  logic [N_FEB-1:0]  st = '0, ln = '1, clr, pd;
  logic [7:0]        cid = 8'h00;

  int checks = 0, failures = 0;

  ecs_regs dut (
    .clk(clk), .rst_n(rst_n), .wr_i(wr), .addr_i(addr), .wdata_i(wdata), .rdata_o(rdata),
    .fault_status_i(st), .fault_line_i(ln), .fault_clear_o(clr), .delatch_pd_o(pd),
    .crate_id_i(cid)
  );

  always #12.5 clk = ~clk;

  initial begin
    #1ms;
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

  task automatic check_rd(logic [REG_AW-1:0] a, logic [REG_DW-1:0] exp, string what);
    addr = a;
    #1;
    check(rdata, exp, what);
  endtask

  task automatic write(logic [REG_AW-1:0] a, logic [REG_DW-1:0] d);
    @(negedge clk);
    addr = a; wdata = d; wr = 1'b1;
    @(negedge clk);
    wr = 1'b0;
  endtask

  initial begin
    logic [REG_DW-1:0] v, pd_exp;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    addr = REG_DELATCH_PD; #1;
    check(rdata, '0, "DELATCH_PD after reset");
    check(pd, '0, "pull-down outputs after reset");

    // crate Id through the synchronizer: not before two edges, then present
    @(negedge clk);
    cid  = 8'hC5;
    addr = REG_CRATE_ID;
    @(posedge clk); #1;
    check(rdata, '0, "crate Id before synchronizer delay");
    @(posedge clk); #1;
    check(rdata, 16'h00C5, "crate Id after two edges");

    pd_exp = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      st  = N_FEB'($urandom);
      ln  = N_FEB'($urandom);
      cid = 8'($urandom);
      v = REG_DW'($urandom);
      case ($urandom_range(0, 3))
        0: begin
          write(REG_DELATCH_PD, v);
          pd_exp = v;
          check(pd, pd_exp, "pull-down output after write");
        end
        1: begin
          // clear pulse: visible on the cycle after the write, for one cycle
          @(negedge clk);
          addr = REG_FAULT_STATUS; wdata = v; wr = 1'b1;
          @(posedge clk); #1;
          wr = 1'b0;
          check(clr, v, "clear pulse mask");
          @(posedge clk); #1;
          check(clr, '0, "clear pulse lasts one cycle");
        end
        2: write(7'($urandom_range(5, 127)), v);   // unmapped: ignored
        default: write(REG_CRATE_ID, v);           // read-only: ignored
      endcase
      check(pd, pd_exp, "pull-down holds");
      repeat (2) @(posedge clk);
      check_rd(REG_FAULT_STATUS, st, "FAULT_STATUS");
      check_rd(REG_FAULT_LINE, ln, "FAULT_LINE");
      check_rd(REG_DELATCH_PD, pd_exp, "DELATCH_PD");
      check_rd(REG_CRATE_ID, {8'h00, cid}, "CRATE_ID");
      check_rd(7'h00, '0, "address 0");
      check_rd(7'($urandom_range(5, 127)), '0, "unmapped address");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
