// tfc_decoder_tb: self-checking test of tfc_decoder.
//
// Builds GBT user-data words from random TFC field values, with every TFC
// bit written at both of its two positions (odd position 2*i+1 and even
// position 2*i) and random filler in D bits 79..48. The expected decoded
// fields and FEB command bits are worked out here from the field values, and
// compared one bunch clock after the word is presented (the decoder's
// latency). Frames without data-valid must yield an all-zero command. Each
// command bit is driven in isolation as well as in random mixes.
module tfc_decoder_tb;
  import ccu3_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              dv = 1'b0;
  logic [GBT_D_W-1:0] data = '0;
  tfc_t              tfc;
  feb_cmd_t          cmd;
  logic              cmd_valid;

  int checks = 0, failures = 0;

  tfc_decoder dut (
    .clk(clk), .rst_n(rst_n), .gbt_dv_i(dv), .gbt_data_i(data),
    .tfc_o(tfc), .cmd_o(cmd), .cmd_valid_o(cmd_valid)
  );

  always #12.5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Field values of one TFC word.
  typedef struct {
    int bxid, cal, bxrst, ferst, hdr, nzs, veto, snap, synch, rsv;
  } fields_t;

  // Place value v of width w at odd position pos (and its copy at pos-1).
  function automatic void put(ref logic [GBT_D_W-1:0] d, input int pos, input int w, input int v);
    for (int k = 0; k < w; k++) begin
      d[pos + 2*k]     = v[k];
      d[pos + 2*k - 1] = v[k];
    end
  endfunction

  function automatic logic [GBT_D_W-1:0] build(fields_t f);
    logic [GBT_D_W-1:0] d;
    d = GBT_D_W'({$urandom, $urandom, $urandom});   // filler above the TFC field
    put(d, 1, 1, f.bxrst);
    put(d, 3, 1, f.ferst);
    put(d, 5, 1, f.hdr);
    put(d, 7, 1, f.nzs);
    put(d, 9, 1, f.veto);
    put(d, 11, 4, f.cal);
    put(d, 19, 1, f.snap);
    put(d, 21, 1, f.synch);
    put(d, 23, 1, f.rsv);
    put(d, 25, 12, f.bxid);
    return d;
  endfunction

  task automatic expect_word(fields_t f, logic valid);
    logic [5:0] exp_cmd;
    if (valid)
      exp_cmd = {f.bxrst[0], f.ferst[0], f.hdr[0] | f.veto[0], f.cal != 0, f.snap[0], f.synch[0]};
    else
      exp_cmd = '0;
    checks++;
    if (cmd !== exp_cmd || cmd_valid !== valid) begin
      failures++;
      $display("FAIL cmd=%b exp=%b valid=%b", cmd, exp_cmd, cmd_valid);
    end
    if (valid) begin
      checks++;
      if (tfc.bxid !== 12'(f.bxid) || tfc.cal_type !== 4'(f.cal) || tfc.nzs !== f.nzs[0] ||
          tfc.bx_veto !== f.veto[0] || tfc.header_only !== f.hdr[0] ||
          tfc.reserve !== f.rsv[0]) begin
        failures++;
        $display("FAIL tfc fields bxid=%h exp=%h cal=%h exp=%h", tfc.bxid, f.bxid, tfc.cal_type, f.cal);
      end
    end
  endtask

  task automatic run(fields_t f, logic valid);
    @(negedge clk);
    dv   = valid;
    data = build(f);
    @(posedge clk);
    #1;
    expect_word(f, valid);
  endtask

  initial begin
    fields_t f;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // one command at a time
    for (int b = 0; b < 8; b++) begin
      f = '{default: 0};
      f.bxid = 100 + b;
      case (b)
        0: f.bxrst = 1;
        1: f.ferst = 1;
        2: f.hdr   = 1;
        3: f.veto  = 1;
        4: f.cal   = 8;
        5: f.snap  = 1;
        6: f.synch = 1;
        7: f.nzs   = 1;   // NZS alone is not forwarded
      endcase
      run(f, 1'b1);
    end
    // random mixes, some frames without data-valid
    for (int n = 0; n < 2000; n++) begin
      f.bxid  = $urandom_range(0, 3563);
      f.cal   = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 15) : 0;
      f.bxrst = $urandom_range(0, 1);
      f.ferst = $urandom_range(0, 1);
      f.hdr   = $urandom_range(0, 1);
      f.nzs   = $urandom_range(0, 1);
      f.veto  = $urandom_range(0, 1);
      f.snap  = $urandom_range(0, 1);
      f.synch = $urandom_range(0, 1);
      f.rsv   = $urandom_range(0, 1);
      run(f, $urandom_range(0, 7) != 0);
    end
    // latency: the output follows the input after exactly one edge
    f = '{default: 0};
    run(f, 1'b1);
    @(negedge clk);
    f.synch = 1;
    dv = 1'b1;
    data = build(f);
    checks++;
    if (cmd.synch !== 1'b0) begin failures++; $display("FAIL output before clock edge"); end
    @(posedge clk); #1;
    checks++;
    if (cmd.synch !== 1'b1) begin failures++; $display("FAIL latency not one cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
