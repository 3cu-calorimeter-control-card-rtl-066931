// ccu3_top_tb: end-to-end test of the 3CU card logic at its default size
// (16 FEB slots).
//
// Around the card it places: a GBTX model fed with GBT frames built here, a
// GBT-SCA SPI master model, sixteen delatcher lines (open-drain, low when the
// FEB's delatcher is in fault or when the card pulls the line) and a
// receiver on every FEB TFC line.
//
// Traffic: random GBT frames, data and idle, whose TFC fields are chosen so
// that every calorimeter command occurs, alone and mixed. Every word received
// on the FEB lines is compared with the command worked out here from the
// frame's fields, in order and at a fixed latency from the frame, and all 16
// lines must agree. Meanwhile ECS accesses over SPI read the crate Id,
// record and clear delatcher faults, hold boards off through the pull-down
// register and check that this is not reported as a fault. At the end the
// debugging clock is selected and the FEB clocks must follow it.
//
// Each mechanism is counted; one that never happened counts as a failure.
module ccu3_top_tb;
  import ccu3_pkg::*;

  localparam realtime T_BX   = 24ns;   // 25 ns in the machine; 24 ns keeps T_BX/16 exact
  localparam realtime T_SER  = T_BX / 8;
  localparam realtime LAT    = T_BX / 2 + 3 * T_SER + T_SER / 2;  // frame out -> start bit sample
  localparam realtime T_SCK_HALF = 100ns;
  localparam int      NFRAMES = 3000;

  // ---------------- environment ----------------
  logic [GBT_FRAME_W-1:0] frame = {GBT_HDR_IDLE, 116'h0};
  logic [3:0]  gclk;
  logic        gdv;
  logic [GBT_D_W-1:0] gdata;
  logic [1:0]  gec;
  int          n_data, n_idle;

  logic        eclk = 1'b0, esel = 1'b0, rst_n = 1'b0;
  logic        sck = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic [N_FEB-1:0] fault = '0, pd, feb_clk, feb_tfc;
  wire  [N_FEB-1:0] line_n = ~(fault | pd);
  logic [7:0]  crate_id = 8'h5C;

  gbtx_model #(.T_BX(T_BX)) u_gbtx (
    .frame_i(frame), .clk_o(gclk), .dv_o(gdv), .data_o(gdata), .ec_o(gec),
    .n_data(n_data), .n_idle(n_idle)
  );

  ccu3_top dut (
    .gbt_clk_i(gclk), .ext_clk_i(eclk), .ext_sel_i(esel), .rst_n_i(rst_n),
    .gbt_dv_i(gdv), .gbt_data_i(gdata),
    .sca_sck_i(sck), .sca_cs_n_i(cs_n), .sca_mosi_i(mosi), .sca_miso_o(miso),
    .delatch_n_i(line_n), .delatch_pd_o(pd), .crate_id_i(crate_id),
    .feb_clk_o(feb_clk), .feb_tfc_o(feb_tfc)
  );

  int checks = 0, failures = 0;
  // mechanism counters
  int n_bxrst, n_ferst, n_hdr, n_veto, n_calib, n_snap, n_synch, n_idle_word;
  int n_fault_rec, n_clear, n_pulldown, n_pd_masked, n_crate, n_extclk, n_words;

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- GBT frames ----------------
  logic [5:0] exp_cmd [$];
  realtime    exp_t   [$];
  bit         traffic_done = 0;

  // Put TFC bit value v (width w) at odd position pos and its copy below it.
  function automatic void put(ref logic [GBT_D_W-1:0] d, input int pos, input int w, input int v);
    for (int k = 0; k < w; k++) begin
      d[pos + 2*k]     = v[k];
      d[pos + 2*k - 1] = v[k];
    end
  endfunction

  initial begin : frames
    int bxid = 0;
    @(posedge rst_n);
    repeat (4) @(posedge gclk[2]);   // let the card's reset synchronizers release
    for (int n = 0; n < NFRAMES; n++) begin
      logic [GBT_D_W-1:0] d;
      int bxrst, ferst, hdr, veto, cal, snap, synch, nzs;
      bit data;
      logic [5:0] c;
      @(posedge gclk[2]);
      #1ns;
      data  = ($urandom_range(0, 9) != 0);
      bxrst = int'($urandom_range(0, 19) == 0);
      ferst = int'($urandom_range(0, 19) == 0);
      hdr   = int'($urandom_range(0, 9) == 0);
      veto  = int'($urandom_range(0, 9) == 0);
      cal   = ($urandom_range(0, 9) == 0) ? $urandom_range(1, 15) : 0;
      snap  = int'($urandom_range(0, 19) == 0);
      synch = int'($urandom_range(0, 19) == 0);
      nzs   = $urandom_range(0, 1);
      d = GBT_D_W'({$urandom, $urandom, $urandom});
      put(d, 1, 1, bxrst);  put(d, 3, 1, ferst); put(d, 5, 1, hdr);
      put(d, 7, 1, nzs);    put(d, 9, 1, veto);  put(d, 11, 4, cal);
      put(d, 19, 1, snap);  put(d, 21, 1, synch); put(d, 23, 1, 0);
      put(d, 25, 12, bxid);
      bxid = (bxid == 3563) ? 0 : bxid + 1;
      frame = {data ? GBT_HDR_DATA : GBT_HDR_IDLE, 2'b00, 2'($urandom), d, 32'($urandom)};
      c = data ? {bxrst[0], ferst[0], hdr[0] | veto[0], cal != 0, snap[0], synch[0]} : 6'b0;
      exp_cmd.push_back(c);
      exp_t.push_back($realtime - 1ns + T_BX / 2);   // when the GBTX model hands it over
      if (data) begin
        n_bxrst += bxrst; n_ferst += ferst; n_hdr += hdr; n_veto += veto;
        n_calib += (cal != 0); n_snap += snap; n_synch += synch;
      end else n_idle_word++;
    end
    @(posedge gclk[2]);
    #1ns frame = {GBT_HDR_IDLE, 116'h0};
    repeat (4) @(posedge gclk[2]);
    traffic_done = 1;
  end

  // ---------------- FEB TFC receivers ----------------
  bit         locked = 0;
  int         nbit = 0;
  logic [7:0] word;
  realtime    t_start;

  always @(negedge gclk[3]) begin
    if (rst_n && !esel) begin
      if (feb_tfc !== {N_FEB{feb_tfc[0]}}) begin
        checks++; failures++;
        $display("FAIL FEB TFC lines differ: %b", feb_tfc);
      end
      if (!locked && feb_tfc[0]) begin locked = 1; nbit = 0; end
      if (locked) begin
        if (nbit == 0) t_start = $realtime;
        word = {word[6:0], feb_tfc[0]};
        nbit++;
        if (nbit == 8) begin
          nbit = 0;
          // drop frames handed over before the serial stream was picked up
          while (exp_t.size() > 0 && exp_t[0] < t_start - LAT - 1ns) begin
            void'(exp_cmd.pop_front());
            void'(exp_t.pop_front());
          end
          if (exp_t.size() > 0 && exp_t[0] <= t_start - LAT + 1ns) begin
            logic [5:0] c;
            realtime t0;
            c  = exp_cmd.pop_front();
            t0 = exp_t.pop_front();
            check(32'(word), 32'({1'b1, c, ^c}), "FEB command word");
            check(32'(int'((t_start - t0) / 1ps)), 32'(int'(LAT / 1ps)), "TFC latency (ps)");
            n_words++;
          end else begin
            check(32'(word), 32'h80, "idle command word before traffic");
          end
        end
      end
    end
  end

  // ---------------- GBT-SCA SPI master ----------------
  task automatic xfer(logic [23:0] out, output logic [23:0] in);
    in = '0;
    cs_n = 1'b0;
    #(T_SCK_HALF);
    for (int b = 23; b >= 0; b--) begin
      mosi = out[b];
      #(T_SCK_HALF);
      sck = 1'b1;
      in[b] = miso;
      #(T_SCK_HALF);
      sck = 1'b0;
    end
    #(T_SCK_HALF);
    cs_n = 1'b1;
    #(2 * T_SCK_HALF);
  endtask

  task automatic reg_write(logic [REG_AW-1:0] a, logic [REG_DW-1:0] d);
    logic [23:0] in;
    xfer({1'b0, a, d}, in);
  endtask

  task automatic reg_read(logic [REG_AW-1:0] a, output logic [REG_DW-1:0] d);
    logic [23:0] in;
    xfer({1'b1, a, 16'h0}, in);
    d = in[15:0];
  endtask

  // ---------------- ECS and delatcher scenario ----------------
  initial begin : ecs
    logic [REG_DW-1:0] v, exp_status;
    #100ns;
    rst_n = 1'b1;
    #500ns;

    reg_read(REG_CRATE_ID, v);
    check(32'(v), 32'h5C, "crate Id");
    n_crate++;
    reg_read(REG_FAULT_STATUS, v);
    check(32'(v), 0, "no fault after reset");

    exp_status = '0;
    for (int r = 0; r < 12; r++) begin
      int s;
      logic [N_FEB-1:0] m;
      // a latch-up on a random slot: the delatcher cuts the supply for a while
      s = $urandom_range(0, N_FEB-1);
      fault[s] = 1'b1;
      #1us;
      reg_read(REG_FAULT_LINE, v);
      m = '1;
      m[s] = 1'b0;
      check(32'(v), 32'(m), "line low during fault");
      fault[s] = 1'b0;
      exp_status[s] = 1'b1;
      reg_read(REG_FAULT_STATUS, v);
      check(32'(v), 32'(exp_status), "fault recorded");
      if (v[s]) n_fault_rec++;
      // clear some bits
      if (r % 3 == 2) begin
        m = N_FEB'($urandom) | (N_FEB'(1) << s);
        reg_write(REG_FAULT_STATUS, m);
        exp_status &= ~m;
        reg_read(REG_FAULT_STATUS, v);
        check(32'(v), 32'(exp_status), "status after clear");
        n_clear++;
      end
      // hold some boards off through the pull-down register
      if (r % 4 == 1) begin
        m = N_FEB'($urandom) | 16'h0001;
        reg_write(REG_DELATCH_PD, m);
        #200ns;
        check(32'(pd), 32'(m), "pull-down outputs");
        reg_read(REG_DELATCH_PD, v);
        check(32'(v), 32'(m), "pull-down register");
        reg_read(REG_FAULT_LINE, v);
        m = ~m;
        check(32'(v), 32'(m), "held-off lines read low");
        m = ~m;
        n_pulldown++;
        reg_write(REG_DELATCH_PD, 16'h0000);
        #200ns;
        check(32'(pd), 0, "pull-down released");
        reg_read(REG_FAULT_STATUS, v);
        check(32'(v), 32'(exp_status), "own pull-down not reported as fault");
        if (v == exp_status) n_pd_masked++;
      end
    end

    wait (traffic_done);

    // debugging clock: select the external clock, FEB clocks follow it
    begin
      int edges;
      esel = 1'b1;
      fork
        begin
          repeat (40) #(20ns) eclk = ~eclk;
        end
        begin
          edges = 0;
          #5ns;
          repeat (200) begin
            @(posedge feb_clk[0] or posedge feb_clk[N_FEB-1]);
            if (feb_clk[0] && feb_clk[N_FEB-1]) edges++;
            if (edges == 20) break;
          end
        end
      join_any
      #1us;
      check(32'(edges), 20, "FEB clocks follow the external clock");
      if (edges == 20) n_extclk++;
      disable fork;
    end

    // every mechanism must have happened
    begin
      int cnt [string];
      cnt["BX reset"] = n_bxrst;      cnt["FE reset"] = n_ferst;
      cnt["Header only"] = n_hdr;     cnt["BX veto"] = n_veto;
      cnt["Calibration"] = n_calib;   cnt["Snapshot"] = n_snap;
      cnt["Synch"] = n_synch;         cnt["idle frame"] = n_idle_word;
      cnt["fault recorded"] = n_fault_rec; cnt["status cleared"] = n_clear;
      cnt["board held off"] = n_pulldown;  cnt["pull-down masked"] = n_pd_masked;
      cnt["crate Id read"] = n_crate; cnt["external clock"] = n_extclk;
      cnt["FEB words checked"] = n_words;
      foreach (cnt[k]) begin
        $display("  %-20s %0d", k, cnt[k]);
        checks++;
        if (cnt[k] == 0) begin
          failures++;
          $display("FAIL mechanism never exercised: %s", k);
        end
      end
      check(32'(n_words), NFRAMES, "all frames delivered to the FEBs");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
