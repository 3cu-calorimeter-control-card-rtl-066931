// tfc_serializer_tb: self-checking test of tfc_serializer.
//
// A 40 MHz bunch clock and a phase-aligned 320 MHz serial clock drive the
// serializer; a new random command is presented on every bunch clock edge.
// A receiver model samples every serial line in the middle of each serial bit,
// finds the first start bit, then cuts the stream into 8-bit words. Each word
// must equal {1, command, even parity} of the command presented on the
// matching bunch clock edge (worked out here, not with the design's
// function), all 16 lines must carry the same bit, and the start bit must
// come out three serial clocks after that bunch clock edge.
module tfc_serializer_tb;
  import ccu3_pkg::*;

  localparam realtime T_BX  = 24ns;  // 25 ns in the machine; 24 ns keeps half serial periods exact
  localparam realtime T_SER = T_BX / 8;
  localparam int      NWORDS = 500;

  logic       clk_bx = 1'b1, clk_ser = 1'b1;  // rising edges coincide
  logic       rst_n = 1'b0;
  feb_cmd_t   cmd = '0;
  logic [N_FEB-1:0] ser;

  int checks = 0, failures = 0;

  tfc_serializer dut (
    .clk_bx(clk_bx), .rst_bx_n(rst_n), .clk_ser(clk_ser), .rst_ser_n(rst_n),
    .cmd_i(cmd), .ser_o(ser)
  );

  always #(T_BX / 2)  clk_bx  = ~clk_bx;
  always #(T_SER / 2) clk_ser = ~clk_ser;

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Commands in the order presented, with the time of their bunch clock edge.
  logic [5:0] exp_cmd [$];
  realtime    exp_t   [$];

  initial begin
    repeat (2) @(negedge clk_bx);
    rst_n = 1'b1;
    repeat (NWORDS + 2) begin
      logic [5:0] v;
      @(posedge clk_bx);
      v = 6'($urandom_range(0, 63));
      cmd <= feb_cmd_t'(v);
      exp_cmd.push_back(v);
      exp_t.push_back($realtime);
    end
  end

  // Receiver: sample in the middle of each serial bit.
  bit        locked = 0;
  int        nbit = 0;
  logic [7:0] word;
  realtime   t_start;
  int        words = 0;

  always @(negedge clk_ser) begin
    if (rst_n) begin
      checks++;
      if (ser !== {N_FEB{ser[0]}}) begin
        failures++;
        $display("FAIL lines differ: %b", ser);
      end
      if (!locked && ser[0]) begin
        locked = 1;
        nbit = 0;
      end
      if (locked) begin
        if (nbit == 0) t_start = $realtime;
        word = {word[6:0], ser[0]};
        nbit++;
        if (nbit == 8) begin
          logic [5:0] c;
          realtime    t0;
          nbit = 0;
          c  = exp_cmd.pop_front();
          t0 = exp_t.pop_front();
          checks++;
          if (word !== {1'b1, c, c[0]^c[1]^c[2]^c[3]^c[4]^c[5]}) begin
            failures++;
            $display("FAIL word %0d: got %b for command %b", words, word, c);
          end
          checks++;
          if (t_start - t0 != 3 * T_SER + T_SER / 2) begin
            failures++;
            $display("FAIL word %0d: start bit %0t after bunch edge", words, t_start - t0);
          end
          words++;
          if (words == NWORDS) begin
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      end
    end
  end

endmodule
