// tfc_serializer: sends the six-bit calorimeter command to every FEB slot over
// its own point-to-point serial line, one 8-bit word per bunch crossing.
//
// The crate backplane gives each FEB slot one differential pair for the TFC
// command. The line format is this design's choice: per 25 ns bunch crossing
// the word {start bit '1', BX reset, FE reset, Header-only|BX veto,
// Calibration, Snapshot, Synch, even parity of the six command bits} is sent
// MSB first at eight times the bunch clock (320 MHz). The FEB, which receives
// the same bunch clock from the 3CU, finds the word by its start bit; an idle
// line is low.
//
// Clocks: clk_bx is the 40 MHz bunch clock in which cmd_i changes; clk_ser is
// an 8x clock derived from the same source and phase-related to it (a
// programmable GBTX clock output). A toggle flop in the clk_bx domain marks
// each bunch crossing; clk_ser samples it and loads the shift register one
// clk_ser cycle after it sees the toggle change, while cmd_i is stable for the
// whole bunch crossing. All N_FEB outputs carry the same word; each has its own
// output register, as each drives its own pad.
//
// Latency: the first bit (start bit) appears on ser_o three clk_ser cycles
// after the clk_bx edge that presented cmd_i; the word then occupies eight
// consecutive clk_ser cycles.
module tfc_serializer
  import ccu3_pkg::*;
#(
  parameter int unsigned N_FEB_P = N_FEB
) (
  input  logic               clk_bx,
  input  logic               rst_bx_n,
  input  logic               clk_ser,
  input  logic               rst_ser_n,
  input  feb_cmd_t           cmd_i,
  output logic [N_FEB_P-1:0] ser_o
);

  localparam int unsigned SER_BITS = 8;

  // ---- bunch-clock domain: crossing marker ----
  logic bx_tog;
  always_ff @(posedge clk_bx or negedge rst_bx_n) begin
    if (!rst_bx_n) bx_tog <= 1'b0;
    else           bx_tog <= ~bx_tog;
  end

  // ---- serial-clock domain ----
  logic                tog_q1, tog_q2;
  logic                load;
  logic [SER_BITS-1:0] shreg;

  always_ff @(posedge clk_ser or negedge rst_ser_n) begin
    if (!rst_ser_n) begin
      tog_q1 <= 1'b0;
      tog_q2 <= 1'b0;
    end else begin
      tog_q1 <= bx_tog;
      tog_q2 <= tog_q1;
    end
  end

  assign load = tog_q1 ^ tog_q2;

  always_ff @(posedge clk_ser or negedge rst_ser_n) begin
    if (!rst_ser_n)  shreg <= '0;
    else if (load)   shreg <= feb_word(cmd_i);
    else             shreg <= {shreg[SER_BITS-2:0], 1'b0};
  end

  always_ff @(posedge clk_ser or negedge rst_ser_n) begin
    if (!rst_ser_n) ser_o <= '0;
    else            ser_o <= {N_FEB_P{shreg[SER_BITS-1]}};
  end

endmodule
