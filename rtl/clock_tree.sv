// clock_tree: behavioural model of the 3CU board's clock distribution
// (buffers, splitters and LVDS drivers; not logic that goes into the FPGA).
//
// The GBTX recovers the LHC bunch clock from the optical link and offers
// eight phase-programmable clock outputs; the card uses four of them. They
// are buffered and split, and each FEB slot gets its own point-to-point LVDS
// clock over the backplane. Because the two half crates and the FPGA are fed
// from different GBTX outputs, their phases can be adjusted independently in
// the GBTX. For debugging an external clock can replace the GBTX clocks.
//
// Assignment of the four GBTX outputs (this design's choice):
//   gbt_clk_i[0] -> FEB slots 0 .. N_FEB/2-1   (first half crate)
//   gbt_clk_i[1] -> FEB slots N_FEB/2 .. N_FEB-1 (second half crate)
//   gbt_clk_i[2] -> FPGA bunch clock (40 MHz)
//   gbt_clk_i[3] -> FPGA serializer clock (8x, 320 MHz)
// ext_sel_i = 1 replaces the three 40 MHz clocks by ext_clk_i; the serializer
// clock stays on the GBTX. Each path has a fixed propagation delay
// T_BUF_PS (a typical buffer-plus-driver delay, not a measured value); the
// multiplexer is modelled without glitch protection.
module clock_tree #(
  parameter int unsigned N_FEB    = 16,
  parameter int unsigned T_BUF_PS = 800
) (
  input  logic [3:0]       gbt_clk_i,
  input  logic             ext_clk_i,
  input  logic             ext_sel_i,
  output logic [N_FEB-1:0] feb_clk_o,
  output logic             fpga_clk_o,
  output logic             fpga_ser_clk_o
);

  localparam int unsigned HALF = N_FEB / 2;

  logic half0, half1, fpga;

  always_comb begin
    half0 = ext_sel_i ? ext_clk_i : gbt_clk_i[0];
    half1 = ext_sel_i ? ext_clk_i : gbt_clk_i[1];
    fpga  = ext_sel_i ? ext_clk_i : gbt_clk_i[2];
  end

  for (genvar i = 0; i < N_FEB; i++) begin : g_feb
    if (i < HALF) begin : g_h0
      assign #(T_BUF_PS * 1ps) feb_clk_o[i] = half0;
    end else begin : g_h1
      assign #(T_BUF_PS * 1ps) feb_clk_o[i] = half1;
    end
  end

  assign #(T_BUF_PS * 1ps) fpga_clk_o     = fpga;
  assign #(T_BUF_PS * 1ps) fpga_ser_clk_o = gbt_clk_i[3];

endmodule
