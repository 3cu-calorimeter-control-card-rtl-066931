// gbtx_model: behavioural model of the GBTX link chip as seen by the 3CU,
// for simulation only.
//
// It produces the recovered bunch clock on three outputs (two half crates and
// the FPGA) and an 8x clock on the fourth, all phase-aligned. Each bunch
// crossing the test supplies a 120-bit GBT frame (4-bit header, 2-bit IC,
// 2-bit EC, 80-bit D, 32-bit FEC). The model checks the header: a data header
// (0101) gives data-valid with the D field, an idle header (0110) or any
// other gives no data-valid. The FEC field is not decoded: the model assumes
// an error-free link. Outputs change on the falling edge of the bunch clock,
// half a period away from the FPGA's sampling edge. The EC field, which the
// real chip forwards to the GBT-SCA, is brought out as ec_o.
module gbtx_model
  import ccu3_pkg::*;
#(
  parameter realtime T_BX = 24ns
) (
  input  logic [GBT_FRAME_W-1:0] frame_i,
  output logic [3:0]             clk_o,
  output logic                   dv_o,
  output logic [GBT_D_W-1:0]     data_o,
  output logic [1:0]             ec_o,
  output int                     n_data,
  output int                     n_idle
);

  logic bx = 1'b1, ser = 1'b1;   // rising edges coincide

  always #(T_BX / 2)  bx  = ~bx;
  always #(T_BX / 16) ser = ~ser;

  assign clk_o = {ser, bx, bx, bx};

  initial begin
    dv_o = 1'b0; data_o = '0; ec_o = '0; n_data = 0; n_idle = 0;
  end

  always @(negedge bx) begin
    logic [GBT_HDR_W-1:0] hdr;
    hdr    = frame_i[GBT_HDR_MSB -: GBT_HDR_W];
    data_o <= frame_i[GBT_D_MSB -: GBT_D_W];
    ec_o   <= frame_i[GBT_EC_MSB -: 2];
    dv_o   <= (hdr == GBT_HDR_DATA);
    if (hdr == GBT_HDR_DATA) n_data <= n_data + 1;
    else                     n_idle <= n_idle + 1;
  end

endmodule
