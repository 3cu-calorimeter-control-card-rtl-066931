// tfc_decoder: decodes the TFC word carried in each GBT frame and forms the
// calorimeter command set for the front-end boards.
//
// Every 25 ns the GBTX hands over the 80-bit user data field D of the frame it
// received, with a data-valid flag. The 48-bit TFC field sits at bit TFC_LSB of
// D. Each of its 24 TFC bits occupies two adjacent positions; the decoder takes
// the odd position of each pair, which gives BXID[11:0], the reserved bit,
// Synch, Snapshot, the 4-bit calibration type, BX veto, NZS mode, Header only,
// FE reset and BXID reset (field order as defined for the TFC word). Of these
// the calorimeter FEBs receive six bits: BX reset, FE reset, Header-only ORed
// with BX veto, Calibration, Snapshot and Synch.
//
// Choices of this design: the TFC field starts at D bit 0; "Calibration" is
// asserted when the calibration type is non-zero; the even copy of each bit
// is not checked; a frame without data-valid yields no command (all zero).
//
// Interface: clk (40 MHz bunch clock), rst_n (active low), gbt_dv_i,
// gbt_data_i[79:0]. Outputs tfc_o, cmd_o and cmd_valid_o are registered:
// they show the frame presented on the previous rising edge (latency 1 cycle,
// one decoded word per bunch crossing).
module tfc_decoder
  import ccu3_pkg::*;
#(
  parameter int unsigned TFC_LSB = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 gbt_dv_i,
  input  logic [GBT_D_W-1:0]   gbt_data_i,
  output tfc_t                 tfc_o,
  output feb_cmd_t             cmd_o,
  output logic                 cmd_valid_o
);

  initial assert (TFC_LSB + TFC_W <= GBT_D_W)
    else $error("tfc_decoder: TFC field does not fit in the GBT D field");

  logic [TFC_W-1:0]    field;
  logic [TFC_BITS-1:0] bits;
  tfc_t                tfc_d;
  feb_cmd_t            cmd_d;

  always_comb begin
    field = gbt_data_i[TFC_LSB +: TFC_W];
    for (int i = 0; i < TFC_BITS; i++) bits[i] = field[2*i+1];
    tfc_d = tfc_t'(bits);

    cmd_d.bx_reset    = tfc_d.bxid_reset;
    cmd_d.fe_reset    = tfc_d.fe_reset;
    cmd_d.hdr_or_veto = tfc_d.header_only | tfc_d.bx_veto;
    cmd_d.calib       = |tfc_d.cal_type;
    cmd_d.snapshot    = tfc_d.snapshot;
    cmd_d.synch       = tfc_d.synch;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tfc_o       <= '0;
      cmd_o       <= '0;
      cmd_valid_o <= 1'b0;
    end else if (gbt_dv_i) begin
      tfc_o       <= tfc_d;
      cmd_o       <= cmd_d;
      cmd_valid_o <= 1'b1;
    end else begin
      tfc_o       <= '0;
      cmd_o       <= '0;
      cmd_valid_o <= 1'b0;
    end
  end

endmodule
