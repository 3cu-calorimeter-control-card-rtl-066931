// ccu3_top: the logic of the 3CU calorimeter control card, one per crate.
//
// The card sits in the middle slot of a calorimeter front-end crate and turns
// the GBT optical link from the central readout supervision into what the 16
// front-end boards (FEBs) of the crate need: the 40 MHz bunch clock, the
// fast TFC commands and control of their supply protection.
//
//   GBTX clocks --> clock_tree --> 16 FEB clocks, FPGA clocks
//   GBTX D field --> tfc_decoder --> tfc_serializer --> 16 FEB TFC lines
//   FEB delatcher lines <--> fault_monitor <--> ecs_regs <--> spi_reg_slave
//                                                         <--> GBT-SCA SPI
//
// Everything from tfc_decoder to spi_reg_slave is the FPGA design; clock_tree
// is a behavioural model of the board's clock buffers. The GBTX (link
// receiver with its frame decoding and error correction), the optical
// transceiver, the GBT-SCA and the supplies are separate chips; their signals
// are this module's ports.
//
// Clocks: gbt_clk_i[2] becomes the FPGA bunch clock (clk_bx), gbt_clk_i[3]
// the 8x serializer clock, both phase-related; gbt_dv_i and gbt_data_i are
// synchronous to the bunch clock. rst_n_i is asynchronous; each domain
// releases it synchronously. The decoder also yields the full TFC word (BXID,
// NZS mode, calibration type); the FEBs of this crate receive only the six
// command bits, so the rest is left unused here. Latency from a GBT data word
// to the start bit of the matching word on feb_tfc_o: one bunch clock plus
// three serializer clocks.
module ccu3_top
  import ccu3_pkg::*;
(
  // clocks and reset
  input  logic [3:0]            gbt_clk_i,
  input  logic                  ext_clk_i,
  input  logic                  ext_sel_i,
  input  logic                  rst_n_i,
  // GBTX user data, one word per bunch crossing
  input  logic                  gbt_dv_i,
  input  logic [GBT_D_W-1:0]    gbt_data_i,
  // GBT-SCA SPI master
  input  logic                  sca_sck_i,
  input  logic                  sca_cs_n_i,
  input  logic                  sca_mosi_i,
  output logic                  sca_miso_o,
  // backplane
  input  logic [N_FEB-1:0]      delatch_n_i,
  output logic [N_FEB-1:0]      delatch_pd_o,
  input  logic [CRATE_ID_W-1:0] crate_id_i,
  output logic [N_FEB-1:0]      feb_clk_o,
  output logic [N_FEB-1:0]      feb_tfc_o
);

  logic clk_bx, clk_ser, rst_bx_n, rst_ser_n;

  clock_tree #(.N_FEB(N_FEB)) u_clock_tree (
    .gbt_clk_i      (gbt_clk_i),
    .ext_clk_i      (ext_clk_i),
    .ext_sel_i      (ext_sel_i),
    .feb_clk_o      (feb_clk_o),
    .fpga_clk_o     (clk_bx),
    .fpga_ser_clk_o (clk_ser)
  );

  reset_sync u_rst_bx  (.clk(clk_bx),  .rst_ni(rst_n_i), .rst_no(rst_bx_n));
  reset_sync u_rst_ser (.clk(clk_ser), .rst_ni(rst_n_i), .rst_no(rst_ser_n));

  // ---------------- TFC path ----------------
  tfc_t     tfc;
  feb_cmd_t cmd;
  logic     cmd_valid;

  tfc_decoder u_tfc_decoder (
    .clk         (clk_bx),
    .rst_n       (rst_bx_n),
    .gbt_dv_i    (gbt_dv_i),
    .gbt_data_i  (gbt_data_i),
    .tfc_o       (tfc),
    .cmd_o       (cmd),
    .cmd_valid_o (cmd_valid)
  );

  tfc_serializer #(.N_FEB_P(N_FEB)) u_tfc_serializer (
    .clk_bx    (clk_bx),
    .rst_bx_n  (rst_bx_n),
    .clk_ser   (clk_ser),
    .rst_ser_n (rst_ser_n),
    .cmd_i     (cmd),
    .ser_o     (feb_tfc_o)
  );

  // ---------------- ECS and fault path ----------------
  logic              reg_wr;
  logic [REG_AW-1:0] reg_addr;
  logic [REG_DW-1:0] reg_wdata, reg_rdata;
  logic [N_FEB-1:0]  fault_status, fault_line, fault_clear, pd_req;

  spi_reg_slave u_spi (
    .clk     (clk_bx),
    .rst_n   (rst_bx_n),
    .sck_i   (sca_sck_i),
    .cs_n_i  (sca_cs_n_i),
    .mosi_i  (sca_mosi_i),
    .miso_o  (sca_miso_o),
    .wr_o    (reg_wr),
    .addr_o  (reg_addr),
    .wdata_o (reg_wdata),
    .rdata_i (reg_rdata)
  );

  ecs_regs #(.N_FEB_P(N_FEB)) u_regs (
    .clk            (clk_bx),
    .rst_n          (rst_bx_n),
    .wr_i           (reg_wr),
    .addr_i         (reg_addr),
    .wdata_i        (reg_wdata),
    .rdata_o        (reg_rdata),
    .fault_status_i (fault_status),
    .fault_line_i   (fault_line),
    .fault_clear_o  (fault_clear),
    .delatch_pd_o   (pd_req),
    .crate_id_i     (crate_id_i)
  );

  fault_monitor #(.N_FEB(N_FEB)) u_fault (
    .clk      (clk_bx),
    .rst_n    (rst_bx_n),
    .line_n_i (delatch_n_i),
    .force_i  (pd_req),
    .clear_i  (fault_clear),
    .pd_o     (delatch_pd_o),
    .line_o   (fault_line),
    .status_o (fault_status)
  );

endmodule
