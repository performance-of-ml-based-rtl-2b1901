// baler_fpga_top: programmable-logic side of the autoencoder compressor.
//
// The autoencoder is split into its two halves, each a separate IP that
// runs on its own: the encoder compresses vectors of 20 fixed-point values
// into 5 latent values (20 -> 200 -> 100 -> 50 -> 5) and the decoder
// rebuilds 20 values from 5 (5 -> 50 -> 100 -> 200 -> 20). Both use the
// <19,10> fixed-point format and a reuse factor of 22, which keeps the
// multiplier count of each half (1332) inside the 1728 DSP slices of the
// target device at about 80% use. (Both halves together need 2664, more
// than one such device has; for an FPGA build take one baler_model_ip
// per device, as the two halves were built separately.) In a link the encoder sits at the
// sending end and the decoder at the receiving end; here they stand side
// by side, each with its own DMA streams, weight-load port and saturation
// flag, and one clock.
//
// Each half accepts one vector per 22 cycles and delivers its first output
// word 4*(22+1) + 2 = 94 cycles after its last input word (see
// baler_model_ip).
// The DMA engine and the processing system that drive these ports are
// outside this design.
module baler_fpga_top #(
  parameter int unsigned REUSE       = baler_pkg::REUSE_DEFAULT,
  parameter int unsigned W           = baler_pkg::FX_W,
  parameter int unsigned I           = baler_pkg::FX_I,
  parameter int unsigned ENC_DIMS [5] = '{20, 200, 100, 50, 5},
  parameter int unsigned DEC_DIMS [5] = '{5, 50, 100, 200, 20},
  parameter int unsigned TDATA_W     = baler_pkg::AXIS_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // encoder streams
  input  logic [TDATA_W-1:0]            enc_s_axis_tdata,
  input  logic                          enc_s_axis_tvalid,
  output logic                          enc_s_axis_tready,
  input  logic                          enc_s_axis_tlast,
  output logic [TDATA_W-1:0]            enc_m_axis_tdata,
  output logic                          enc_m_axis_tvalid,
  input  logic                          enc_m_axis_tready,
  output logic                          enc_m_axis_tlast,
  // encoder weight load
  input  logic                          enc_cfg_we,
  input  logic [baler_pkg::CFG_LW-1:0]  enc_cfg_layer,
  input  logic [baler_pkg::CFG_AW-1:0]  enc_cfg_addr,
  input  logic [W-1:0]                  enc_cfg_data,
  output logic                          enc_sat_o,
  // decoder streams
  input  logic [TDATA_W-1:0]            dec_s_axis_tdata,
  input  logic                          dec_s_axis_tvalid,
  output logic                          dec_s_axis_tready,
  input  logic                          dec_s_axis_tlast,
  output logic [TDATA_W-1:0]            dec_m_axis_tdata,
  output logic                          dec_m_axis_tvalid,
  input  logic                          dec_m_axis_tready,
  output logic                          dec_m_axis_tlast,
  // decoder weight load
  input  logic                          dec_cfg_we,
  input  logic [baler_pkg::CFG_LW-1:0]  dec_cfg_layer,
  input  logic [baler_pkg::CFG_AW-1:0]  dec_cfg_addr,
  input  logic [W-1:0]                  dec_cfg_data,
  output logic                          dec_sat_o
);

  baler_model_ip #(
    .N_LAYERS (4),
    .DIMS     (ENC_DIMS),
    .REUSE    (REUSE),
    .W        (W),
    .I        (I),
    .TDATA_W  (TDATA_W)
  ) u_encoder (
    .clk           (clk),
    .rst_n         (rst_n),
    .s_axis_tdata  (enc_s_axis_tdata),
    .s_axis_tvalid (enc_s_axis_tvalid),
    .s_axis_tready (enc_s_axis_tready),
    .s_axis_tlast  (enc_s_axis_tlast),
    .m_axis_tdata  (enc_m_axis_tdata),
    .m_axis_tvalid (enc_m_axis_tvalid),
    .m_axis_tready (enc_m_axis_tready),
    .m_axis_tlast  (enc_m_axis_tlast),
    .cfg_we        (enc_cfg_we),
    .cfg_layer     (enc_cfg_layer),
    .cfg_addr      (enc_cfg_addr),
    .cfg_data      (enc_cfg_data),
    .sat_o         (enc_sat_o)
  );

  baler_model_ip #(
    .N_LAYERS (4),
    .DIMS     (DEC_DIMS),
    .REUSE    (REUSE),
    .W        (W),
    .I        (I),
    .TDATA_W  (TDATA_W)
  ) u_decoder (
    .clk           (clk),
    .rst_n         (rst_n),
    .s_axis_tdata  (dec_s_axis_tdata),
    .s_axis_tvalid (dec_s_axis_tvalid),
    .s_axis_tready (dec_s_axis_tready),
    .s_axis_tlast  (dec_s_axis_tlast),
    .m_axis_tdata  (dec_m_axis_tdata),
    .m_axis_tvalid (dec_m_axis_tvalid),
    .m_axis_tready (dec_m_axis_tready),
    .m_axis_tlast  (dec_m_axis_tlast),
    .cfg_we        (dec_cfg_we),
    .cfg_layer     (dec_cfg_layer),
    .cfg_addr      (dec_cfg_addr),
    .cfg_data      (dec_cfg_data),
    .sat_o         (dec_sat_o)
  );

endmodule
