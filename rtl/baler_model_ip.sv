// baler_model_ip: one autoencoder half as an accelerator IP on DMA streams.
//
// The processing system's DMA streams the data to (de)compress into
// s_axis, one fixed-point value per 32-bit word; axis_to_vec groups the
// words into vectors of DIMS[0] values, dense_network runs the layers, and
// vec_to_axis streams each result vector of DIMS[N_LAYERS] values back on
// m_axis. tlast of an input transfer comes out on the last word of the
// corresponding output. With the default parameters this is the encoder
// of the large model (20 values in, 5 latent values out, reuse 22); the
// decoder is the same IP with DIMS = '{5, 50, 100, 200, 20}.
//
// Timing: input words at one per cycle, output words at one per cycle,
// and the network at one vector per REUSE cycles; the slowest of
// DIMS[0], DIMS[N_LAYERS] and REUSE cycles sets the steady rate (22 cycles
// per vector for both halves of the large model). Latency from the edge
// that takes the last input word of a vector to the edge that takes its
// first output word is N_LAYERS*(REUSE+1) + 2 cycles (94 for the large
// model).
//
// The weight/bias load port reaches every layer (cfg_layer picks one);
// it stands in for the constants that a generated IP would have built in.
// sat_o pulses when a layer had to clamp a value. The split into an
// encoder IP and a decoder IP and the DMA streams follow the accelerator;
// the adapters' word format and the load port are this design's choices.
module baler_model_ip #(
  parameter int unsigned N_LAYERS = 4,
  parameter int unsigned DIMS [N_LAYERS+1] = '{20, 200, 100, 50, 5},
  parameter int unsigned REUSE    = baler_pkg::REUSE_DEFAULT,
  parameter int unsigned W        = baler_pkg::FX_W,
  parameter int unsigned I        = baler_pkg::FX_I,
  parameter int unsigned TDATA_W  = baler_pkg::AXIS_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // from the DMA (memory to stream)
  input  logic [TDATA_W-1:0]            s_axis_tdata,
  input  logic                          s_axis_tvalid,
  output logic                          s_axis_tready,
  input  logic                          s_axis_tlast,
  // to the DMA (stream to memory)
  output logic [TDATA_W-1:0]            m_axis_tdata,
  output logic                          m_axis_tvalid,
  input  logic                          m_axis_tready,
  output logic                          m_axis_tlast,
  // weight and bias load port
  input  logic                          cfg_we,
  input  logic [baler_pkg::CFG_LW-1:0]  cfg_layer,
  input  logic [baler_pkg::CFG_AW-1:0]  cfg_addr,
  input  logic [W-1:0]                  cfg_data,
  // status
  output logic                          sat_o
);
  localparam int unsigned N_IN  = DIMS[0];
  localparam int unsigned N_OUT = DIMS[N_LAYERS];

  logic                     iv_valid, iv_ready, iv_last;
  logic [N_IN-1:0][W-1:0]   iv_data;
  logic                     ov_valid, ov_ready, ov_last;
  logic [N_OUT-1:0][W-1:0]  ov_data;

  axis_to_vec #(.N(N_IN), .W(W), .TDATA_W(TDATA_W)) u_in (
    .clk           (clk),
    .rst_n         (rst_n),
    .s_axis_tdata  (s_axis_tdata),
    .s_axis_tvalid (s_axis_tvalid),
    .s_axis_tready (s_axis_tready),
    .s_axis_tlast  (s_axis_tlast),
    .out_valid     (iv_valid),
    .out_ready     (iv_ready),
    .out_data      (iv_data),
    .out_last      (iv_last)
  );

  dense_network #(
    .N_LAYERS (N_LAYERS),
    .DIMS     (DIMS),
    .REUSE    (REUSE),
    .W        (W),
    .I        (I)
  ) u_net (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (iv_valid),
    .in_ready  (iv_ready),
    .in_data   (iv_data),
    .in_last   (iv_last),
    .out_valid (ov_valid),
    .out_ready (ov_ready),
    .out_data  (ov_data),
    .out_last  (ov_last),
    .sat_o     (sat_o),
    .cfg_we    (cfg_we),
    .cfg_layer (cfg_layer),
    .cfg_addr  (cfg_addr),
    .cfg_data  (cfg_data)
  );

  vec_to_axis #(.N(N_OUT), .W(W), .TDATA_W(TDATA_W)) u_out (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_valid      (ov_valid),
    .in_ready      (ov_ready),
    .in_data       (ov_data),
    .in_last       (ov_last),
    .m_axis_tdata  (m_axis_tdata),
    .m_axis_tvalid (m_axis_tvalid),
    .m_axis_tready (m_axis_tready),
    .m_axis_tlast  (m_axis_tlast)
  );

endmodule
