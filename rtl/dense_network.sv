// dense_network: one half of the autoencoder, a chain of dense layers.
//
// N_LAYERS dense_layer instances are joined input to output; layer l maps
// DIMS[l] values to DIMS[l+1]. Every layer but the last applies ReLU; the
// last is linear, so the encoder's latent code and the decoder's
// reconstruction may be negative. The defaults are the encoder of the
// large model, 20 -> 200 -> 100 -> 50 -> 5; the decoder is the same module
// with DIMS = '{5, 50, 100, 200, 20}. The smaller models evaluated with it
// are other parameter sets: 20 -> 100 -> 50 -> 5 (three layers, reuse 7)
// and 20 -> 32 -> 16 -> 8 -> 5 (reuse 1).
//
// Each layer holds its own input vector, so the layers form a pipeline:
// while layer 2 works on vector n, layer 1 already works on vector n+1.
// A stream therefore runs at one vector per REUSE cycles. A layer's result
// is valid REUSE edges after it took its input and is taken by the next
// layer one edge later, so a vector accepted at edge t is taken from the
// output at edge t + N_LAYERS*(REUSE+1) when out_ready is high.
//
// Interfaces: valid/ready vector handshakes at both ends, with a last flag
// carried along. sat_o pulses for one cycle when any layer produces a
// vector in which some value had to be clamped. The load port selects a
// layer with cfg_layer and passes cfg_addr/cfg_data to it (see
// dense_layer for the address map). The layer shapes and ReLU placement
// follow the accelerator's model; the pipelining and load port are this
// design's choices.
module dense_network #(
  parameter int unsigned N_LAYERS = 4,
  parameter int unsigned DIMS [N_LAYERS+1] = '{20, 200, 100, 50, 5},
  parameter int unsigned REUSE    = baler_pkg::REUSE_DEFAULT,
  parameter int unsigned W        = baler_pkg::FX_W,
  parameter int unsigned I        = baler_pkg::FX_I
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  output logic                              in_ready,
  input  logic [DIMS[0]-1:0][W-1:0]         in_data,
  input  logic                              in_last,
  output logic                              out_valid,
  input  logic                              out_ready,
  output logic [DIMS[N_LAYERS]-1:0][W-1:0]  out_data,
  output logic                              out_last,
  output logic                              sat_o,
  input  logic                              cfg_we,
  input  logic [baler_pkg::CFG_LW-1:0]      cfg_layer,
  input  logic [baler_pkg::CFG_AW-1:0]      cfg_addr,
  input  logic [W-1:0]                      cfg_data
);
  function automatic int unsigned max_dim();
    int unsigned m = 0;
    for (int l = 0; l <= int'(N_LAYERS); l++) if (DIMS[l] > m) m = DIMS[l];
    return m;
  endfunction
  localparam int unsigned MAXD = max_dim();

  // Stage l carries the input of layer l; stage N_LAYERS is the output.
  wire [MAXD-1:0][W-1:0] st_data  [N_LAYERS+1];
  wire                   st_valid [N_LAYERS+1];
  wire                   st_ready [N_LAYERS+1];
  wire                   st_last  [N_LAYERS+1];
  wire [N_LAYERS-1:0]    lay_sat;
  wire [N_LAYERS-1:0]    lay_fire;

  assign st_valid[0] = in_valid;
  assign in_ready    = st_ready[0];
  assign st_last[0]  = in_last;
  assign st_data[0][DIMS[0]-1:0] = in_data;
  if (DIMS[0] < MAXD) begin : g_pad_in
    assign st_data[0][MAXD-1:DIMS[0]] = '0;
  end

  for (genvar l = 0; l < int'(N_LAYERS); l++) begin : g_layer
    dense_layer #(
      .N_IN  (DIMS[l]),
      .N_OUT (DIMS[l+1]),
      .REUSE (REUSE),
      .W     (W),
      .I     (I),
      .RELU  (l < int'(N_LAYERS) - 1)
    ) u_layer (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (st_valid[l]),
      .in_ready  (st_ready[l]),
      .in_data   (st_data[l][DIMS[l]-1:0]),
      .in_last   (st_last[l]),
      .out_valid (st_valid[l+1]),
      .out_ready (st_ready[l+1]),
      .out_data  (st_data[l+1][DIMS[l+1]-1:0]),
      .out_last  (st_last[l+1]),
      .out_sat   (lay_sat[l]),
      .cfg_we    (cfg_we && (32'(cfg_layer) == l)),
      .cfg_addr  (cfg_addr),
      .cfg_data  (cfg_data)
    );
    if (DIMS[l+1] < MAXD) begin : g_pad
      assign st_data[l+1][MAXD-1:DIMS[l+1]] = '0;
    end
    // a vector leaves layer l on this cycle
    assign lay_fire[l] = st_valid[l+1] && st_ready[l+1];
  end

  assign out_valid = st_valid[N_LAYERS];
  assign st_ready[N_LAYERS] = out_ready;
  assign out_data  = st_data[N_LAYERS][DIMS[N_LAYERS]-1:0];
  assign out_last  = st_last[N_LAYERS];
  assign sat_o     = |(lay_sat & lay_fire);

endmodule
