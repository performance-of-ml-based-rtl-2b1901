// act_quant: requantisation and ReLU at the output of a dense layer.
//
// A layer sums products of two <W,I> words at full precision, so its
// accumulator has 2F fractional bits (F = W - I). This block brings one
// such sum back to a <W,I> word for the next layer: it drops the low F
// bits (truncation toward minus infinity), clamps the result to the
// W-bit signed range, and, when RELU is set, replaces a negative result
// by zero. sat_o tells that the clamp was needed.
//
// The ReLU between layers and the <19,10> format follow the accelerator's
// model; truncation and saturation as the rounding and overflow modes are
// this design's choice. Purely combinational.
module act_quant #(
  parameter int unsigned ACC_W = 48,
  parameter int unsigned W     = baler_pkg::FX_W,
  parameter int unsigned I     = baler_pkg::FX_I,
  parameter bit          RELU  = 1'b1
) (
  input  logic signed [ACC_W-1:0] acc_i,
  output logic signed [W-1:0]     y_o,
  output logic                    sat_o
);
  localparam int unsigned F = W - I;

  localparam logic signed [ACC_W-1:0] MAX_V = ACC_W'((64'sd1 <<< (W - 1)) - 64'sd1);
  localparam logic signed [ACC_W-1:0] MIN_V = -ACC_W'(64'sd1 <<< (W - 1));

  logic signed [ACC_W-1:0] shifted;
  logic signed [W-1:0]     clamped;

  always_comb begin
    shifted = acc_i >>> F;
    sat_o   = 1'b0;
    if (shifted > MAX_V) begin
      clamped = MAX_V[W-1:0];
      sat_o   = 1'b1;
    end else if (shifted < MIN_V) begin
      clamped = MIN_V[W-1:0];
      sat_o   = 1'b1;
    end else begin
      clamped = shifted[W-1:0];
    end
    if (RELU && clamped[W-1]) y_o = '0;
    else                      y_o = clamped;
  end

endmodule
