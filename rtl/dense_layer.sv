// dense_layer: one fully connected layer, y = act(W x + b), with a reuse factor.
//
// The layer has N_IN inputs and N_OUT outputs, so N_IN*N_OUT products per
// vector. Instead of one multiplier per product it has
// P = ceil(N_IN*N_OUT / REUSE) multipliers and uses each of them REUSE
// times per vector, one product per clock. Product k = o*N_IN + i
// (weight w[o][i] times input x[i]) is done in cycle k / P by multiplier
// k % P, so the weight memory is REUSE rows of P words and one row is read
// per cycle. Sums are kept at full precision, start from the bias, and are
// brought back to <W,I> by act_quant (ReLU when RELU is set) at the end.
//
// Timing: a vector accepted at a clock edge appears at out_data REUSE
// edges later, and the next vector can be accepted on the same edge the
// previous result is produced, so a stream runs at one vector per REUSE
// cycles. If the consumer holds out_ready low, the layer stops before its
// last step and keeps its result until it is taken.
//
// Interfaces: valid/ready handshakes on the vector input and output
// (AXI-Stream rules: a valid stays up, with its data, until taken). in_last
// is carried along with the vector to out_last. Weights and biases are
// written one word at a time through cfg_we/cfg_addr/cfg_data: address
// o*N_IN+i holds w[o][i], address N_IN*N_OUT+o holds b[o]. A write takes
// effect on the next clock; load the layer while it is idle.
//
// The layer shape, the ReLU and the reuse factor follow the accelerator's
// model. The product schedule, the full-precision accumulator and the
// writable weight memory are this design's choices. rst_n (asynchronous,
// active low) clears only the control state; weights are not reset.
module dense_layer #(
  parameter int unsigned N_IN   = 20,
  parameter int unsigned N_OUT  = 200,
  parameter int unsigned REUSE  = baler_pkg::REUSE_DEFAULT,
  parameter int unsigned W      = baler_pkg::FX_W,
  parameter int unsigned I      = baler_pkg::FX_I,
  parameter bit          RELU   = 1'b1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // input vector
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [N_IN-1:0][W-1:0]      in_data,
  input  logic                        in_last,
  // output vector
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [N_OUT-1:0][W-1:0]     out_data,
  output logic                        out_last,
  output logic                        out_sat,
  // weight and bias load port
  input  logic                        cfg_we,
  input  logic [baler_pkg::CFG_AW-1:0] cfg_addr,
  input  logic [W-1:0]                cfg_data
);
  localparam int unsigned F     = W - I;
  localparam int unsigned NW    = N_IN * N_OUT;
  localparam int unsigned P     = (NW + REUSE - 1) / REUSE;
  localparam int unsigned ACC_W = baler_pkg::acc_width(W, N_IN);
  localparam int unsigned CW    = (REUSE > 1) ? $clog2(REUSE) : 1;

  // weight memory: REUSE rows of P words; bias memory: N_OUT words
  logic signed [W-1:0] wmem [REUSE][P];
  logic signed [W-1:0] bmem [N_OUT];

  // control state
  logic          busy;
  logic [CW-1:0] cnt;
  logic          last_q;

  // data state
  logic [N_IN-1:0][W-1:0]   x_q;
  logic signed [ACC_W-1:0]  acc   [N_OUT];
  logic signed [ACC_W-1:0]  acc_n [N_OUT];
  logic [N_OUT-1:0][W-1:0]  y_n;
  logic [N_OUT-1:0]         sat_n;

  logic finish, do_finish, advance, accept;

  assign finish    = busy && (cnt == CW'(REUSE - 1));
  assign do_finish = finish && (!out_valid || out_ready);
  assign advance   = busy && !finish;
  assign in_ready  = !busy || do_finish;
  assign accept    = in_valid && in_ready;

  // One row of products: P multipliers, each adding into its output's sum.
  always_comb begin
    for (int o = 0; o < int'(N_OUT); o++) acc_n[o] = acc[o];
    for (int p = 0; p < int'(P); p++) begin
      automatic int unsigned k = int'(cnt) * P + p;
      if (k < NW) begin
        acc_n[k / N_IN] = acc_n[k / N_IN]
                        + ACC_W'($signed(wmem[cnt][p]) * $signed(x_q[k % N_IN]));
      end
    end
  end

  for (genvar o = 0; o < int'(N_OUT); o++) begin : g_out
    act_quant #(.ACC_W(ACC_W), .W(W), .I(I), .RELU(RELU)) u_aq (
      .acc_i (acc_n[o]),
      .y_o   (y_n[o]),
      .sat_o (sat_n[o])
    );
  end

  // control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      if (accept) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (advance) begin
        cnt <= cnt + 1'b1;
      end else if (do_finish) begin
        busy <= 1'b0;
      end
      if (do_finish)                   out_valid <= 1'b1;
      else if (out_valid && out_ready) out_valid <= 1'b0;
    end
  end

  // datapath
  always_ff @(posedge clk) begin
    if (accept) begin
      x_q    <= in_data;
      last_q <= in_last;
      for (int o = 0; o < int'(N_OUT); o++)
        acc[o] <= ACC_W'($signed(bmem[o])) <<< F;
    end else if (advance) begin
      acc <= acc_n;
    end
    if (do_finish) begin
      out_data <= y_n;
      out_last <= last_q;
      out_sat  <= |sat_n;
    end
  end

  // weight and bias load
  always_ff @(posedge clk) begin
    if (cfg_we) begin
      if (32'(cfg_addr) < NW)
        wmem[32'(cfg_addr) / P][32'(cfg_addr) % P] <= cfg_data;
      else if (32'(cfg_addr) < NW + N_OUT)
        bmem[32'(cfg_addr) - NW] <= cfg_data;
    end
  end

  // A held result must stay put until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid && $stable(out_data);
  endproperty
  a_hold: assert property (p_hold);

endmodule
