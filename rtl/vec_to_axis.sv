// vec_to_axis: model output vectors in, AXI-Stream words to the DMA out.
//
// Each output vector of N fixed-point values is sent as N words, element 0
// first, each value sign-extended to TDATA_W bits. When the vector was
// marked last (it ends the input transfer), tlast is raised on its final
// word so the DMA's receive channel closes its transfer there.
//
// Timing: one word per cycle while tready is high. A new vector is taken
// on the same cycle as the final word of the previous one leaves, so the
// stream has no bubble between vectors.
//
// The word format and word order are this design's choices, matching
// axis_to_vec; the DMA link itself is the accelerator's.
module vec_to_axis #(
  parameter int unsigned N       = 5,
  parameter int unsigned W       = baler_pkg::FX_W,
  parameter int unsigned TDATA_W = baler_pkg::AXIS_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [N-1:0][W-1:0]  in_data,
  input  logic                 in_last,
  output logic [TDATA_W-1:0]   m_axis_tdata,
  output logic                 m_axis_tvalid,
  input  logic                 m_axis_tready,
  output logic                 m_axis_tlast
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0][W-1:0] buf_q;
  logic                last_q;
  logic [IW-1:0]       idx;
  logic                busy;
  logic                final_beat;

  assign final_beat    = busy && m_axis_tready && (idx == IW'(N - 1));
  assign in_ready      = !busy || final_beat;
  assign m_axis_tvalid = busy;
  assign m_axis_tdata  = TDATA_W'($signed(buf_q[idx]));
  assign m_axis_tlast  = busy && last_q && (idx == IW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        busy <= 1'b1;
        idx  <= '0;
      end else if (final_beat) begin
        busy <= 1'b0;
        idx  <= '0;
      end else if (busy && m_axis_tready) begin
        idx <= idx + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      buf_q  <= in_data;
      last_q <= in_last;
    end
  end

endmodule
