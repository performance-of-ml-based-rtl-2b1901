// axis_to_vec: AXI-Stream words from the DMA in, model input vectors out.
//
// The DMA sends the data to compress as a stream of 32-bit words, one
// fixed-point value per word, N words per input vector. This block stores
// the words in arrival order into a vector register (word j becomes
// element j) and offers the vector once N words have arrived. out_last is
// set when any word of the vector carried tlast, so the end of a DMA
// transfer travels with the vector it ends.
//
// Timing: one word per cycle while tready is high. tready is low only while
// a full vector waits and the consumer does not take it; when the consumer
// takes it in the same cycle as a new word arrives, that word starts the
// next vector, so there is no bubble between vectors.
//
// Word format: the low W bits of tdata are the two's-complement <W,I>
// value; upper bits are ignored. The stream word format and the vector
// packing are this design's choices; the DMA link itself is the
// accelerator's.
module axis_to_vec #(
  parameter int unsigned N       = 20,
  parameter int unsigned W       = baler_pkg::FX_W,
  parameter int unsigned TDATA_W = baler_pkg::AXIS_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [TDATA_W-1:0]   s_axis_tdata,
  input  logic                 s_axis_tvalid,
  output logic                 s_axis_tready,
  input  logic                 s_axis_tlast,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [N-1:0][W-1:0]  out_data,
  output logic                 out_last
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] idx;
  logic          last_acc;   // tlast seen among the words collected so far
  logic          beat;

  assign s_axis_tready = !out_valid || out_ready;
  assign beat          = s_axis_tvalid && s_axis_tready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      last_acc  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (beat) begin
        if (idx == IW'(N - 1)) begin
          idx       <= '0;
          last_acc  <= 1'b0;
          out_valid <= 1'b1;
        end else begin
          idx      <= idx + 1'b1;
          last_acc <= last_acc || s_axis_tlast;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (beat) begin
      out_data[idx] <= s_axis_tdata[W-1:0];
      if (idx == IW'(N - 1)) out_last <= last_acc || s_axis_tlast;
    end
  end

  // AXI-Stream rule: a word offered stays offered, unchanged, until taken.
  property p_src_hold;
    @(posedge clk) disable iff (!rst_n)
      s_axis_tvalid && !s_axis_tready |=> s_axis_tvalid && $stable(s_axis_tdata) && $stable(s_axis_tlast);
  endproperty
  a_src_hold: assert property (p_src_hold);

endmodule
