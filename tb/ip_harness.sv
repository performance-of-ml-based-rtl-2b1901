// ip_harness: testbench driver and checker for one autoencoder-half IP.
//
// Connects to the stream, load and status ports of a baler_model_ip (on its
// own or inside the top). It loads random weights layer by layer, sends NV
// input vectors as one value per 32-bit word, and checks every output word
// against the integer reference in baler_ref_pkg. The run has two halves:
// in the first quarter (or THROTTLE vectors), input words come with random gaps and the output is
// randomly held back (after vector 0, first held for 400 cycles so the
// whole pipeline fills and the input stalls); after that, both sides run freely. Input transfers
// end (tlast) after vector NV/2-1 and after the last vector.
//
// Besides the values it checks: tlast on the right output words; the
// latency of vector 0 (N_LAYERS*(REUSE+1)+2 edges from its last input word
// to its first output word); the steady rate at the end of the run (one
// vector per max(DIMS[0], REUSE, DIMS[N_LAYERS]) cycles); that sat_o fired
// when and only when the reference clamped a value. It counts how often
// each mechanism happened (input stall, output back-pressure, input gap,
// tlast, ReLU zeroing, saturation) and counts a failure for any that never
// did. done rises when all outputs are in.
module ip_harness #(
  parameter int unsigned N_LAYERS = 4,
  parameter int unsigned DIMS [N_LAYERS+1] = '{20, 200, 100, 50, 5},
  parameter int unsigned REUSE    = 22,
  parameter int unsigned W        = 19,
  parameter int unsigned I        = 10,
  parameter int unsigned TDATA_W  = 32,
  parameter int unsigned NV       = 24,
  parameter string       NAME     = "ip",
  // vectors sent and received under random gaps and back-pressure; 0 means NV/4
  parameter int unsigned THROTTLE = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic [TDATA_W-1:0]  s_axis_tdata,
  output logic                s_axis_tvalid,
  input  logic                s_axis_tready,
  output logic                s_axis_tlast,
  input  logic [TDATA_W-1:0]  m_axis_tdata,
  input  logic                m_axis_tvalid,
  output logic                m_axis_tready,
  input  logic                m_axis_tlast,
  output logic                cfg_we,
  output logic [2:0]          cfg_layer,
  output logic [15:0]         cfg_addr,
  output logic [W-1:0]        cfg_data,
  input  logic                sat_i,
  output logic                done,
  output int                  checks,
  output int                  failures
);
  import baler_ref_pkg::*;
  localparam int F     = W - I;
  localparam int N_IN  = DIMS[0];
  localparam int N_OUT = DIMS[N_LAYERS];
  localparam int MAXI  = (N_IN > int'(REUSE)) ? N_IN : int'(REUSE);
  localparam int PERIOD = (MAXI > N_OUT) ? MAXI : N_OUT;
  localparam int LATENCY = N_LAYERS * (REUSE + 1) + 2;
  localparam int NTHR    = (THROTTLE == 0) ? int'(NV) / 4 : int'(THROTTLE);
  // stimulus range: inputs within +-2.0 (or the format's range if smaller),
  // weights within +-2.0/sqrt(fan-in), biases within +-0.5
  localparam int XMAX = (1 << (W - 2)) - 1;
  localparam int XR   = ((2 << F) < XMAX) ? (2 << F) : XMAX;
  localparam int BR   = (F > 0) ? (1 << (F - 1)) : 1;
  // in formats too narrow for +-2.0, weights use half the full range
  localparam bit NARROW = (2 << F) >= XMAX;

  typedef int ivec_t [];
  ivec_t wts [N_LAYERS];
  ivec_t bia [N_LAYERS];
  int xin  [NV][N_IN];
  int yexp [NV][N_OUT];
  int ref_sat_vectors = 0;   // vectors during which some layer clamped
  int ref_clips = 0;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bit running = 0;
  int vin = 0, win = 0;      // next input vector / word
  int vout = 0, wout = 0;    // next output vector / word
  bit in_taken = 0;
  int hold = 0;
  int t_last_in0 = -1;
  int t_first_out [NV];
  // mechanism counters
  int ev_in_stall = 0, ev_out_stall = 0, ev_gap = 0, ev_tlast = 0, ev_sat = 0;

  initial begin
    checks = 0; failures = 0; done = 0;
    s_axis_tvalid = 0; s_axis_tdata = '0; s_axis_tlast = 0;
    m_axis_tready = 0;
    cfg_we = 0; cfg_layer = '0; cfg_addr = '0; cfg_data = '0;
    // random weights scaled so activations stay mostly in range
    for (int l = 0; l < int'(N_LAYERS); l++) begin
      int n_in, n_out, wr;
      n_in  = DIMS[l];
      n_out = DIMS[l+1];
      wr    = NARROW ? XMAX : (XR / isqrt(n_in) > 0) ? XR / isqrt(n_in) : 1;
      wts[l] = new[n_in * n_out];
      bia[l] = new[n_out];
      foreach (wts[l][k]) wts[l][k] = $urandom_range(0, 2 * wr) - wr;
      foreach (bia[l][k]) bia[l][k] = $urandom_range(0, 2 * BR) - BR;
    end
    // stimulus and reference results
    for (int v = 0; v < int'(NV); v++) begin
      ivec_t x, y;
      int ns;
      x = new[N_IN];
      for (int i = 0; i < N_IN; i++) begin
        // vector 2 is made of extreme values, to drive the layers into saturation
        x[i] = (v == 2) ? ((i % 2) ? (1 << (W - 1)) - 1 : (1 << (W - 1)) - 2)
                        : $urandom_range(0, 2 * XR) - XR;
        xin[v][i] = x[i];
      end
      ns = 0;
      for (int l = 0; l < int'(N_LAYERS); l++) begin
        dense(DIMS[l], DIMS[l+1], wts[l], bia[l], x, (l < int'(N_LAYERS) - 1), W, F, y, ns, ref_clips);
        x = y;
      end
      for (int o = 0; o < N_OUT; o++) yexp[v][o] = x[o];
      if (ns != 0) ref_sat_vectors++;
    end
    wait (rst_n);
    // load every layer, one word per cycle
    for (int l = 0; l < int'(N_LAYERS); l++) begin
      for (int k = 0; k < int'(DIMS[l] * DIMS[l+1] + DIMS[l+1]); k++) begin
        @(negedge clk);
        cfg_we    = 1;
        cfg_layer = 3'(l);
        cfg_addr  = 16'(k);
        cfg_data  = W'((k < int'(DIMS[l] * DIMS[l+1])) ? wts[l][k] : bia[l][k - DIMS[l] * DIMS[l+1]]);
      end
    end
    @(negedge clk);
    cfg_we  = 0;
    running = 1;
  end

  // driver and monitor act at the falling edge; a handshake seen after the
  // settle delay completes at the next rising edge
  always @(negedge clk) if (running && !done) begin
    bit phase_a;
    phase_a = (vin < NTHR);
    if (!s_axis_tvalid || in_taken) begin
      if (vin < int'(NV) && (!phase_a || vin == 0 || $urandom_range(0, 3) != 0)) begin
        s_axis_tvalid = 1;
        s_axis_tdata  = TDATA_W'(xin[vin][win]);
        s_axis_tlast  = (win == N_IN - 1) && (vin == int'(NV) / 2 - 1 || vin == int'(NV) - 1);
      end else begin
        s_axis_tvalid = 0;
        s_axis_tlast  = 0;
        if (vin < int'(NV)) ev_gap++;
      end
    end
    // after the first vector, hold the output long enough to fill the pipeline
    if (vout >= 1 && hold < 400) begin
      m_axis_tready = 0;
      hold++;
    end else begin
      m_axis_tready = (vout >= NTHR) || (vout == 0) || ($urandom_range(0, 7) == 0);
    end
    #1;
    if (s_axis_tvalid && !s_axis_tready) ev_in_stall++;
    if (m_axis_tvalid && !m_axis_tready) ev_out_stall++;
    if (sat_i) ev_sat++;
    in_taken = s_axis_tvalid && s_axis_tready;
    if (in_taken) begin
      if (vin == 0 && win == N_IN - 1) t_last_in0 = cyc;
      if (win == N_IN - 1) begin win = 0; vin++; end
      else win++;
    end
    if (m_axis_tvalid && m_axis_tready) begin
      bit exp_last;
      if (wout == 0) t_first_out[vout] = cyc;
      exp_last = (wout == N_OUT - 1) && (vout == int'(NV) / 2 - 1 || vout == int'(NV) - 1);
      checks += 2;
      if (m_axis_tdata != TDATA_W'(yexp[vout][wout])) begin
        failures++;
        $display("%s: vector %0d word %0d: got %0d expected %0d", NAME, vout, wout,
                 $signed(m_axis_tdata), yexp[vout][wout]);
      end
      if (m_axis_tlast != exp_last) begin
        failures++;
        $display("%s: vector %0d word %0d: tlast %0b expected %0b", NAME, vout, wout, m_axis_tlast, exp_last);
      end
      if (m_axis_tlast) ev_tlast++;
      if (wout == N_OUT - 1) begin wout = 0; vout++; end
      else wout++;
      if (vout == int'(NV)) begin
        finish_checks();
        done = 1;
      end
    end
  end

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("%s: %s never happened", NAME, what); end
  endtask

  task automatic finish_checks();
    checks++;
    if (t_first_out[0] - t_last_in0 != LATENCY) begin
      failures++;
      $display("%s: latency %0d, expected %0d", NAME, t_first_out[0] - t_last_in0, LATENCY);
    end
    for (int v = int'(NV) - 6; v < int'(NV); v++) begin
      checks++;
      if (t_first_out[v] - t_first_out[v-1] != PERIOD) begin
        failures++;
        $display("%s: interval before vector %0d is %0d, expected %0d", NAME, v,
                 t_first_out[v] - t_first_out[v-1], PERIOD);
      end
    end
    // sat_o pulses once per layer and vector, merged when layers coincide
    checks++;
    if ((ref_sat_vectors == 0) != (ev_sat == 0)) begin
      failures++;
      $display("%s: saturation pulses %0d, reference vectors with clamping %0d", NAME, ev_sat, ref_sat_vectors);
    end
    expect_seen("input stall", ev_in_stall);
    expect_seen("output back-pressure", ev_out_stall);
    expect_seen("input gap", ev_gap);
    expect_seen("tlast", ev_tlast);
    expect_seen("ReLU zeroing", ref_clips);
    expect_seen("saturation", ev_sat);
    $display("%s: %0d vectors, latency %0d, period %0d; input stalls %0d, output stalls %0d, gaps %0d, tlast %0d, relu zeros %0d, saturation pulses %0d",
             NAME, NV, t_first_out[0] - t_last_in0, t_first_out[NV-1] - t_first_out[NV-2],
             ev_in_stall, ev_out_stall, ev_gap, ev_tlast, ref_clips, ev_sat);
  endtask

endmodule
