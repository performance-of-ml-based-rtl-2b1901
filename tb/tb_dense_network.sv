// Testbench for dense_network: three layers 6 -> 9 -> 4 -> 3 with reuse
// factor 5, ReLU after the first two and a linear last layer. Loads every
// layer through the shared load port, streams vectors with random input
// gaps and output stalls, then back to back, and compares each output
// vector with the integer reference. Checks the latency (3*(5+1) edges from
// accept to the result being taken), the rate (one vector per 5 cycles
// with all layers busy at once), the last flag and the saturation pulse.
module tb_dense_network;
  import baler_ref_pkg::*;
  localparam int NL = 3, R = 5, W = 19, I = 10, F = W - I, NV = 40;
  localparam int unsigned DIMS [NL+1] = '{6, 9, 4, 3};
  localparam int N_IN = DIMS[0], N_OUT = DIMS[NL];

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    in_valid = 0, in_ready, in_last = 0;
  logic [N_IN-1:0][W-1:0]  in_data = '0;
  logic                    out_valid, out_ready = 0, out_last, sat_o;
  logic [N_OUT-1:0][W-1:0] out_data;
  logic                    cfg_we = 0;
  logic [2:0]              cfg_layer = '0;
  logic [15:0]             cfg_addr = '0;
  logic [W-1:0]            cfg_data = '0;

  dense_network #(.N_LAYERS(NL), .DIMS(DIMS), .REUSE(R), .W(W), .I(I)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef int ivec_t [];
  ivec_t wts [NL];
  ivec_t bia [NL];
  int xin [NV][N_IN];
  int yexp [NV][N_OUT];
  int sat_vecs = 0, clips = 0, sat_pulses = 0;
  int sent = 0, got = 0;
  int acc_cyc [NV];
  int out_cyc [NV];
  bit running = 0, in_taken = 0;

  initial begin
    for (int l = 0; l < NL; l++) begin
      wts[l] = new[DIMS[l] * DIMS[l+1]];
      bia[l] = new[DIMS[l+1]];
      foreach (wts[l][k]) wts[l][k] = $urandom_range(0, 1200) - 600;
      foreach (bia[l][k]) bia[l][k] = $urandom_range(0, 512) - 256;
    end
    for (int v = 0; v < NV; v++) begin
      ivec_t x, y;
      int ns;
      ns = 0;
      x = new[N_IN];
      for (int i = 0; i < N_IN; i++) begin
        x[i] = (v == 2) ? 262000 : $urandom_range(0, 4095) - 2048;
        xin[v][i] = x[i];
      end
      for (int l = 0; l < NL; l++) begin
        dense(DIMS[l], DIMS[l+1], wts[l], bia[l], x, (l < NL - 1), W, F, y, ns, clips);
        x = y;
      end
      for (int o = 0; o < N_OUT; o++) yexp[v][o] = x[o];
      if (ns != 0) sat_vecs++;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < NL; l++)
      for (int k = 0; k < int'(DIMS[l] * DIMS[l+1] + DIMS[l+1]); k++) begin
        @(negedge clk);
        cfg_we = 1; cfg_layer = 3'(l); cfg_addr = 16'(k);
        cfg_data = W'((k < int'(DIMS[l] * DIMS[l+1])) ? wts[l][k] : bia[l][k - DIMS[l] * DIMS[l+1]]);
      end
    @(negedge clk);
    cfg_we = 0;
    running = 1;
  end

  always @(negedge clk) if (running) begin
    if (!in_valid || in_taken) begin
      if (sent < NV && (sent >= NV / 2 || sent == 0 || $urandom_range(0, 2) != 0)) begin
        in_valid = 1;
        for (int i = 0; i < N_IN; i++) in_data[i] = W'(xin[sent][i]);
        in_last = (sent % 4 == 3);
      end else in_valid = 0;
    end
    out_ready = (got >= NV / 2) || (got == 0) || ($urandom_range(0, 2) != 0);
    #1;
    if (sat_o) sat_pulses++;
    in_taken = in_valid && in_ready;
    if (in_taken) begin acc_cyc[sent] = cyc; sent++; end
    if (out_valid && out_ready) begin
      out_cyc[got] = cyc;
      for (int o = 0; o < N_OUT; o++) begin
        checks++;
        if (sext(out_data[o], W) != yexp[got][o]) begin
          failures++; $display("vec %0d out %0d: got %0d exp %0d", got, o, sext(out_data[o], W), yexp[got][o]);
        end
      end
      checks++;
      if (out_last != (got % 4 == 3)) begin failures++; $display("vec %0d: last wrong", got); end
      got++;
    end
  end

  initial begin
    wait (got == NV);
    @(negedge clk);
    checks++;
    if (out_cyc[0] - acc_cyc[0] != NL * (R + 1)) begin
      failures++; $display("latency %0d, expected %0d", out_cyc[0] - acc_cyc[0], NL * (R + 1));
    end
    for (int v = NV - 8; v < NV; v++) begin
      checks++;
      if (out_cyc[v] - out_cyc[v-1] != R) begin
        failures++; $display("interval before vec %0d: %0d", v, out_cyc[v] - out_cyc[v-1]);
      end
    end
    checks += 3;
    if (sat_vecs == 0 || sat_pulses == 0) begin failures++; $display("saturation: ref %0d pulses %0d", sat_vecs, sat_pulses); end
    if (sat_pulses > sat_vecs * NL) begin failures++; $display("too many saturation pulses %0d", sat_pulses); end
    if (clips == 0) begin failures++; $display("no ReLU zeroing exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
