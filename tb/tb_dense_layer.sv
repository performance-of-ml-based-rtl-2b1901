// Testbench for dense_layer: a 5-input, 7-output layer with reuse factor 4
// (9 multipliers, one idle slot in the last step) and ReLU. Loads random
// weights, streams vectors with random input gaps and output back-pressure,
// then back to back, and compares every output with the integer reference.
// Also checks the latency (REUSE edges from accept to result), the rate
// (one vector per REUSE cycles), the last flag and the saturation flag.
module tb_dense_layer;
  import baler_ref_pkg::*;
  localparam int N_IN = 5, N_OUT = 7, R = 4, W = 19, I = 10, F = W - I;
  localparam int NV = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                   in_valid = 0, in_ready, in_last = 0;
  logic [N_IN-1:0][W-1:0] in_data = '0;
  logic                   out_valid, out_ready = 0, out_last, out_sat;
  logic [N_OUT-1:0][W-1:0] out_data;
  logic                   cfg_we = 0;
  logic [15:0]            cfg_addr = '0;
  logic [W-1:0]           cfg_data = '0;

  dense_layer #(.N_IN(N_IN), .N_OUT(N_OUT), .REUSE(R), .W(W), .I(I), .RELU(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int w [], b [];
  int xin [NV][N_IN];
  int yexp [NV][N_OUT];
  bit sexp [NV];
  int nsat_tot = 0;

  int sent = 0, got = 0;
  int acc_cyc [NV];
  int out_cyc [NV];
  bit running = 0;
  bit in_taken = 0;

  initial begin
    w = new[N_IN * N_OUT];
    b = new[N_OUT];
    foreach (w[k]) w[k] = $urandom_range(0, 2047) - 1024;
    foreach (b[k]) b[k] = $urandom_range(0, 1023) - 512;
    for (int v = 0; v < NV; v++) begin
      int x [], y [];
      int ns, nc;
      ns = 0; nc = 0;
      x = new[N_IN];
      for (int i = 0; i < N_IN; i++) begin
        // vector 3 uses extreme inputs so that some outputs saturate
        x[i] = (v == 3) ? ((i % 2) ? 262143 : -262144) : $urandom_range(0, 4095) - 2048;
        xin[v][i] = x[i];
      end
      dense(N_IN, N_OUT, w, b, x, 1'b1, W, F, y, ns, nc);
      for (int o = 0; o < N_OUT; o++) yexp[v][o] = y[o];
      sexp[v] = (ns != 0);
      nsat_tot += (ns != 0);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load weights and biases, one word per cycle
    for (int k = 0; k < N_IN * N_OUT + N_OUT; k++) begin
      @(negedge clk);
      cfg_we   = 1;
      cfg_addr = 16'(k);
      cfg_data = W'((k < N_IN * N_OUT) ? w[k] : b[k - N_IN * N_OUT]);
    end
    @(negedge clk);
    cfg_we = 0;
    running = 1;
  end

  // driver and monitor, both acting at the falling edge
  always @(negedge clk) if (running) begin
    bit phase_a;
    // input side
    phase_a = (sent < NV / 2);
    if (!in_valid || in_taken) begin
      if (sent < NV && (!phase_a || sent == 0 || $urandom_range(0, 2) != 0)) begin
        in_valid = 1;
        for (int i = 0; i < N_IN; i++) in_data[i] = W'(xin[sent][i]);
        in_last = (sent % 5 == 4);
      end else begin
        in_valid = 0;
      end
    end
    out_ready = (got >= NV / 2) || (got == 0) || ($urandom_range(0, 2) != 0);
    #1;
    in_taken = in_valid && in_ready;
    if (in_taken) begin
      acc_cyc[sent] = cyc;
      sent++;
    end
    if (out_valid && out_ready) begin
      out_cyc[got] = cyc;
      for (int o = 0; o < N_OUT; o++) begin
        checks++;
        if (sext(out_data[o], W) != yexp[got][o]) begin
          failures++;
          $display("vec %0d out %0d: got %0d exp %0d", got, o, sext(out_data[o], W), yexp[got][o]);
        end
      end
      checks += 2;
      if (out_last != (got % 5 == 4)) begin failures++; $display("vec %0d: last flag wrong", got); end
      if (out_sat != sexp[got]) begin failures++; $display("vec %0d: sat flag %0b exp %0b", got, out_sat, sexp[got]); end
      got++;
    end
  end

  initial begin
    wait (got == NV);
    @(negedge clk);
    // latency of the first vector: result valid REUSE edges after accept,
    // taken at the next edge
    checks++;
    if (out_cyc[0] - acc_cyc[0] != R + 1) begin
      failures++; $display("latency %0d, expected %0d", out_cyc[0] - acc_cyc[0], R + 1);
    end
    // rate once both sides run freely
    for (int v = NV - 10; v < NV; v++) begin
      checks++;
      if (out_cyc[v] - out_cyc[v - 1] != R) begin
        failures++; $display("interval before vec %0d is %0d, expected %0d", v, out_cyc[v] - out_cyc[v - 1], R);
      end
    end
    checks++;
    if (nsat_tot == 0) begin failures++; $display("no saturation was exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
