// Testbench for axis_to_vec: 4-value vectors from a stream with random gaps
// and random consumer stalls, then back to back. Checks every element, the
// last flag (tlast on a vector's final word and, once, on a middle word),
// that tready drops while a full vector waits, and that back-to-back
// vectors arrive with no bubble (one vector per N cycles).
module tb_axis_to_vec;
  import baler_ref_pkg::*;
  localparam int N = 4, W = 19, NV = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0]         s_axis_tdata = '0;
  logic                s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  logic                out_valid, out_ready = 0, out_last;
  logic [N-1:0][W-1:0] out_data;

  axis_to_vec #(.N(N), .W(W), .TDATA_W(32)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int vals [NV][N];
  bit lastw [NV][N];
  int vin = 0, win = 0, vout = 0;
  bit taken = 0, running = 0;
  int t_out [NV];
  int stalls = 0;

  initial begin
    for (int v = 0; v < NV; v++)
      for (int j = 0; j < N; j++) begin
        vals[v][j]  = $urandom_range(0, (1 << W) - 1) - (1 << (W - 1));
        lastw[v][j] = (j == N - 1 && v % 7 == 6) || (v == 10 && j == 1);
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    running = 1;
  end

  always @(negedge clk) if (running) begin
    bit phase_a;
    phase_a = vin < NV / 2;
    if (!s_axis_tvalid || taken) begin
      if (vin < NV && (!phase_a || $urandom_range(0, 2) != 0)) begin
        s_axis_tvalid = 1;
        // upper bits of the word carry junk; only the low W bits count
        s_axis_tdata  = {13'($urandom), W'(vals[vin][win])};
        s_axis_tlast  = lastw[vin][win];
      end else s_axis_tvalid = 0;
    end
    out_ready = (vout >= NV / 2) || ($urandom_range(0, 2) == 0);
    #1;
    if (s_axis_tvalid && !s_axis_tready) stalls++;
    taken = s_axis_tvalid && s_axis_tready;
    if (taken) begin
      if (win == N - 1) begin win = 0; vin++; end else win++;
    end
    if (out_valid && out_ready) begin
      bit el;
      el = 0;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (sext(out_data[j], W) != vals[vout][j]) begin
          failures++; $display("vec %0d elem %0d: got %0d exp %0d", vout, j, sext(out_data[j], W), vals[vout][j]);
        end
        el |= lastw[vout][j];
      end
      checks++;
      if (out_last != el) begin failures++; $display("vec %0d: last %0b exp %0b", vout, out_last, el); end
      t_out[vout] = cyc;
      vout++;
    end
  end

  initial begin
    wait (vout == NV);
    checks++;
    if (stalls == 0) begin failures++; $display("tready never dropped"); end
    for (int v = NV - 8; v < NV; v++) begin
      checks++;
      if (t_out[v] - t_out[v-1] != N) begin
        failures++; $display("interval before vec %0d: %0d", v, t_out[v] - t_out[v-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
