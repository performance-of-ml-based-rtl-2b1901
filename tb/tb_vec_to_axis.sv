// Testbench for vec_to_axis: 3-value vectors sent as words under random
// back-pressure, then freely. Checks every word (sign-extended to 32 bits),
// tlast only on the final word of vectors marked last, that the producer
// is held while the stream is busy, and that vectors leave back to back
// (one word per cycle, no bubble) when both sides are free.
module tb_vec_to_axis;
  localparam int N = 3, W = 19, NV = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                in_valid = 0, in_ready, in_last = 0;
  logic [N-1:0][W-1:0] in_data = '0;
  logic [31:0]         m_axis_tdata;
  logic                m_axis_tvalid, m_axis_tready = 0, m_axis_tlast;

  vec_to_axis #(.N(N), .W(W), .TDATA_W(32)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int vals [NV][N];
  bit lastv [NV];
  int vin = 0, vout = 0, wout = 0;
  bit taken = 0, running = 0;
  int t_w [NV * N];
  int held = 0;

  initial begin
    for (int v = 0; v < NV; v++) begin
      for (int j = 0; j < N; j++) vals[v][j] = $urandom_range(0, (1 << W) - 1) - (1 << (W - 1));
      lastv[v] = (v % 5 == 4);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    running = 1;
  end

  always @(negedge clk) if (running) begin
    if (!in_valid || taken) begin
      if (vin < NV && (vin >= NV / 2 || $urandom_range(0, 2) != 0)) begin
        in_valid = 1;
        for (int j = 0; j < N; j++) in_data[j] = W'(vals[vin][j]);
        in_last = lastv[vin];
      end else in_valid = 0;
    end
    m_axis_tready = (vout >= NV / 2) || ($urandom_range(0, 2) != 0);
    #1;
    if (in_valid && !in_ready) held++;
    taken = in_valid && in_ready;
    if (taken) vin++;
    if (m_axis_tvalid && m_axis_tready) begin
      checks += 2;
      if (m_axis_tdata != 32'(vals[vout][wout])) begin
        failures++; $display("vec %0d word %0d: got %0h exp %0h", vout, wout, m_axis_tdata, 32'(vals[vout][wout]));
      end
      if (m_axis_tlast != (lastv[vout] && wout == N - 1)) begin
        failures++; $display("vec %0d word %0d: tlast wrong", vout, wout);
      end
      t_w[vout * N + wout] = cyc;
      if (wout == N - 1) begin wout = 0; vout++; end else wout++;
    end
  end

  initial begin
    wait (vout == NV);
    checks++;
    if (held == 0) begin failures++; $display("producer was never held"); end
    for (int k = NV * N - 12; k < NV * N; k++) begin
      checks++;
      if (t_w[k] - t_w[k-1] != 1) begin failures++; $display("gap before word %0d", k); end
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
