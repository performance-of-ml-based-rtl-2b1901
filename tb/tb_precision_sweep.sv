// Precision sweep: the tiny encoder (20 -> 32 -> 16 -> 8 -> 5, reuse 1)
// built with the other 19-bit formats that were tried on the board,
// <19,1>, <19,5>, <19,14> and <19,19> (integer bits from 1 to all 19).
// <19,10> itself is covered by the other testbenches. Each instance is
// checked bit-exactly through its streams by ip_harness, including its rate
// and latency, which must not depend on the format.
module tb_precision_sweep;
  localparam int W = 19;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  localparam int unsigned TE_DIMS [5] = '{20, 32, 16, 8, 5};

  logic [3:0] done;
  int chk [4];
  int fail [4];

  for (genvar g = 0; g < 4; g++) begin : g_fmt
    localparam int unsigned IBITS = (g == 0) ? 1 : (g == 1) ? 5 : (g == 2) ? 14 : 19;
    logic [31:0] s_td, m_td;
    logic s_tv, s_tr, s_tl, m_tv, m_tr, m_tl, c_we, sat;
    logic [2:0] c_l;
    logic [15:0] c_a;
    logic [W-1:0] c_d;
    baler_model_ip #(.N_LAYERS(4), .DIMS(TE_DIMS), .REUSE(1), .W(W), .I(IBITS)) dut (
      .clk(clk), .rst_n(rst_n),
      .s_axis_tdata(s_td), .s_axis_tvalid(s_tv), .s_axis_tready(s_tr), .s_axis_tlast(s_tl),
      .m_axis_tdata(m_td), .m_axis_tvalid(m_tv), .m_axis_tready(m_tr), .m_axis_tlast(m_tl),
      .cfg_we(c_we), .cfg_layer(c_l), .cfg_addr(c_a), .cfg_data(c_d), .sat_o(sat));
    ip_harness #(.N_LAYERS(4), .DIMS(TE_DIMS), .REUSE(1), .W(W), .I(IBITS), .NV(24),
                 .NAME($sformatf("tiny encoder <19,%0d>", IBITS))) h (
      .clk(clk), .rst_n(rst_n),
      .s_axis_tdata(s_td), .s_axis_tvalid(s_tv), .s_axis_tready(s_tr), .s_axis_tlast(s_tl),
      .m_axis_tdata(m_td), .m_axis_tvalid(m_tv), .m_axis_tready(m_tr), .m_axis_tlast(m_tl),
      .cfg_we(c_we), .cfg_layer(c_l), .cfg_addr(c_a), .cfg_data(c_d), .sat_i(sat),
      .done(done[g]), .checks(chk[g]), .failures(fail[g]));
  end

  initial begin
    wait (rst_n);
    wait (&done);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3],
             fail[0] + fail[1] + fail[2] + fail[3]);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3],
             fail[0] + fail[1] + fail[2] + fail[3] + 1);
    $finish;
  end
endmodule
