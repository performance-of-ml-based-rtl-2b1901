// Testbench for baler_model_ip in the three model sizes that were run on
// the board, each checked end to end through its DMA streams by ip_harness:
//   tiny encoder     20 -> 32 -> 16 -> 8 -> 5,   reuse 1
//   tiny decoder     5 -> 8 -> 16 -> 32 -> 20,   reuse 1
//   reduced encoder  20 -> 100 -> 50 -> 5,        reuse 7
//   reduced decoder  5 -> 50 -> 100 -> 20,        reuse 7
// The large model is run by the top-level testbench.
module tb_baler_model_ip;
  localparam int W = 19, I = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  localparam int unsigned TE_DIMS [5] = '{20, 32, 16, 8, 5};
  localparam int unsigned TD_DIMS [5] = '{5, 8, 16, 32, 20};
  localparam int unsigned RE_DIMS [4] = '{20, 100, 50, 5};
  localparam int unsigned RD_DIMS [4] = '{5, 50, 100, 20};

  logic [3:0] done;
  int chk [4];
  int fail [4];

  `define IP_UNDER_TEST(IDX, NL, DIMSV, RF, LABEL) \
    logic [31:0] s_td_``IDX, m_td_``IDX; \
    logic s_tv_``IDX, s_tr_``IDX, s_tl_``IDX, m_tv_``IDX, m_tr_``IDX, m_tl_``IDX; \
    logic c_we_``IDX, sat_``IDX; \
    logic [2:0] c_l_``IDX; \
    logic [15:0] c_a_``IDX; \
    logic [W-1:0] c_d_``IDX; \
    baler_model_ip #(.N_LAYERS(NL), .DIMS(DIMSV), .REUSE(RF), .W(W), .I(I)) dut_``IDX ( \
      .clk(clk), .rst_n(rst_n), \
      .s_axis_tdata(s_td_``IDX), .s_axis_tvalid(s_tv_``IDX), .s_axis_tready(s_tr_``IDX), .s_axis_tlast(s_tl_``IDX), \
      .m_axis_tdata(m_td_``IDX), .m_axis_tvalid(m_tv_``IDX), .m_axis_tready(m_tr_``IDX), .m_axis_tlast(m_tl_``IDX), \
      .cfg_we(c_we_``IDX), .cfg_layer(c_l_``IDX), .cfg_addr(c_a_``IDX), .cfg_data(c_d_``IDX), .sat_o(sat_``IDX)); \
    ip_harness #(.N_LAYERS(NL), .DIMS(DIMSV), .REUSE(RF), .W(W), .I(I), .NV(24), .NAME(LABEL)) h_``IDX ( \
      .clk(clk), .rst_n(rst_n), \
      .s_axis_tdata(s_td_``IDX), .s_axis_tvalid(s_tv_``IDX), .s_axis_tready(s_tr_``IDX), .s_axis_tlast(s_tl_``IDX), \
      .m_axis_tdata(m_td_``IDX), .m_axis_tvalid(m_tv_``IDX), .m_axis_tready(m_tr_``IDX), .m_axis_tlast(m_tl_``IDX), \
      .cfg_we(c_we_``IDX), .cfg_layer(c_l_``IDX), .cfg_addr(c_a_``IDX), .cfg_data(c_d_``IDX), .sat_i(sat_``IDX), \
      .done(done[IDX]), .checks(chk[IDX]), .failures(fail[IDX]));

  `IP_UNDER_TEST(0, 4, TE_DIMS, 1, "tiny encoder")
  `IP_UNDER_TEST(1, 4, TD_DIMS, 1, "tiny decoder")
  `IP_UNDER_TEST(2, 3, RE_DIMS, 7, "reduced encoder")
  `IP_UNDER_TEST(3, 3, RD_DIMS, 7, "reduced decoder")

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
