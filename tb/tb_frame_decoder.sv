// Frame workload for the large-model decoder (5 -> 50 -> 100 -> 200 -> 20, reuse 22,
// <19,10>): one whole detector frame, 180,000 vectors, streamed through
// baler_model_ip at its default size and checked word by word by
// ip_harness, the frame being sent as two DMA transfers; the first 400
// vectors meet random gaps and back-pressure, the rest run freely. At one vector per
// 22 cycles the frame needs 3.96 M cycles of compute, 11.9 ms at a 3 ns
// clock. Takes a few minutes of simulation.
module tb_frame_decoder;
  localparam int W = 19, I = 10, NV = 180000;
  localparam int unsigned DIMS [5] = '{5, 50, 100, 200, 20};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  logic [31:0] s_td, m_td;
  logic s_tv, s_tr, s_tl, m_tv, m_tr, m_tl, c_we, sat, done;
  logic [2:0] c_l;
  logic [15:0] c_a;
  logic [W-1:0] c_d;
  int chk, fail;

  baler_model_ip #(.N_LAYERS(4), .DIMS(DIMS), .REUSE(22), .W(W), .I(I)) dut (
    .clk(clk), .rst_n(rst_n),
    .s_axis_tdata(s_td), .s_axis_tvalid(s_tv), .s_axis_tready(s_tr), .s_axis_tlast(s_tl),
    .m_axis_tdata(m_td), .m_axis_tvalid(m_tv), .m_axis_tready(m_tr), .m_axis_tlast(m_tl),
    .cfg_we(c_we), .cfg_layer(c_l), .cfg_addr(c_a), .cfg_data(c_d), .sat_o(sat));

  ip_harness #(.N_LAYERS(4), .DIMS(DIMS), .REUSE(22), .W(W), .I(I), .NV(NV), .THROTTLE(400), .NAME("frame decoder")) h (
    .clk(clk), .rst_n(rst_n),
    .s_axis_tdata(s_td), .s_axis_tvalid(s_tv), .s_axis_tready(s_tr), .s_axis_tlast(s_tl),
    .m_axis_tdata(m_td), .m_axis_tvalid(m_tv), .m_axis_tready(m_tr), .m_axis_tlast(m_tl),
    .cfg_we(c_we), .cfg_layer(c_l), .cfg_addr(c_a), .cfg_data(c_d), .sat_i(sat),
    .done(done), .checks(chk), .failures(fail));

  initial begin
    wait (rst_n);
    wait (done);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", chk, fail);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk, fail + 1);
    $finish;
  end
endmodule
