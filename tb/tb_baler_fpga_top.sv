// End-to-end testbench for baler_fpga_top at its default (full) size: the
// large model's encoder (20 -> 200 -> 100 -> 50 -> 5) and decoder
// (5 -> 50 -> 100 -> 200 -> 20), reuse factor 22, <19,10> numbers.
// One ip_harness per half loads all 29,355 weight and bias words of that
// half, streams 24 vectors through it and checks every output word, the
// tlast placement, the latency (4*23+2 cycles), the rate (one vector per
// 22 cycles) and the saturation flag. It also requires each mechanism of
// the design to happen at least once: input stall, output back-pressure,
// input gaps, tlast, ReLU zeroing and saturation. The two halves run at
// the same time, as they are independent.
module tb_baler_fpga_top;
  localparam int W = 19, I = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  logic [31:0] e_std, e_mtd, d_std, d_mtd;
  logic e_stv, e_str, e_stl, e_mtv, e_mtr, e_mtl;
  logic d_stv, d_str, d_stl, d_mtv, d_mtr, d_mtl;
  logic e_we, d_we, e_sat, d_sat;
  logic [2:0] e_l, d_l;
  logic [15:0] e_a, d_a;
  logic [W-1:0] e_d, d_d;

  baler_fpga_top dut (
    .clk(clk), .rst_n(rst_n),
    .enc_s_axis_tdata(e_std), .enc_s_axis_tvalid(e_stv), .enc_s_axis_tready(e_str), .enc_s_axis_tlast(e_stl),
    .enc_m_axis_tdata(e_mtd), .enc_m_axis_tvalid(e_mtv), .enc_m_axis_tready(e_mtr), .enc_m_axis_tlast(e_mtl),
    .enc_cfg_we(e_we), .enc_cfg_layer(e_l), .enc_cfg_addr(e_a), .enc_cfg_data(e_d), .enc_sat_o(e_sat),
    .dec_s_axis_tdata(d_std), .dec_s_axis_tvalid(d_stv), .dec_s_axis_tready(d_str), .dec_s_axis_tlast(d_stl),
    .dec_m_axis_tdata(d_mtd), .dec_m_axis_tvalid(d_mtv), .dec_m_axis_tready(d_mtr), .dec_m_axis_tlast(d_mtl),
    .dec_cfg_we(d_we), .dec_cfg_layer(d_l), .dec_cfg_addr(d_a), .dec_cfg_data(d_d), .dec_sat_o(d_sat)
  );

  localparam int unsigned ENC_DIMS [5] = '{20, 200, 100, 50, 5};
  localparam int unsigned DEC_DIMS [5] = '{5, 50, 100, 200, 20};

  logic e_done, d_done;
  int e_chk, e_fail, d_chk, d_fail;

  ip_harness #(.N_LAYERS(4), .DIMS(ENC_DIMS), .REUSE(22), .W(W), .I(I), .NV(24), .NAME("encoder")) h_enc (
    .clk(clk), .rst_n(rst_n),
    .s_axis_tdata(e_std), .s_axis_tvalid(e_stv), .s_axis_tready(e_str), .s_axis_tlast(e_stl),
    .m_axis_tdata(e_mtd), .m_axis_tvalid(e_mtv), .m_axis_tready(e_mtr), .m_axis_tlast(e_mtl),
    .cfg_we(e_we), .cfg_layer(e_l), .cfg_addr(e_a), .cfg_data(e_d), .sat_i(e_sat),
    .done(e_done), .checks(e_chk), .failures(e_fail));

  ip_harness #(.N_LAYERS(4), .DIMS(DEC_DIMS), .REUSE(22), .W(W), .I(I), .NV(24), .NAME("decoder")) h_dec (
    .clk(clk), .rst_n(rst_n),
    .s_axis_tdata(d_std), .s_axis_tvalid(d_stv), .s_axis_tready(d_str), .s_axis_tlast(d_stl),
    .m_axis_tdata(d_mtd), .m_axis_tvalid(d_mtv), .m_axis_tready(d_mtr), .m_axis_tlast(d_mtl),
    .cfg_we(d_we), .cfg_layer(d_l), .cfg_addr(d_a), .cfg_data(d_d), .sat_i(d_sat),
    .done(d_done), .checks(d_chk), .failures(d_fail));

  initial begin
    wait (rst_n);
    wait (e_done && d_done);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", e_chk + d_chk, e_fail + d_fail);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", e_chk + d_chk, e_fail + d_fail + 1);
    $finish;
  end
endmodule
