// Testbench for act_quant: random and boundary accumulator values, with and
// without ReLU, against the integer reference model.
module tb_act_quant;
  import baler_ref_pkg::*;
  localparam int ACC_W = 48, W = 19, I = 10, F = W - I;

  logic signed [ACC_W-1:0] acc;
  logic signed [W-1:0]     y_r, y_l;
  logic                    sat_r, sat_l;
  int checks = 0, failures = 0;

  act_quant #(.ACC_W(ACC_W), .W(W), .I(I), .RELU(1'b1)) u_relu (.acc_i(acc), .y_o(y_r), .sat_o(sat_r));
  act_quant #(.ACC_W(ACC_W), .W(W), .I(I), .RELU(1'b0)) u_lin  (.acc_i(acc), .y_o(y_l), .sat_o(sat_l));

  task automatic check_one(longint a);
    int ns_r = 0, nc = 0, ns_l = 0, e_r, e_l;
    acc = ACC_W'(a);
    #1;
    e_r = requant(a, W, F, 1'b1, ns_r, nc);
    e_l = requant(a, W, F, 1'b0, ns_l, nc);
    checks += 4;
    if (int'(y_r) != e_r) begin failures++; $display("relu: acc=%0d got %0d exp %0d", a, y_r, e_r); end
    if (int'(y_l) != e_l) begin failures++; $display("lin: acc=%0d got %0d exp %0d", a, y_l, e_l); end
    if (sat_r != (ns_r != 0)) begin failures++; $display("sat relu: acc=%0d", a); end
    if (sat_l != (ns_l != 0)) begin failures++; $display("sat lin: acc=%0d", a); end
  endtask

  initial begin
    static longint edge_vals [12] = '{0, 1, -1, 511, 512, -512, -513,
                               (longint'(1) <<< 27) - 1, longint'(1) <<< 27,
                               -(longint'(1) <<< 27), -(longint'(1) <<< 27) - 1,
                               longint'(123456) <<< 9};
    foreach (edge_vals[k]) check_one(edge_vals[k]);
    for (int k = 0; k < 2000; k++) begin
      automatic longint a;
      a = longint'({$urandom, $urandom});
      a = a >>> ($urandom_range(17, 40));   // spread over in-range and out-of-range sizes
      check_one(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
