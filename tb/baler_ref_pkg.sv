// Reference model of the accelerator's arithmetic, for the testbenches.
//
// Written independently of the RTL, in plain integer arithmetic: a value is
// an int holding the <W,I> word as a signed integer (real value = v / 2^F).
// A dense layer sums w*x over its inputs plus b*2^F at full precision,
// divides by 2^F rounding toward minus infinity, clamps to W bits and,
// for hidden layers, clips negatives to zero.
package baler_ref_pkg;

  // Requantise one sum; counts a clamp in nsat and a ReLU zeroing in nclip.
  function automatic int requant(longint acc, int W, int F, bit relu,
                                 inout int nsat, inout int nclip);
    longint s, mx, mn;
    s  = acc >>> F;
    mx = (longint'(1) <<< (W - 1)) - 1;
    mn = -(longint'(1) <<< (W - 1));
    if (s > mx) begin s = mx; nsat++; end
    else if (s < mn) begin s = mn; nsat++; end
    if (relu && s < 0) begin s = 0; nclip++; end
    return int'(s);
  endfunction

  // y[o] = act(sum_i w[o*n_in+i]*x[i] + b[o]*2^F)
  function automatic void dense(int n_in, int n_out, input int w[], input int b[],
                                input int x[], bit relu, int W, int F,
                                output int y[], inout int nsat, inout int nclip);
    y = new[n_out];
    for (int o = 0; o < n_out; o++) begin
      longint acc = longint'(b[o]) <<< F;
      for (int i = 0; i < n_in; i++)
        acc += longint'(w[o * n_in + i]) * longint'(x[i]);
      y[o] = requant(acc, W, F, relu, nsat, nclip);
    end
  endfunction

  // Sign-extend the low W bits of v.
  function automatic int sext(longint v, int W);
    longint m = (longint'(1) <<< W) - 1;
    longint u = v & m;
    if (u[W-1]) u = u - (longint'(1) <<< W);
    return int'(u);
  endfunction

  // Integer square root, for scaling random weights.
  function automatic int isqrt(int n);
    int r = 1;
    while ((r + 1) * (r + 1) <= n) r++;
    return r;
  endfunction

endpackage
