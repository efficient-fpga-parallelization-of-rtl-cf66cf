// tb_lip_ref_pkg: reference model of Lipschitz interpolation for the
// testbenches.
//
// Evaluates the estimate straight from its definition, one data point after
// another, in plain integer arithmetic with no width limits:
//   d_i = max_k |q_k - w_ik|,  result_j = (min_i (f_ij + d_i) + max_i (f_ij - d_i)) >>> 1
// Values are fixed-point integers (1.0 = 2^12 in the default format). The
// data set is passed flat: w[i*nw + k] and f[i*ny + j].
package tb_lip_ref_pkg;

  function automatic int lip_ref(input int q[], input int w[], input int f[],
                                 input int npts, input int nw, input int ny, input int j);
    int best_u, best_l, d, t;
    best_u = 32'h7fffffff;
    best_l = 32'h80000000;
    for (int i = 0; i < npts; i++) begin
      d = 0;
      for (int k = 0; k < nw; k++) begin
        t = q[k] - w[i*nw + k];
        if (t < 0) t = -t;
        if (t > d) d = t;
      end
      if (f[i*ny + j] + d < best_u) best_u = f[i*ny + j] + d;
      if (f[i*ny + j] - d > best_l) best_l = f[i*ny + j] - d;
    end
    return (best_u + best_l) >>> 1;
  endfunction

  // Signed value of a W-bit word held in the low bits of v.
  function automatic int sext(input longint unsigned v, input int w);
    longint unsigned m;
    m = 64'(1) << (w - 1);
    v = v & ((64'(1) << w) - 1);
    return int'(longint'(v ^ m) - longint'(m));
  endfunction

endpackage
