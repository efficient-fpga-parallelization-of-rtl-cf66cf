// tb_lip_range_eval: range and precision evaluation of the number format.
// 10^5 random (query, data point) pairs with every value scaled to [0,1]
// are applied to an ECAU, and its ceiling and floor, paired with those of a
// second random point, to the output ALU. Every internal signal (the
// component differences, the distance, ceilings, floors and the output) is
// tracked; all must stay inside [-1, 2], the range the format is sized for,
// and every result must match integer arithmetic exactly.
module tb_lip_range_eval;
  import tb_lip_ref_pkg::*;

  localparam int W = 16, NW = 3, NY = 1, ONE = 4096, NS = 100000;
  logic clk = 0, rst_n = 0, ld = 0;
  logic [NW-1:0][W-1:0] q, w, w2;
  logic [NY-1:0][W-1:0] f, f2, u, l, u2, l2, f_out, mu, ml;
  logic [W-1:0] d, d2;
  int checks = 0, failures = 0;
  int lo = 0, hi = 0;

  lip_ecau #(.W(W), .NW(NW), .NY(NY)) e1 (.q, .w, .f, .u, .l, .d);
  lip_ecau #(.W(W), .NW(NW), .NY(NY)) e2 (.q, .w(w2), .f(f2), .u(u2), .l(l2), .d(d2));
  lip_minmax #(.W(W), .NY(NY)) c (.a_u(u), .a_l(l), .b_u(u2), .b_l(l2), .y_u(mu), .y_l(ml));
  lip_output_alu #(.W(W), .NY(NY)) a (.clk, .rst_n, .ld, .min_u(mu), .max_l(ml), .f_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NS * 2 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic track(input int v);
    if (v < lo) lo = v;
    if (v > hi) hi = v;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      int dd1, dd2, t, eu, el, ef;
      dd1 = 0; dd2 = 0;
      for (int k = 0; k < NW; k++) begin
        q[k]  = W'($urandom_range(0, ONE));
        w[k]  = W'($urandom_range(0, ONE));
        w2[k] = W'($urandom_range(0, ONE));
        t = sext(q[k], W) - sext(w[k], W);  track(t); if (t < 0) t = -t; if (t > dd1) dd1 = t;
        t = sext(q[k], W) - sext(w2[k], W); track(t); if (t < 0) t = -t; if (t > dd2) dd2 = t;
      end
      f[0] = W'($urandom_range(0, ONE)); f2[0] = W'($urandom_range(0, ONE));
      ld = 1;
      @(negedge clk);
      ld = 0;
      eu = (sext(f[0], W) + dd1 < sext(f2[0], W) + dd2) ? sext(f[0], W) + dd1 : sext(f2[0], W) + dd2;
      el = (sext(f[0], W) - dd1 > sext(f2[0], W) - dd2) ? sext(f[0], W) - dd1 : sext(f2[0], W) - dd2;
      ef = (eu + el) >>> 1;
      track(sext(d, W)); track(sext(u[0], W)); track(sext(l[0], W)); track(sext(f_out[0], W));
      checks++;
      if (sext(f_out[0], W) != ef) begin
        failures++;
        if (failures < 10) $display("sample %0d: got %0d want %0d", n, sext(f_out[0], W), ef);
      end
    end
    checks++;
    if (lo < -ONE || hi > 2 * ONE) begin
      failures++;
      $display("signal range [%f, %f] leaves [-1, 2]", lo / 4096.0, hi / 4096.0);
    end
    $display("observed signal range [%f, %f] over %0d samples", lo / 4096.0, hi / 4096.0, NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
