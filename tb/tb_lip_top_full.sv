// tb_lip_top_full: the interpolation engine at its default size: K = 256
// lanes, 55 batches, 3 inputs, 1 output, 16-bit words with 12 fractional
// bits, i.e. the self-balancing-robot controller configuration.
//
// A synthetic data set of 14000 points stands in for the recorded controller
// data: inputs uniform in [0,1], outputs uniform in [0, 1/L] with L = 4.67
// (the outputs are stored pre-divided by L). The 80 unused slots of the
// 256 x 55 = 14080-entry store are padded with copies of point 0. 2500 random
// queries are then run. Each result is checked two ways:
//   * bit-exactly against the interpolation formula evaluated in integers on
//     the quantised data;
//   * against the formula evaluated in real arithmetic on the unquantised
//     data: the difference must stay within 3*2^-13 for the quantisation of
//     operands plus 2^-13 for the halving shift.
// The latency, DEPTH+2 = 57 clock edges, is checked for every query.
module tb_lip_top_full;
  import tb_lip_ref_pkg::*;

  localparam int W = 16, NW = 3, NY = 1, K = 256, DEPTH = 55, FB = 12;
  localparam int AW = 6, BW = 8, RW = (NY + NW) * W, CAP = K * DEPTH;
  localparam int NPTS = 14000, NQ = 2500;
  localparam real ONE = 4096.0, LIP = 4.67;
  localparam real A = 1.0 / 8192.0;          // 2^-(FB+1)

  logic clk = 0, rst_n = 0, start = 0, ld_we = 0;
  logic [NW-1:0][W-1:0] q = '0;
  logic busy, valid;
  logic [NY-1:0][W-1:0] f_out;
  logic [BW-1:0] ld_bank = '0;
  logic [AW-1:0] ld_addr = '0;
  logic [RW-1:0] ld_data = '0;

  int checks = 0, failures = 0;
  int dw[], df[], qv[];
  real rw[], rf[], rq[];
  real max_err = 0.0;
  int over_3a = 0;

  lip_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string tag, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d want %0d", $time, tag, got, want);
    end
  endtask

  function automatic int quant(input real x);
    return int'($floor(x * ONE + 0.5));
  endfunction

  function automatic real real_ref(input real x[], input real pw[], input real pf[]);
    real bu, bl, d, t;
    bu = 1.0e9; bl = -1.0e9;
    for (int i = 0; i < NPTS; i++) begin
      d = 0.0;
      for (int k = 0; k < NW; k++) begin
        t = x[k] - pw[i*NW + k];
        if (t < 0.0) t = -t;
        if (t > d) d = t;
      end
      if (pf[i] + d < bu) bu = pf[i] + d;
      if (pf[i] - d > bl) bl = pf[i] - d;
    end
    return 0.5 * (bu + bl);
  endfunction

  initial begin
    int s, src, lat, hw, sw;
    real err, rv;
    logic [RW-1:0] row;

    rw = new[NPTS * NW]; rf = new[NPTS];
    dw = new[NPTS * NW]; df = new[NPTS];
    foreach (rw[i]) begin rw[i] = $urandom_range(0, 1000000) / 1000000.0; dw[i] = quant(rw[i]); end
    foreach (rf[i]) begin rf[i] = $urandom_range(0, 1000000) / 1000000.0 / LIP; df[i] = quant(rf[i]); end

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (s = 0; s < CAP; s++) begin
      src = (s < NPTS) ? s : 0;
      row[RW-1 -: W] = W'(df[src]);
      for (int k = 0; k < NW; k++) row[(NW-1-k)*W +: W] = W'(dw[src*NW + k]);
      ld_we = 1; ld_bank = BW'(s % K); ld_addr = AW'(s / K); ld_data = row;
      @(negedge clk);
    end
    ld_we = 0;

    qv = new[NW]; rq = new[NW];
    for (int n = 0; n < NQ; n++) begin
      foreach (rq[k]) begin
        rq[k] = $urandom_range(0, 1000000) / 1000000.0;
        qv[k] = quant(rq[k]);
        q[k]  = W'(qv[k]);
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 0;
      while (!valid && lat < 200) begin
        @(negedge clk);
        lat++;
      end
      check("latency", lat, DEPTH + 2);
      hw = sext(f_out[0], W);
      sw = lip_ref(qv, dw, df, NPTS, NW, NY, 0);
      check($sformatf("query %0d", n), hw, sw);
      rv  = real_ref(rq, rw, rf);
      err = hw / ONE - rv;
      if (err < 0.0) err = -err;
      if (err > max_err) max_err = err;
      if (err > 3.0 * A) over_3a++;
      checks++;
      if (err > 4.0 * A) begin
        failures++;
        $display("query %0d: error %g above bound", n, err);
      end
    end
    $display("queries=%0d points=%0d batches/query=%0d max |fixed - real| = %g (3*2^-13 = %g, above it: %0d)",
             NQ, NPTS, DEPTH, max_err, 3.0 * A, over_3a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
