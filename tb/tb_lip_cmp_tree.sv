// tb_lip_cmp_tree: checks the comparator tree at three sizes: 13 leaves (not
// a power of two, so padded), 8 leaves (full) and 1 leaf (no comparators),
// two output components each. Inputs are random signed words including the
// extreme values; the expected minimum and maximum are found by a linear scan.
module tb_lip_cmp_tree;
  import tb_lip_ref_pkg::*;

  localparam int W = 16, NY = 2;
  localparam int NA = 13, NB = 8, NC = 1;

  logic [NA-1:0][NY-1:0][W-1:0] a_u, a_l;
  logic [NB-1:0][NY-1:0][W-1:0] b_u, b_l;
  logic [NC-1:0][NY-1:0][W-1:0] c_u, c_l;
  logic [NY-1:0][W-1:0] a_mu, a_ml, b_mu, b_ml, c_mu, c_ml;
  int checks = 0, failures = 0;

  lip_cmp_tree #(.W(W), .NY(NY), .N(NA)) dut_a (.in_u(a_u), .in_l(a_l), .min_u(a_mu), .max_l(a_ml));
  lip_cmp_tree #(.W(W), .NY(NY), .N(NB)) dut_b (.in_u(b_u), .in_l(b_l), .min_u(b_mu), .max_l(b_ml));
  lip_cmp_tree #(.W(W), .NY(NY), .N(NC)) dut_c (.in_u(c_u), .in_l(c_l), .min_u(c_mu), .max_l(c_ml));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] pick();
    case ($urandom_range(0, 15))
      0: return 16'h7fff;
      1: return 16'h8000;
      default: return W'($urandom);
    endcase
  endfunction

  task automatic check(input string tag, input logic [W-1:0] got, input int want);
    checks++;
    if (sext(got, W) != want) begin
      failures++;
      if (failures < 10) $display("%s: got %0d want %0d", tag, sext(got, W), want);
    end
  endtask

  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < NA; i++) for (int j = 0; j < NY; j++) begin a_u[i][j] = pick(); a_l[i][j] = pick(); end
      for (int i = 0; i < NB; i++) for (int j = 0; j < NY; j++) begin b_u[i][j] = pick(); b_l[i][j] = pick(); end
      for (int j = 0; j < NY; j++) begin c_u[0][j] = pick(); c_l[0][j] = pick(); end
      #1;
      for (int j = 0; j < NY; j++) begin
        int mu, ml;
        mu = 32'h7fffffff; ml = 32'h80000000;
        for (int i = 0; i < NA; i++) begin
          if (sext(a_u[i][j], W) < mu) mu = sext(a_u[i][j], W);
          if (sext(a_l[i][j], W) > ml) ml = sext(a_l[i][j], W);
        end
        check("N=13 min", a_mu[j], mu);
        check("N=13 max", a_ml[j], ml);
        mu = 32'h7fffffff; ml = 32'h80000000;
        for (int i = 0; i < NB; i++) begin
          if (sext(b_u[i][j], W) < mu) mu = sext(b_u[i][j], W);
          if (sext(b_l[i][j], W) > ml) ml = sext(b_l[i][j], W);
        end
        check("N=8 min", b_mu[j], mu);
        check("N=8 max", b_ml[j], ml);
        check("N=1 min", c_mu[j], sext(c_u[0][j], W));
        check("N=1 max", c_ml[j], sext(c_l[0][j], W));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
