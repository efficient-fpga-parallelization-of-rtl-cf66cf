// tb_lip_minmax: checks one comparison block (two output components) with
// random signed words, corner values and equal operands, against min/max
// computed on integers.
module tb_lip_minmax;
  import tb_lip_ref_pkg::*;

  localparam int W = 16, NY = 2;
  logic [NY-1:0][W-1:0] a_u, a_l, b_u, b_l, y_u, y_l;
  int checks = 0, failures = 0;

  lip_minmax #(.W(W), .NY(NY)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] pick();
    case ($urandom_range(0, 5))
      0: return 16'h7fff;
      1: return 16'h8000;
      2: return 16'h0000;
      default: return W'($urandom);
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int j = 0; j < NY; j++) begin
        a_u[j] = pick(); a_l[j] = pick();
        b_u[j] = (n % 7 == 0) ? a_u[j] : pick();
        b_l[j] = pick();
      end
      #1;
      for (int j = 0; j < NY; j++) begin
        int au, bu, al, bl, eu, el;
        au = sext(a_u[j], W); bu = sext(b_u[j], W);
        al = sext(a_l[j], W); bl = sext(b_l[j], W);
        eu = (au < bu) ? au : bu;
        el = (al > bl) ? al : bl;
        checks += 2;
        if (sext(y_u[j], W) != eu) begin
          failures++;
          if (failures < 10) $display("min mismatch %0d %0d -> %0d", au, bu, sext(y_u[j], W));
        end
        if (sext(y_l[j], W) != el) begin
          failures++;
          if (failures < 10) $display("max mismatch %0d %0d -> %0d", al, bl, sext(y_l[j], W));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
