// tb_lip_ecau: checks the enclosure unit with the default format (16-bit,
// 12 fractional bits), three inputs and two outputs. Operands are random
// values in the scaled range [0,1] (0 .. 4096) plus the end points; the
// infinity-norm distance and the ceiling and floor terms are compared with
// integer arithmetic.
module tb_lip_ecau;
  import tb_lip_ref_pkg::*;

  localparam int W = 16, NW = 3, NY = 2, ONE = 4096;
  logic [NW-1:0][W-1:0] q, w;
  logic [NY-1:0][W-1:0] f, u, l;
  logic [W-1:0]         d;
  int checks = 0, failures = 0;

  lip_ecau #(.W(W), .NW(NW), .NY(NY)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int val();
    case ($urandom_range(0, 9))
      0: return 0;
      1: return ONE;
      default: return $urandom_range(0, ONE);
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int qi[NW], wi[NW], fi[NY], ed;
      ed = 0;
      for (int k = 0; k < NW; k++) begin
        qi[k] = val(); wi[k] = val();
        q[k] = W'(qi[k]); w[k] = W'(wi[k]);
        if ((qi[k] > wi[k] ? qi[k] - wi[k] : wi[k] - qi[k]) > ed)
          ed = (qi[k] > wi[k]) ? qi[k] - wi[k] : wi[k] - qi[k];
      end
      for (int j = 0; j < NY; j++) begin
        fi[j] = val(); f[j] = W'(fi[j]);
      end
      #1;
      checks++;
      if (sext(d, W) != ed) begin
        failures++;
        if (failures < 10) $display("norm mismatch: got %0d want %0d", sext(d, W), ed);
      end
      for (int j = 0; j < NY; j++) begin
        checks += 2;
        if (sext(u[j], W) != fi[j] + ed) begin
          failures++;
          if (failures < 10) $display("ceiling mismatch: got %0d want %0d", sext(u[j], W), fi[j] + ed);
        end
        if (sext(l[j], W) != fi[j] - ed) begin
          failures++;
          if (failures < 10) $display("floor mismatch: got %0d want %0d", sext(l[j], W), fi[j] - ed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
