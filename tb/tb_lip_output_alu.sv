// tb_lip_output_alu: checks the output unit: reset clears the result, a load
// stores floor((u + l) / 2) for random signed words (the full 16-bit range,
// so the one-bit-wider sum is exercised), and the result holds while ld is
// low.
module tb_lip_output_alu;
  import tb_lip_ref_pkg::*;

  localparam int W = 16, NY = 2;
  logic clk = 0, rst_n = 0, ld = 0;
  logic [NY-1:0][W-1:0] min_u = '0, max_l = '0, f_out;
  int expect_v [NY];
  int checks = 0, failures = 0;

  lip_output_alu #(.W(W), .NY(NY)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string tag);
    for (int j = 0; j < NY; j++) begin
      checks++;
      if (sext(f_out[j], W) != expect_v[j]) begin
        failures++;
        if (failures < 10) $display("%s[%0d]: got %0d want %0d", tag, j, sext(f_out[j], W), expect_v[j]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    foreach (expect_v[j]) expect_v[j] = 0;
    compare("reset");
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ld = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < NY; j++) begin
        min_u[j] = W'($urandom); max_l[j] = W'($urandom);
        if (ld) expect_v[j] = (sext(min_u[j], W) + sext(max_l[j], W)) >>> 1;
      end
      @(negedge clk);
      compare(ld ? "load" : "hold");
      ld = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
