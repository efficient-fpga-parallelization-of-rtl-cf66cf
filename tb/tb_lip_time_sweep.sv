// tb_lip_time_sweep: prediction time against data-set size. Engines with
// K = 16 lanes are built for data sets of 16, 100, 500 and 1000 points, each
// with DEPTH = ceil(N/16) batches (1, 7, 32 and 63). Each must give exact
// results and take DEPTH+2 cycles per query, so the time grows linearly with
// the data set, at one cycle per 16 points, plus two cycles.
module tb_lip_time_sweep;
  logic clk = 0, rst_n = 0;
  logic d0, d1, d2, d3;
  int c0, c1, c2, c3, f0, f1, f2, f3, y0, y1, y2, y3;
  int checks = 0, failures = 0;

  tb_lip_sweep_unit #(.K(16), .DEPTH(1),  .NPTS(16),   .NQ(20)) u0 (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0), .cycles(y0));
  tb_lip_sweep_unit #(.K(16), .DEPTH(7),  .NPTS(100),  .NQ(20)) u1 (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1), .cycles(y1));
  tb_lip_sweep_unit #(.K(16), .DEPTH(32), .NPTS(500),  .NQ(20)) u2 (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2), .cycles(y2));
  tb_lip_sweep_unit #(.K(16), .DEPTH(63), .NPTS(1000), .NQ(20)) u3 (.clk, .rst_n, .done(d3), .checks(c3), .failures(f3), .cycles(y3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2 && d3);
    checks   = c0 + c1 + c2 + c3;
    failures = f0 + f1 + f2 + f3;
    $display("N_D=16: %0d cycles, N_D=100: %0d, N_D=500: %0d, N_D=1000: %0d", y0, y1, y2, y3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
