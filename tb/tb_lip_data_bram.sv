// tb_lip_data_bram: checks a data memory of 11 rows (3 inputs, 1 output,
// 16-bit words): every row written through the load port is read back with
// one cycle of latency, dout holds while ena is low, and a write to one row
// leaves the others intact.
module tb_lip_data_bram;
  localparam int W = 16, NW = 3, NY = 1, DEPTH = 11, AW = 4, RW = (NW + NY) * W;

  logic clk = 0, we = 0, ena = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [RW-1:0] wdata = '0, dout;
  logic [RW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  lip_data_bram #(.W(W), .NW(NW), .NY(NY), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [RW-1:0] want, input string tag);
    checks++;
    if (dout !== want) begin
      failures++;
      if (failures < 10) $display("%s: got %h want %h", tag, dout, want);
    end
  endtask

  initial begin
    // load every row
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = {$urandom, $urandom};
      model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int pass = 0; pass < 20; pass++) begin
      // sequential read with one cycle latency
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        ena = 1; raddr = AW'(a);
        @(negedge clk);
        check(model[a], "read");
        // ena low: output must hold
        ena = 0; raddr = AW'((a + 1) % DEPTH);
        @(negedge clk);
        check(model[a], "hold");
      end
      // overwrite one random row
      begin
        int a;
        a = $urandom_range(0, DEPTH - 1);
        @(negedge clk);
        we = 1; waddr = AW'(a); wdata = {$urandom, $urandom};
        model[a] = wdata;
        @(negedge clk) we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
