// tb_lip_partial_mem: checks the partial-result memory (7 entries, two
// output components): each write lands only in its own entry, all entries
// are visible at once, and nothing changes while enb is low.
module tb_lip_partial_mem;
  localparam int W = 16, NY = 2, DEPTH = 7, AW = 3;

  logic clk = 0, enb = 0;
  logic [AW-1:0] addr = '0;
  logic [NY-1:0][W-1:0] din_u = '0, din_l = '0;
  logic [DEPTH-1:0][NY-1:0][W-1:0] all_u, all_l;
  logic [DEPTH-1:0][NY-1:0][W-1:0] mu, ml;
  int checks = 0, failures = 0;

  lip_partial_mem #(.W(W), .NY(NY), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int a = 0; a < DEPTH; a++) begin
      checks++;
      if (all_u[a] !== mu[a] || all_l[a] !== ml[a]) begin
        failures++;
        if (failures < 10) $display("entry %0d: got %h/%h want %h/%h", a, all_u[a], all_l[a], mu[a], ml[a]);
      end
    end
  endtask

  initial begin
    // fill every entry once
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      enb = 1; addr = AW'(a);
      din_u = {$urandom, $urandom}; din_l = {$urandom, $urandom};
      mu[a] = din_u; ml[a] = din_l;
    end
    @(negedge clk) enb = 0;
    compare();
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      enb = ($urandom_range(0, 2) != 0);
      addr = AW'($urandom_range(0, DEPTH - 1));
      din_u = {$urandom, $urandom}; din_l = {$urandom, $urandom};
      if (enb) begin
        mu[addr] = din_u; ml[addr] = din_l;
      end
      @(negedge clk);
      enb = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
