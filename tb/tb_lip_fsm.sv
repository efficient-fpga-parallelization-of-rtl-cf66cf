// tb_lip_fsm: checks the sequencer cycle by cycle at two depths, 5 batches
// and 1 batch. After start is taken in IDLE the expected trace, t cycles on
// (t = 1 .. D+2), is:
//   t = 1..D   : ena = 1, addr_a = t-1 (the address ring), enb = (t > 1), addr_b = t-2
//   t = D+1    : ena = 0, enb = 1, addr_b = D-1 (last partial result)
//   t = D+2    : out_ld = 1
//   t > D+2    : busy = 0, valid = 1 until the next start
// start pulses while busy must be ignored. The latency from start to valid
// (D+2 cycles) is checked too.
module tb_lip_fsm;
  localparam int DA = 5, DB = 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy_a, ena_a, enb_a, out_ld_a, valid_a;
  logic [2:0] addr_a_a, addr_b_a;
  logic busy_b, ena_b, enb_b, out_ld_b, valid_b;
  logic [0:0] addr_a_b, addr_b_b;
  int checks = 0, failures = 0, wraps = 0;

  lip_fsm #(.DEPTH(DA)) dut_a (.clk, .rst_n, .start, .busy(busy_a), .ena(ena_a), .addr_a(addr_a_a),
                               .enb(enb_a), .addr_b(addr_b_a), .out_ld(out_ld_a), .valid(valid_a));
  lip_fsm #(.DEPTH(DB)) dut_b (.clk, .rst_n, .start, .busy(busy_b), .ena(ena_b), .addr_a(addr_a_b),
                               .enb(enb_b), .addr_b(addr_b_b), .out_ld(out_ld_b), .valid(valid_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sig(input string tag, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d want %0d", $time, tag, got, want);
    end
  endtask

  // Expected outputs t cycles after start was taken, for depth d.
  task automatic check_trace(input int t, input int d, input logic busy, input logic ena,
                             input int aa, input logic enb, input int ab,
                             input logic out_ld, input logic valid);
    string s;
    s = $sformatf("D=%0d t=%0d", d, t);
    expect_sig({s, " busy"},   busy,   t <= d + 2);
    expect_sig({s, " ena"},    ena,    t >= 1 && t <= d);
    if (t >= 1 && t <= d) expect_sig({s, " addr_a"}, aa, t - 1);
    expect_sig({s, " enb"},    enb,    t >= 2 && t <= d + 1);
    if (t >= 2 && t <= d + 1) expect_sig({s, " addr_b"}, ab, t - 2);
    expect_sig({s, " out_ld"}, out_ld, t == d + 2);
    expect_sig({s, " valid"},  valid,  t > d + 2);
  endtask

  always @(posedge clk) if (ena_a && addr_a_a == 3'(DA - 1)) wraps++;

  initial begin
    repeat (3) @(negedge clk);
    expect_sig("reset valid", valid_a, 0);
    expect_sig("reset busy", busy_a, 0);
    rst_n = 1;
    for (int q = 0; q < 30; q++) begin
      int gap;
      gap = $urandom_range(0, 3);
      repeat (gap) @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int t = 1; t <= DA + 4; t++) begin
        // a stray start while busy must change nothing
        if (t == 2 || t == 3) start = 1;
        check_trace(t, DA, busy_a, ena_a, addr_a_a, enb_a, addr_b_a, out_ld_a, valid_a);
        check_trace(t, DB, busy_b, ena_b, addr_a_b, enb_b, addr_b_b, out_ld_b, valid_b);
        @(negedge clk);
        start = 0;
      end
    end
    expect_sig("address ring completed every query", wraps, 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
