// tb_lip_top: end-to-end test of the interpolation engine at a reduced size
// (K = 4 lanes, 5 batches, 3 inputs, 2 outputs, default 16-bit format).
//
// It loads random data sets (values in the scaled range [0,1]) through the
// load port, runs random queries and compares every output with a direct
// evaluation of the interpolation formula over the data points, and checks
// that valid rises exactly DEPTH+2 clock edges after the edge that took start. It makes each
// mechanism of the design happen and counts it:
//   * batches      : partial results written (one per batch of K points)
//   * ring wraps   : the address ring returning from the last row to row 0
//   * final merges : reductions of the partial-result memory into f_out
//   * padding      : a data set smaller than K*DEPTH, padded with copies
//   * ignored start/load : start pulses and load writes while busy
// A mechanism that never happened counts as a failure.
module tb_lip_top;
  import tb_lip_ref_pkg::*;

  localparam int W = 16, NW = 3, NY = 2, K = 4, DEPTH = 5;
  localparam int AW = 3, BW = 2, RW = (NY + NW) * W, CAP = K * DEPTH, ONE = 4096;

  logic clk = 0, rst_n = 0, start = 0, ld_we = 0;
  logic [NW-1:0][W-1:0] q = '0;
  logic busy, valid;
  logic [NY-1:0][W-1:0] f_out;
  logic [BW-1:0] ld_bank = '0;
  logic [AW-1:0] ld_addr = '0;
  logic [RW-1:0] ld_data = '0;

  int checks = 0, failures = 0;
  int n_batches = 0, n_wraps = 0, n_merges = 0, n_padded = 0, n_ign_start = 0, n_ign_load = 0, n_queries = 0;
  int dw[], df[], qv[];

  lip_top #(.W(W), .NW(NW), .NY(NY), .K(K), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, observed at the sequencer
  always @(posedge clk) if (rst_n) begin
    if (dut.enb) n_batches++;
    if (dut.ena && dut.addr_a == AW'(DEPTH - 1)) n_wraps++;
    if (dut.out_ld) n_merges++;
  end

  task automatic check(input string tag, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d want %0d", $time, tag, got, want);
    end
  endtask

  task automatic write_row(input int slot, input int src);
    logic [RW-1:0] row;
    for (int j = 0; j < NY; j++) row[(NY+NW-1-j)*W +: W] = W'(df[src*NY + j]);
    for (int k = 0; k < NW; k++) row[(NW-1-k)*W +: W] = W'(dw[src*NW + k]);
    @(negedge clk);
    ld_we = 1; ld_bank = BW'(slot % K); ld_addr = AW'(slot / K); ld_data = row;
    @(negedge clk);
    ld_we = 0;
  endtask

  // New random data set of npts points; slots past npts repeat point 0.
  task automatic load_set(input int npts);
    dw = new[npts * NW]; df = new[npts * NY];
    foreach (dw[i]) dw[i] = $urandom_range(0, ONE);
    foreach (df[i]) df[i] = $urandom_range(0, ONE);
    for (int s = 0; s < CAP; s++) write_row(s, (s < npts) ? s : 0);
    if (npts < CAP) n_padded++;
  endtask

  // corners = 1: every query coordinate at 0 or 1, the ends of the scaled range
  task automatic run_query(input int npts, input bit corners = 0);
    int lat;
    qv = new[NW];
    foreach (qv[k]) begin
      qv[k] = corners ? ONE * $urandom_range(0, 1) : $urandom_range(0, ONE);
      q[k] = W'(qv[k]);
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    q = '0;                            // query must have been captured
    lat = 0;                           // clock edges since the one that took start
    while (!valid) begin
      // disturb: stray start and a load write while busy
      if (lat == 1) begin
        start = 1;
        n_ign_start++;
      end
      if (lat == 2) begin
        // a row that would win every floor comparison if it were written
        ld_we = 1; ld_bank = '0; ld_addr = '0;
        ld_data = '0;
        for (int j = 0; j < NY; j++) ld_data[(NY+NW-1-j)*W +: W] = W'(3 * ONE);
        n_ign_load++;
      end
      @(negedge clk);
      start = 0; ld_we = 0;
      lat++;
      if (lat > 100) break;
    end
    check("latency", lat, DEPTH + 2);
    for (int j = 0; j < NY; j++)
      check($sformatf("query %0d out %0d", n_queries, j), sext(f_out[j], W), lip_ref(qv, dw, df, npts, NW, NY, j));
    n_queries++;
    // the result must stay until the next start
    repeat ($urandom_range(0, 3)) @(negedge clk);
    check("valid held", valid, 1);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check("valid after reset", valid, 0);
    rst_n = 1;
    // full data set
    load_set(CAP);
    repeat (40) run_query(CAP);
    // smaller data set, padded
    load_set(CAP - 3);
    repeat (40) run_query(CAP - 3);
    // queries at the corners of the input range
    load_set(CAP);
    repeat (10) run_query(CAP, 1);

    check("batches written", n_batches, n_queries * DEPTH);
    check("merges", n_merges, n_queries);
    if (n_wraps == 0)     begin failures++; $display("address ring never wrapped"); end
    if (n_padded == 0)    begin failures++; $display("no padded data set"); end
    if (n_ign_start == 0) begin failures++; $display("no ignored start"); end
    if (n_ign_load == 0)  begin failures++; $display("no ignored load"); end
    $display("mechanisms: queries=%0d batches=%0d wraps=%0d merges=%0d padded_sets=%0d ignored_starts=%0d ignored_loads=%0d",
             n_queries, n_batches, n_wraps, n_merges, n_padded, n_ign_start, n_ign_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
