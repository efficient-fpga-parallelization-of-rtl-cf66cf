// lip_top: parallel Lipschitz interpolation engine.
//
// Computes, for a query q, the Lipschitz interpolation estimate
//   f~(q) = ( min_i (f~_i + |q - w_i|_inf) + max_i (f~_i - |q - w_i|_inf) ) / 2
// over a stored data set whose outputs are pre-divided by the Lipschitz
// constant L (multiply the result by L for the prediction itself).
//
// Structure, following the design's global architecture:
//   * K data memories (lip_data_bram), DEPTH rows each, hold K*DEPTH points;
//   * K ECAUs (lip_ecau) turn the K rows read in one cycle into K
//     {ceiling, floor} pairs;
//   * a K-input comparator tree (lip_cmp_tree) reduces them to the batch's
//     minimum ceiling and maximum floor;
//   * the partial-result memory (lip_partial_mem) keeps one such pair per
//     batch and shows all DEPTH of them at once;
//   * a DEPTH-input comparator tree reduces the partial results and the
//     output ALU (lip_output_alu) averages them into f_out;
//   * the sequencer (lip_fsm) steps all memories through the DEPTH batches.
//
// Interface (this design's choice; the design only names clk, q and the
// output): pulse start with the query on q while busy is low; q is captured
// then. DEPTH+2 cycles later valid rises with the result on f_out, and stays
// high until the next start. The data set is loaded beforehand through the
// ld_* port, one row per cycle, while busy is low: ld_bank selects the
// memory, ld_addr the batch, ld_data = {f~_1..f~_NY, w_1..w_NW}. Writes
// while busy is high are ignored. A data set smaller than K*DEPTH is padded
// by repeating any of its points, which leaves every minimum and maximum,
// and so the result, unchanged.
module lip_top #(
  parameter int unsigned W     = lip_pkg::LIP_W,
  parameter int unsigned NW    = lip_pkg::LIP_NW,
  parameter int unsigned NY    = lip_pkg::LIP_NY,
  parameter int unsigned K     = lip_pkg::LIP_K,
  parameter int unsigned DEPTH = lip_pkg::LIP_DEPTH,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned BW   = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned RW   = (NY + NW) * W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // query
  input  logic                 start,
  input  logic [NW-1:0][W-1:0] q,
  output logic                 busy,
  output logic                 valid,
  output logic [NY-1:0][W-1:0] f_out,
  // data-set load port
  input  logic                 ld_we,
  input  logic [BW-1:0]        ld_bank,
  input  logic [AW-1:0]        ld_addr,
  input  logic [RW-1:0]        ld_data
);

  // ---- sequencer ----
  logic          ena, enb, out_ld;
  logic [AW-1:0] addr_a, addr_b;

  lip_fsm #(.DEPTH(DEPTH)) u_fsm (
    .clk, .rst_n, .start, .busy, .ena, .addr_a, .enb, .addr_b, .out_ld, .valid
  );

  // ---- query register ----
  logic [NW-1:0][W-1:0] q_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              q_r <= '0;
    else if (start && !busy) q_r <= q;
  end

  // ---- data memories and ECAUs ----
  logic [K-1:0][NY-1:0][W-1:0] ecau_u, ecau_l;

  for (genvar b = 0; b < K; b++) begin : g_lane
    logic [RW-1:0]        row;
    logic [NY-1:0][W-1:0] row_f;
    logic [NW-1:0][W-1:0] row_w;
    logic [W-1:0]         norm;

    lip_data_bram #(.W(W), .NW(NW), .NY(NY), .DEPTH(DEPTH)) u_bram (
      .clk,
      .we    (ld_we && !busy && ld_bank == BW'(b)),
      .waddr (ld_addr),
      .wdata (ld_data),
      .ena   (ena),
      .raddr (addr_a),
      .dout  (row)
    );

    // Row layout: f~_1 in the top word, w_NW in the bottom word.
    always_comb begin
      for (int j = 0; j < int'(NY); j++) row_f[j] = row[(NY+NW-1-j)*W +: W];
      for (int k = 0; k < int'(NW); k++) row_w[k] = row[(NW-1-k)*W +: W];
    end

    lip_ecau #(.W(W), .NW(NW), .NY(NY)) u_ecau (
      .q (q_r), .w (row_w), .f (row_f),
      .u (ecau_u[b]), .l (ecau_l[b]), .d (norm)
    );
  end

  // ---- first comparison stage: K pairs -> one pair per batch ----
  logic [NY-1:0][W-1:0] batch_u, batch_l;

  lip_cmp_tree #(.W(W), .NY(NY), .N(K)) u_tree_k (
    .in_u(ecau_u), .in_l(ecau_l), .min_u(batch_u), .max_l(batch_l)
  );

  // ---- partial results ----
  logic [DEPTH-1:0][NY-1:0][W-1:0] part_u, part_l;

  lip_partial_mem #(.W(W), .NY(NY), .DEPTH(DEPTH)) u_part (
    .clk, .enb, .addr(addr_b), .din_u(batch_u), .din_l(batch_l),
    .all_u(part_u), .all_l(part_l)
  );

  // ---- second comparison stage and output ALU ----
  logic [NY-1:0][W-1:0] fin_u, fin_l;

  lip_cmp_tree #(.W(W), .NY(NY), .N(DEPTH)) u_tree_n (
    .in_u(part_u), .in_l(part_l), .min_u(fin_u), .max_l(fin_l)
  );

  lip_output_alu #(.W(W), .NY(NY)) u_alu (
    .clk, .rst_n, .ld(out_ld), .min_u(fin_u), .max_l(fin_l), .f_out
  );

endmodule
