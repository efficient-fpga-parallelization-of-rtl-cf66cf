// lip_cmp_tree: comparator tree reducing N {ceiling, floor} pairs to the
// minimum ceiling and maximum floor.
//
// The pairs are the leaves of a balanced binary tree of lip_minmax blocks,
// ceil(log2 N) levels deep. The tree is stored heap-style: node i has
// children 2i+1 and 2i+2, the leaves sit at P-1 .. 2P-2 with P the next power
// of two not below N, and the root is node 0. Leaves past N are tied to the
// neutral pair {most positive ceiling, most negative floor}, which never wins
// a comparison, so the blocks fed only by them reduce to wires and at most
// N-1 comparators remain. Purely combinational: the result settles in one
// clock cycle, as the design requires one batch result per cycle.
// The same module serves both comparison stages: the K-input one behind the
// ECAUs and the n-input one behind the partial-result memory.
module lip_cmp_tree #(
  parameter int unsigned W  = lip_pkg::LIP_W,
  parameter int unsigned NY = lip_pkg::LIP_NY,
  parameter int unsigned N  = lip_pkg::LIP_K
) (
  input  logic [N-1:0][NY-1:0][W-1:0] in_u,  // ceiling terms, one group per leaf
  input  logic [N-1:0][NY-1:0][W-1:0] in_l,  // floor terms, one group per leaf
  output logic [NY-1:0][W-1:0]        min_u, // minimum ceiling per output
  output logic [NY-1:0][W-1:0]        max_l  // maximum floor per output
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned P      = 1 << LEVELS;

  localparam logic [W-1:0] POS_MAX = {1'b0, {(W-1){1'b1}}};
  localparam logic [W-1:0] NEG_MAX = {1'b1, {(W-1){1'b0}}};

  logic [NY-1:0][W-1:0] node_u [2*P-1];
  logic [NY-1:0][W-1:0] node_l [2*P-1];

  for (genvar i = 0; i < P; i++) begin : g_leaf
    if (i < N) begin : g_used
      assign node_u[P-1+i] = in_u[i];
      assign node_l[P-1+i] = in_l[i];
    end else begin : g_pad
      assign node_u[P-1+i] = {NY{POS_MAX}};
      assign node_l[P-1+i] = {NY{NEG_MAX}};
    end
  end

  for (genvar i = 0; i < int'(P) - 1; i++) begin : g_node
    lip_minmax #(.W(W), .NY(NY)) u_cmp (
      .a_u(node_u[2*i+1]), .a_l(node_l[2*i+1]),
      .b_u(node_u[2*i+2]), .b_l(node_l[2*i+2]),
      .y_u(node_u[i]),     .y_l(node_l[i])
    );
  end

  assign min_u = node_u[0];
  assign max_l = node_l[0];

endmodule
