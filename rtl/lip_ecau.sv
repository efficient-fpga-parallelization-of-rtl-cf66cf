// lip_ecau: enclosure calculation arithmetic unit (ECAU).
//
// For one stored data point (w_i, f~_i) and the query q it forms the
// infinity-norm distance d = max_k |q_k - w_ik| and, per output component j,
// the ceiling u_ij = f~_ij + d and the floor l_ij = f~_ij - d. Because the
// stored outputs are pre-divided by the Lipschitz constant, no multiplier is
// needed: the unit is NW subtractors, NW absolute values, an NW-input maximum
// and one adder and one subtractor per output, as in the design's block
// diagram. Purely combinational.
//
// All words share one signed fixed-point format of W bits (see lip_pkg) and
// every operation wraps at W bits, as in the design: with inputs scaled to
// [0,1] every intermediate value lies in [-1,2] and the format holds [-8,8),
// so nothing overflows. Inputs outside that scaling are the user's concern.
module lip_ecau #(
  parameter int unsigned W  = lip_pkg::LIP_W,
  parameter int unsigned NW = lip_pkg::LIP_NW,
  parameter int unsigned NY = lip_pkg::LIP_NY
) (
  input  logic [NW-1:0][W-1:0] q,  // query point
  input  logic [NW-1:0][W-1:0] w,  // stored input w_i
  input  logic [NY-1:0][W-1:0] f,  // stored output f~_i (already divided by L)
  output logic [NY-1:0][W-1:0] u,  // ceiling terms
  output logic [NY-1:0][W-1:0] l,  // floor terms
  output logic [W-1:0]         d   // infinity-norm distance |q - w_i|
);

  logic signed [W-1:0] diff [NW];
  logic signed [W-1:0] mag  [NW];

  always_comb begin
    for (int k = 0; k < int'(NW); k++) begin
      diff[k] = $signed(q[k]) - $signed(w[k]);
      mag[k]  = (diff[k] < 0) ? -diff[k] : diff[k];
    end
  end

  always_comb begin
    d = mag[0];
    for (int k = 1; k < int'(NW); k++)
      if (mag[k] > $signed(d)) d = mag[k];
  end

  always_comb begin
    for (int j = 0; j < int'(NY); j++) begin
      u[j] = f[j] + d;
      l[j] = f[j] - d;
    end
  end

endmodule
