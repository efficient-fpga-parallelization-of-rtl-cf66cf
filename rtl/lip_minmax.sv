// lip_minmax: one comparison block of the comparator tree.
//
// For each of the NY output components it passes on the smaller of two
// ceiling terms and the larger of two floor terms, so one block merges two
// {ceiling, floor} pairs into one. Purely combinational; the words are signed
// fixed-point (see lip_pkg). The min/max pairing is the design's; building it
// from two signed magnitude comparators and two multiplexers is the simplest
// realisation.
module lip_minmax #(
  parameter int unsigned W  = lip_pkg::LIP_W,
  parameter int unsigned NY = lip_pkg::LIP_NY
) (
  input  logic [NY-1:0][W-1:0] a_u,  // ceiling terms of pair a
  input  logic [NY-1:0][W-1:0] a_l,  // floor terms of pair a
  input  logic [NY-1:0][W-1:0] b_u,  // ceiling terms of pair b
  input  logic [NY-1:0][W-1:0] b_l,  // floor terms of pair b
  output logic [NY-1:0][W-1:0] y_u,  // min(a_u, b_u)
  output logic [NY-1:0][W-1:0] y_l   // max(a_l, b_l)
);

  always_comb begin
    for (int j = 0; j < int'(NY); j++) begin
      y_u[j] = ($signed(a_u[j]) < $signed(b_u[j])) ? a_u[j] : b_u[j];
      y_l[j] = ($signed(a_l[j]) > $signed(b_l[j])) ? a_l[j] : b_l[j];
    end
  end

endmodule
