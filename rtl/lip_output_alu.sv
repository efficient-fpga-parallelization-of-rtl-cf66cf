// lip_output_alu: output arithmetic unit.
//
// Forms the prediction f~ = (min ceiling + max floor) / 2 per output
// component. The sum is taken one bit wider than the words so it cannot
// wrap, and the halving is an arithmetic right shift by one bit (rounding
// toward minus infinity), so no multiplier or divider is used. The result is
// registered: it is loaded on the rising edge when ld is high and held
// otherwise. The result is the prediction divided by the Lipschitz constant;
// scaling back by L is left to the consumer, as in the design.
// The bit the shift drops (the sum's LSB) is deliberately unused; dropping
// it can add up to half an output LSB to the error, on top of the 3/2 LSB
// carried in from the rounded operands.
module lip_output_alu #(
  parameter int unsigned W  = lip_pkg::LIP_W,
  parameter int unsigned NY = lip_pkg::LIP_NY
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ld,     // load the result register
  input  logic [NY-1:0][W-1:0] min_u,  // minimum ceiling
  input  logic [NY-1:0][W-1:0] max_l,  // maximum floor
  output logic [NY-1:0][W-1:0] f_out   // (min_u + max_l) >>> 1
);

  logic [NY-1:0][W-1:0] avg;

  always_comb begin
    for (int j = 0; j < int'(NY); j++) begin
      logic signed [W:0] sum;
      sum    = $signed({min_u[j][W-1], min_u[j]}) + $signed({max_l[j][W-1], max_l[j]});
      avg[j] = sum[W:1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  f_out <= '0;
    else if (ld) f_out <= avg;
  end

endmodule
