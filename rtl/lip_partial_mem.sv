// lip_partial_mem: store of the per-batch partial results.
//
// Entry a holds the minimum ceiling and maximum floor of batch a, written
// through one port when enb is high. Unlike the data memories it is a
// multi-port memory: every entry is presented on all_u/all_l at once, so the
// second comparator tree can reduce all DEPTH partial results in one cycle.
// It is therefore built from registers. Writes take effect at the rising
// edge; reads are continuous.
module lip_partial_mem #(
  parameter int unsigned W     = lip_pkg::LIP_W,
  parameter int unsigned NY    = lip_pkg::LIP_NY,
  parameter int unsigned DEPTH = lip_pkg::LIP_DEPTH,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                           clk,
  input  logic                           enb,    // write enable
  input  logic [AW-1:0]                  addr,   // batch index written
  input  logic [NY-1:0][W-1:0]           din_u,  // minimum ceiling of the batch
  input  logic [NY-1:0][W-1:0]           din_l,  // maximum floor of the batch
  output logic [DEPTH-1:0][NY-1:0][W-1:0] all_u,
  output logic [DEPTH-1:0][NY-1:0][W-1:0] all_l
);

  always_ff @(posedge clk) begin
    if (enb) begin
      all_u[addr] <= din_u;
      all_l[addr] <= din_l;
    end
  end

endmodule
