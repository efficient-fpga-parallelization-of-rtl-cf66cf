// lip_data_bram: one of the K data memories.
//
// Holds DEPTH rows; row a carries the data point that this memory feeds to
// its ECAU in batch a. A row packs the NY stored outputs and the NW inputs of
// one data point, outputs first:
//   row = { f~_1, ..., f~_NY, w_1, ..., w_NW }   (f~_1 in the top W bits)
// which is the memory layout of the design. It is a simple dual-port RAM as
// an FPGA block RAM provides: a write port used only to load the data set,
// and a synchronous read port driven by the sequencer. With ena high the
// row at raddr appears on dout after the next rising clock edge; with ena low
// dout holds. The write port and the one-cycle read latency are this
// design's choice of a standard block-RAM interface.
module lip_data_bram #(
  parameter int unsigned W     = lip_pkg::LIP_W,
  parameter int unsigned NW    = lip_pkg::LIP_NW,
  parameter int unsigned NY    = lip_pkg::LIP_NY,
  parameter int unsigned DEPTH = lip_pkg::LIP_DEPTH,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned RW   = (NY + NW) * W
) (
  input  logic          clk,
  // load port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [RW-1:0] wdata,
  // read port
  input  logic          ena,
  input  logic [AW-1:0] raddr,
  output logic [RW-1:0] dout
);

  logic [RW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (ena) dout <= mem[raddr];
  end

endmodule
