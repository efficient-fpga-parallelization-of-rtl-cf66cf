// lip_pkg: constants and types shared by the Lipschitz interpolation datapath.
//
// Every signal of the datapath uses one signed two's-complement fixed-point
// format: 1 sign bit, IBITS integer bits and FBITS fractional bits. The two
// counts follow the design method, which picks the smallest format meeting
// two constraints, because area and energy grow with the word width:
//   * range: with the inputs scaled to [0,1] every intermediate value lies
//     in [-1,2] (interval analysis of differences, distances, ceilings and
//     floors); the integer bits must hold that magnitude, plus one guard bit
//     for rounding excursions: IBITS = 3;
//   * precision: the operands' rounding gives an error of at most
//     3*2^-(FBITS+1); for a limit of 4e-4 this needs FBITS = 12.
// The functions below carry out both steps. The array size (K = 256
// parallel units), the batch count (n = 55 = ceil(14000/256)) and the
// case-study dimensions (3 inputs, 1 output) are the design's figures; the
// module parameters default to them.
package lip_pkg;

  // Smallest number of integer bits whose range holds magnitude vmax, plus
  // one guard bit.
  function automatic int unsigned ibits_min(input real vmax);
    int unsigned b = 0;
    while (real'(64'(1) << b) <= vmax) b++;
    return b + 1;
  endfunction

  // Smallest number of fractional bits whose error bound 3*2^-(f+1) does
  // not exceed rho_max.
  function automatic int unsigned fbits_min(input real rho_max);
    int unsigned f = 0;
    while (3.0 / real'(64'(1) << (f + 1)) > rho_max) f++;
    return f;
  endfunction

  localparam real         LIP_VMAX    = 2.0;                      // largest |signal| for inputs in [0,1]
  localparam real         LIP_RHO_MAX = 4.0e-4;                   // allowed output error
  localparam int unsigned LIP_IBITS = ibits_min(LIP_VMAX);        // integer bits (3)
  localparam int unsigned LIP_FBITS = fbits_min(LIP_RHO_MAX);     // fractional bits (12)
  localparam int unsigned LIP_W     = 1 + LIP_IBITS + LIP_FBITS; // word width (16)
  localparam int unsigned LIP_NW    = 3;                         // query/input dimension n_w
  localparam int unsigned LIP_NY    = 1;                         // output dimension n_y
  localparam int unsigned LIP_K     = 256;                       // data points processed per cycle
  localparam int unsigned LIP_DEPTH = 55;                        // batches n = depth of every BRAM

  // Sequencer states. RUN is the ring of n address states; IDLE, FLUSH and
  // OUT frame one query (see lip_fsm).
  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,
    S_RUN   = 2'd1,
    S_FLUSH = 2'd2,
    S_OUT   = 2'd3
  } lip_state_e;

endpackage
