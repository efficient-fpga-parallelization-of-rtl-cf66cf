// lip_fsm: sequencer of one prediction.
//
// A synchronous Moore machine. Its core is the ring of DEPTH address states
// of the design: in state RUN with batch counter a, every data memory is
// enabled (ena) and reads row a, and each rising edge moves to the next row;
// after the last row the counter wraps to row 0. Because the memories have
// one cycle of read latency, the partial-result memory is written one cycle
// behind: enb is high and addr_b = a-1 while the ECAUs and the first
// comparator tree work on the rows read in the previous cycle.
//
// Around the ring this design adds the framing a query needs, which the
// design leaves open: IDLE waits for start; FLUSH writes the last batch's
// partial result; OUT loads the output register from the second comparator
// tree and the output ALU (out_ld). valid rises when OUT is left and stays
// high until the next start.
//
// Timing: start sampled high in IDLE at edge 0 gives valid high after edge
// DEPTH+2: DEPTH cycles of memory reads (the n*tau of the design) plus one
// cycle each for the last write and the final reduction.
module lip_fsm #(
  parameter int unsigned DEPTH = lip_pkg::LIP_DEPTH,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,   // begin a prediction (accepted in IDLE)
  output logic          busy,    // a prediction is in progress
  output logic          ena,     // data memories read enable
  output logic [AW-1:0] addr_a,  // data memories read address (batch)
  output logic          enb,     // partial-result memory write enable
  output logic [AW-1:0] addr_b,  // partial-result memory write address
  output logic          out_ld,  // load the output register
  output logic          valid    // output register holds a finished prediction
);
  import lip_pkg::*;

  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  lip_state_e    state, state_n;
  logic [AW-1:0] cnt, cnt_n;

  always_comb begin
    state_n = state;
    cnt_n   = cnt;
    unique case (state)
      S_IDLE: if (start) begin
        state_n = S_RUN;
        cnt_n   = '0;
      end
      S_RUN: begin
        if (cnt == LAST) begin
          state_n = S_FLUSH;
          cnt_n   = '0;
        end else begin
          cnt_n = cnt + 1'b1;
        end
      end
      S_FLUSH: state_n = S_OUT;
      S_OUT:   state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      valid <= 1'b0;
    end else begin
      state <= state_n;
      cnt   <= cnt_n;
      if (state == S_IDLE && start) valid <= 1'b0;
      else if (state == S_OUT)      valid <= 1'b1;
    end
  end

  // Moore outputs: functions of state and counter only.
  always_comb begin
    busy   = (state != S_IDLE);
    ena    = (state == S_RUN);
    addr_a = cnt;
    enb    = (state == S_RUN && cnt != '0) || (state == S_FLUSH);
    addr_b = (state == S_FLUSH) ? LAST : cnt - 1'b1;
    out_ld = (state == S_OUT);
  end

  a_addr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RUN) |-> (cnt <= LAST));
  a_write_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    enb |-> (addr_b <= LAST));

endmodule
