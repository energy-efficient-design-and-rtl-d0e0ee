// viterbi_acs: add-compare-select unit for one trellis state of the Viterbi
// decoder.
//
// A state of the rate-1/3, K=5 trellis has two predecessors, which differ only
// in the oldest register bit x that is shifted out. For each the unit adds the
// predecessor's path metric and the Hamming distance between the received
// symbol and the symbol that branch would have produced, and keeps the
// smaller sum. `decision` is the x of the survivor; on a tie the x = 0 branch
// wins. Purely combinational.
//
// The add-compare-select structure is the standard Viterbi recursion; the
// metric width and the tie rule are this design's own choices.
module viterbi_acs
  import codec_pkg::*;
#(
  parameter int unsigned PM_W = 8
) (
  input  state_t          next_state,  // the state this unit computes
  input  symbol_t         rx_sym,      // received hard-decision symbol
  input  logic [PM_W-1:0] pm_pred0,    // metric of predecessor {next_state[2:0], 0}
  input  logic [PM_W-1:0] pm_pred1,    // metric of predecessor {next_state[2:0], 1}
  output logic [PM_W-1:0] pm_new,
  output logic            decision
);

  logic            in_bit;
  state_t          pred0, pred1;
  logic [PM_W-1:0] cand0, cand1;

  always_comb begin
    in_bit   = next_state[MEM-1];
    pred0    = {next_state[MEM-2:0], 1'b0};
    pred1    = {next_state[MEM-2:0], 1'b1};
    cand0    = pm_pred0 + PM_W'(hamming3(rx_sym, conv_symbol(in_bit, pred0)));
    cand1    = pm_pred1 + PM_W'(hamming3(rx_sym, conv_symbol(in_bit, pred1)));
    decision = (cand1 < cand0);
    pm_new   = decision ? cand1 : cand0;
  end

endmodule
