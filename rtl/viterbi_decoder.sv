// viterbi_decoder: hard-decision Viterbi decoder for the rate-1/3,
// constraint-length-5 code (generators 37, 33, 25 octal), one terminated
// frame of 16 data bits + 4 tail bits = 20 received 3-bit symbols.
//
// How it works. Sixteen add-compare-select units (viterbi_acs) update all
// path metrics once per received symbol; the branch metric is the Hamming
// distance of the 3-bit symbol. The frame starts in state 0 (metric 0, all
// other states INIT_PM) and, because of the tail, ends in state 0, so no
// best-state search is needed. The 16 survivor decision bits of each step are
// stored in a 20-entry survivor memory. After the last symbol a traceback
// walks from state 0 back through the memory, one step per clock, and
// recovers the data bit of each step (the newest bit of the state). Finally
// the 16 data bits are shifted out on sout, first transmitted bit first.
//
// Interface and timing: present symbols on data_in with data_in_valid high,
// in order, first symbol first; gaps between symbols are allowed. After the
// 20th symbol the decoder spends 20 clocks on traceback; it then pulses
// decoded_valid with all 16 bits on `decoded` (first bit in the MSB) and,
// starting on the next clock, drives the bits one per clock on sout for 16
// clocks with out_enable high. Symbols arriving during traceback or output are ignored;
// the next frame may start once out_enable has fallen.
//
// From the source design: the 3-bit data_in of the decoder, the rate and
// frame size, the serial sout/out_enable output and the requirement that a
// single wrong code bit is corrected (this code corrects any 5). Own
// choices: hard decisions, full-frame survivor memory with traceback from
// state 0, the metric width, the tie rule and all clock-level timing.
module viterbi_decoder
  import codec_pkg::*;
#(
  parameter int unsigned DATA_W  = DATA_BITS,
  parameter int unsigned PM_W    = 8,
  parameter int unsigned INIT_PM = 64,
  localparam int unsigned NSTEP  = DATA_W + MEM
) (
  input  logic              clk,
  input  logic              reset,
  input  symbol_t           data_in,
  input  logic              data_in_valid,
  output logic [DATA_W-1:0] decoded,
  output logic              decoded_valid,
  output logic              sout,
  output logic              out_enable
);

  typedef enum logic [1:0] {S_ACS, S_TRACE, S_OUT} phase_t;

  localparam int unsigned CNT_W = $clog2(NSTEP + 1);

  phase_t                         phase;
  logic [CNT_W-1:0]               step;        // ACS: symbols taken; TRACE: steps left
  logic [NSTATES-1:0][PM_W-1:0]   pm;          // path metrics
  logic [NSTATES-1:0][PM_W-1:0]   pm_next;
  logic [NSTATES-1:0]             dec_now;     // decisions of the current step
  logic [NSTATES-1:0]             surv [NSTEP]; // survivor memory
  state_t                         tb_state;
  logic [DATA_W-1:0]              out_shreg;
  logic [$clog2(DATA_W+1)-1:0]    out_left;
  logic [NSTATES-1:0]             surv_row;
  logic [CNT_W-1:0]               tb_idx;

  for (genvar s = 0; s < int'(NSTATES); s++) begin : g_acs
    viterbi_acs #(.PM_W(PM_W)) u_acs (
      .next_state(state_t'(s)),
      .rx_sym    (data_in),
      .pm_pred0  (pm[{s[MEM-2:0], 1'b0}]),
      .pm_pred1  (pm[{s[MEM-2:0], 1'b1}]),
      .pm_new    (pm_next[s]),
      .decision  (dec_now[s])
    );
  end

  always_ff @(posedge clk) begin
    if (phase == S_ACS && data_in_valid) surv[step] <= dec_now;
  end

  assign tb_idx   = step - 1'b1;
  assign surv_row = surv[tb_idx];

  always_ff @(posedge clk) begin
    if (reset) begin
      phase         <= S_ACS;
      step          <= '0;
      for (int s = 0; s < int'(NSTATES); s++)
        pm[s] <= (s == 0) ? '0 : PM_W'(INIT_PM);
      tb_state      <= '0;
      decoded       <= '0;
      decoded_valid <= 1'b0;
      out_shreg     <= '0;
      out_left      <= '0;
      sout          <= 1'b0;
      out_enable    <= 1'b0;
    end else begin
      decoded_valid <= 1'b0;
      case (phase)
        S_ACS: begin
          if (data_in_valid) begin
            pm <= pm_next;
            if (step == CNT_W'(NSTEP - 1)) begin
              phase    <= S_TRACE;
              step     <= CNT_W'(NSTEP);
              tb_state <= '0;             // terminated trellis ends in state 0
            end else begin
              step <= step + 1'b1;
            end
          end
        end
        S_TRACE: begin
          // Step tb_idx: data bit = newest bit of the state reached by it.
          if (tb_idx < CNT_W'(DATA_W))
            decoded[DATA_W-1-int'(tb_idx)] <= tb_state[MEM-1];
          tb_state <= {tb_state[MEM-2:0], surv_row[tb_state]};
          step     <= step - 1'b1;
          if (step == 1) begin
            phase <= S_OUT;
            // decoded[DATA_W-1] is written this clock, so load it directly.
            out_shreg     <= {tb_state[MEM-1], decoded[DATA_W-2:0]};
            decoded_valid <= 1'b1;
            out_left      <= ($clog2(DATA_W+1))'(DATA_W);
          end
        end
        S_OUT: begin
          sout       <= out_shreg[DATA_W-1];
          out_enable <= 1'b1;
          out_shreg  <= out_shreg << 1;
          out_left   <= out_left - 1'b1;
          if (out_left == 0) begin
            sout       <= 1'b0;
            out_enable <= 1'b0;
            phase      <= S_ACS;
            step       <= '0;
            for (int s = 0; s < int'(NSTATES); s++)
              pm[s] <= (s == 0) ? '0 : PM_W'(INIT_PM);
          end
        end
        default: phase <= S_ACS;
      endcase
    end
  end

  // The serial output starts only after the parallel result is complete.
  a_out_after_valid: assert property (@(posedge clk) disable iff (reset)
                                      decoded_valid |-> !out_enable ##1 out_enable);

endmodule
