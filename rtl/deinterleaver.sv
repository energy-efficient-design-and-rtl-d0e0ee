// deinterleaver: 8x8 block de-interleaver and parallel-to-serial converter of
// the receive chain.
//
// The eight received rows (row j = interleaved bits [8j+7:8j]) are transposed
// back, which restores the 64-bit matrix of the transmitter: code bit
// [8i+k] = received row k, bit i. The 60-bit code word in its lower bits is then
// sent to the Viterbi decoder as 20 three-bit symbols, first symbol (bits
// [59:57]) first; the 4 padding bits at the top are dropped.
//
// Interface and timing: on a clock with `load` high while idle, rows_in is
// captured (de-interleaved on the way in). On each of the next NSYM clocks one
// symbol is on sym_out with sym_valid high; `last` marks the final symbol.
// `busy` is high from the clock after the load until the clock that puts
// the final symbol out; a load while busy is ignored.
//
// From the source design: the 8x8 row/column exchange, undone, and the
// conversion into serial form for the decoder. Own choices: one symbol per
// clock, the strobes, synchronous active-high reset.
module deinterleaver
  import codec_pkg::*;
#(
  parameter int unsigned NROWS = ROWS,
  parameter int unsigned NCOLS = COLS,
  parameter int unsigned NSYM  = STEPS
) (
  input  logic                        clk,
  input  logic                        reset,
  input  logic                        load,
  input  logic [NCOLS-1:0][NROWS-1:0] rows_in,
  output symbol_t                     sym_out,
  output logic                        sym_valid,
  output logic                        last,
  output logic                        busy
);

  localparam int unsigned NBITS = NROWS * NCOLS;
  localparam int unsigned CW    = NSYM * N_OUT;   // code bits actually sent

  logic [NROWS-1:0][NCOLS-1:0] restored;
  logic [NBITS-1:0]            shreg;             // next symbol in [CW-1 -: 3]
  logic [$clog2(NSYM+1)-1:0]   remaining;

  always_comb begin
    for (int i = 0; i < int'(NROWS); i++)
      for (int k = 0; k < int'(NCOLS); k++)
        restored[i][k] = rows_in[k][i];
  end

  assign busy = (remaining != 0);

  always_ff @(posedge clk) begin
    if (reset) begin
      shreg     <= '0;
      remaining <= '0;
      sym_out   <= '0;
      sym_valid <= 1'b0;
      last      <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      last      <= 1'b0;
      if (!busy) begin
        if (load) begin
          shreg     <= restored;
          remaining <= ($clog2(NSYM+1))'(NSYM);
        end
      end else begin
        sym_out   <= shreg[CW-1 -: N_OUT];
        sym_valid <= 1'b1;
        last      <= (remaining == 1);
        shreg     <= shreg << N_OUT;
        remaining <= remaining - 1'b1;
      end
    end
  end

  // The final-symbol flag only accompanies a valid symbol.
  a_last_with_valid: assert property (@(posedge clk) disable iff (reset) last |-> sym_valid);

endmodule
