// interleaver: 8x8 block interleaver of the transmit chain.
//
// The 64-bit block is seen as ROWS rows of COLS bits, row i being
// rows_in[i] (bits [8i+7:8i] of the flat word). The interleaver writes the
// block row by row and reads it column by column: output row j holds column j
// of the input, output bit k of that row being input row k, bit j. A burst
// of channel errors inside one transmitted row therefore lands, after
// de-interleaving, on code bits that are COLS positions apart, where the
// Viterbi decoder can correct them.
//
// Interface and timing: on a clock with `load` high, rows_in is captured and
// the transposed block appears on rows_out on the next clock, with out_valid
// high for that one clock. rows_out holds until the next load.
//
// From the source design: the 8x8 matrix, the row-to-column exchange and the
// eight 8-bit row inputs and outputs of its schematic; the worked example
// fixes the bit mapping exactly. Own choices: the load/out_valid strobes,
// one register stage, synchronous active-high reset.
module interleaver
  import codec_pkg::*;
#(
  parameter int unsigned NROWS = ROWS,
  parameter int unsigned NCOLS = COLS
) (
  input  logic                        clk,
  input  logic                        reset,
  input  logic                        load,
  input  logic [NROWS-1:0][NCOLS-1:0] rows_in,
  output logic [NCOLS-1:0][NROWS-1:0] rows_out,
  output logic                        out_valid
);

  logic [NCOLS-1:0][NROWS-1:0] transposed;

  always_comb begin
    for (int j = 0; j < int'(NCOLS); j++)
      for (int k = 0; k < int'(NROWS); k++)
        transposed[j][k] = rows_in[k][j];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      rows_out  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= load;
      if (load) rows_out <= transposed;
    end
  end

endmodule
