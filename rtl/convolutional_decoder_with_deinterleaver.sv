// convolutional_decoder_with_deinterleaver: receive side of the channel coder.
//
// The eight received 8-bit rows r0..r7 (the interleaved word, r0 = bits [7:0])
// are de-interleaved, converted into a stream of 20 three-bit symbols and
// decoded by the Viterbi decoder, which sends the 16 recovered data bits on
// sout, first transmitted bit first, while out_enable is high. For the rows
// 05 81 cd f3 4a 32 77 3d (r0..r7) the output is 1101001111001011.
//
// Interface and timing: the block has no start input. It decodes one frame
// after every reset: on the first clock after reset is released it captures
// r0..r7, spends 20 clocks sending symbols and 20 clocks on traceback, and
// then drives the 16 bits on sout over 16 clocks (out_enable high); it then
// stays idle until the next reset. The rows need only be stable on that first
// clock. About 42 clocks pass from the release of reset to the first output
// bit.
//
// From the source design: the ports (r0..r7 [7:0], clk, reset, out_enable,
// sout), the two components and the worked example. Own choices: decoding
// once per reset (the source shows no start or valid input) and the timing.
module convolutional_decoder_with_deinterleaver
  import codec_pkg::*;
(
  input  logic      clk,
  input  logic      reset,
  input  row_t      r0,
  input  row_t      r1,
  input  row_t      r2,
  input  row_t      r3,
  input  row_t      r4,
  input  row_t      r5,
  input  row_t      r6,
  input  row_t      r7,
  output logic      out_enable,
  output logic      sout
);

  logic                      started;
  logic [COLS-1:0][ROWS-1:0] rx_rows;
  symbol_t                   sym;
  logic                      sym_valid;

  always_ff @(posedge clk) begin
    if (reset) started <= 1'b0;
    else       started <= 1'b1;
  end

  assign rx_rows = {r7, r6, r5, r4, r3, r2, r1, r0};

  deinterleaver #(.NROWS(ROWS), .NCOLS(COLS), .NSYM(STEPS)) u_deinterleaver (
    .clk      (clk),
    .reset    (reset),
    .load     (!started),
    .rows_in  (rx_rows),
    .sym_out  (sym),
    .sym_valid(sym_valid),
    .last     (),
    .busy     ()
  );

  viterbi_decoder #(.DATA_W(DATA_BITS)) u_decoder (
    .clk          (clk),
    .reset        (reset),
    .data_in      (sym),
    .data_in_valid(sym_valid),
    .decoded      (),
    .decoded_valid(),
    .sout         (sout),
    .out_enable   (out_enable)
  );

endmodule
