// convolution_encoder_with_interleaver: transmit side of the channel coder.
//
// A 16-bit frame is convolutionally encoded (rate 1/3, constraint length 5,
// 4 tail bits) into 60 code bits. These are padded with 4 zero bits at the
// top to fill an 8x8 matrix, row i being bits [8i+7:8i], and the matrix is
// transposed by the interleaver. code_out is the interleaved 64-bit word,
// output row j in bits [8j+7:8j]. For the frame 1101001111001011 the code
// word is 0e5ce8e894c578cf and code_out is 3d77324af3cd8105.
//
// Interface and timing: pulse `enable` with the frame on data_in; 21 clocks
// later code_out is valid and data_out_en is high for one clock. code_out
// holds until the next frame is interleaved. A new frame may be started the
// clock after the encoder finished (20 clocks after enable).
//
// The 4 padding bits end up in code_out[39], [47], [55] and [63], which are
// therefore always 0.
//
// From the source design: the ports (data_in[15:0], clk, enable, reset,
// code_out[63:0], data_out_en), the two components and the worked example.
// Own choices: zero padding of the 4 spare matrix bits in the top row and the
// clock-level timing.
module convolution_encoder_with_interleaver
  import codec_pkg::*;
(
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  enable,
  input  logic [DATA_BITS-1:0]  data_in,
  output logic [BLOCK_BITS-1:0] code_out,
  output logic                  data_out_en
);

  logic [CODE_BITS-1:0]      enc_out;
  logic                      enc_done;
  logic [ROWS-1:0][COLS-1:0] matrix;
  logic [COLS-1:0][ROWS-1:0] il_rows;

  convolutional_encoder #(.DATA_W(DATA_BITS)) u_encoder (
    .clk        (clk),
    .reset      (reset),
    .enable     (enable),
    .data_in    (data_in),
    .data_out   (enc_out),
    .data_out_en(enc_done)
  );

  assign matrix = {{(BLOCK_BITS-CODE_BITS){1'b0}}, enc_out};

  interleaver #(.NROWS(ROWS), .NCOLS(COLS)) u_interleaver (
    .clk      (clk),
    .reset    (reset),
    .load     (enc_done),
    .rows_in  (matrix),
    .rows_out (il_rows),
    .out_valid(data_out_en)
  );

  assign code_out = il_rows;

endmodule
