// codec_pkg: constants and helper functions shared by the channel-coding
// transmit and receive chains.
//
// The code is a rate-1/3 convolutional code with constraint length 5
// (memory 4). A 16-bit frame is followed by 4 zero tail bits, so the encoder
// emits 20 three-bit symbols = 60 code bits, which are padded with 4 zero bits
// to fill the 8x8 interleaver matrix (64 bits).
//
// The frame length, the rate, the 60-bit code word, the 8x8 matrix and the
// 64-bit interleaved word come from the source design. The generator
// polynomials 37, 33 and 25 (octal) are not stated there; they are the only
// rate-1/3 code of constraint length up to 7 that reproduces its worked example
// (16-bit frame 1101001111001011 -> code 0e5ce8e894c578cf).
//
// Bit conventions used throughout:
//   * data bits enter the encoder MSB first (data_in[15] first);
//   * symbol t of the frame sits at code[59-3t -: 3]; within a symbol bit 2
//     is generator G0, bit 1 G1, bit 0 G2;
//   * the encoder register is u = {current bit, 4 previous bits}, newest
//     first; a generator's MSB taps the current bit.
//   * the trellis state is the 4 previous bits, newest in the MSB.
package codec_pkg;

  localparam int unsigned DATA_BITS = 16;              // frame length
  localparam int unsigned K         = 5;               // constraint length
  localparam int unsigned MEM       = K - 1;           // encoder memory / tail bits
  localparam int unsigned N_OUT     = 3;               // code bits per data bit (rate 1/3)
  localparam int unsigned STEPS     = DATA_BITS + MEM; // trellis steps per frame (20)
  localparam int unsigned CODE_BITS = STEPS * N_OUT;   // 60
  localparam int unsigned ROWS      = 8;               // interleaver matrix rows
  localparam int unsigned COLS      = 8;               // interleaver matrix columns
  localparam int unsigned BLOCK_BITS = ROWS * COLS;    // 64
  localparam int unsigned NSTATES   = 1 << MEM;        // 16 trellis states

  localparam logic [K-1:0] G0 = 5'o37;  // 11111
  localparam logic [K-1:0] G1 = 5'o33;  // 11011
  localparam logic [K-1:0] G2 = 5'o25;  // 10101

  typedef logic [N_OUT-1:0] symbol_t;
  typedef logic [MEM-1:0]   state_t;
  typedef logic [COLS-1:0]  row_t;

  // Code symbol produced when bit b enters with encoder state s.
  function automatic symbol_t conv_symbol(input logic b, input state_t s);
    logic [K-1:0] u;
    u = {b, s};
    return {^(u & G0), ^(u & G1), ^(u & G2)};
  endfunction

  // Number of differing bits between two symbols (hard-decision branch metric).
  function automatic logic [1:0] hamming3(input symbol_t a, input symbol_t b);
    symbol_t d;
    d = a ^ b;
    return 2'(d[0]) + 2'(d[1]) + 2'(d[2]);
  endfunction

endpackage
