// mimo_ofdm_codec_top: channel-coding path of a MIMO-OFDM link.
//
// The transmit chain (convolutional encoder + 8x8 interleaver) turns each
// 16-bit frame into a 64-bit interleaved code word. In the full system that
// word would go through QPSK mapping, a space-time encoder, four antennas, the
// radio channel, four receive antennas, a space-time decoder and QPSK
// demodulation; none of those is part of this design. The top therefore
// brings the interleaved word out on tx_code_out and takes the received word
// back in on rx_rows, where a channel model (or the rest of the modem) sits.
// The receive chain (de-interleaver + Viterbi decoder) returns the 16 data
// bits serially on rx_sout.
//
// Interface and timing: see the two chains. Transmit: pulse tx_enable with
// tx_data_in, tx_code_out valid with tx_data_out_en 21 clocks later. Receive:
// rx_rows are captured on the first clock after rx_reset is released, and
// rx_sout carries the decoded bits while rx_out_enable is high about 42
// clocks later. rx_rows[j] is interleaved row j, bits [8j+7:8j] of
// tx_code_out. One clock serves both chains; the two have separate resets
// because they sit at the two ends of the link.
module mimo_ofdm_codec_top
  import codec_pkg::*;
(
  input  logic                       clk,
  // transmit chain
  input  logic                       tx_reset,
  input  logic                       tx_enable,
  input  logic [DATA_BITS-1:0]       tx_data_in,
  output logic [BLOCK_BITS-1:0]      tx_code_out,
  output logic                       tx_data_out_en,
  // receive chain
  input  logic                       rx_reset,
  input  logic [COLS-1:0][ROWS-1:0]  rx_rows,
  output logic                       rx_out_enable,
  output logic                       rx_sout
);

  convolution_encoder_with_interleaver u_tx (
    .clk        (clk),
    .reset      (tx_reset),
    .enable     (tx_enable),
    .data_in    (tx_data_in),
    .code_out   (tx_code_out),
    .data_out_en(tx_data_out_en)
  );

  convolutional_decoder_with_deinterleaver u_rx (
    .clk       (clk),
    .reset     (rx_reset),
    .r0        (rx_rows[0]),
    .r1        (rx_rows[1]),
    .r2        (rx_rows[2]),
    .r3        (rx_rows[3]),
    .r4        (rx_rows[4]),
    .r5        (rx_rows[5]),
    .r6        (rx_rows[6]),
    .r7        (rx_rows[7]),
    .out_enable(rx_out_enable),
    .sout      (rx_sout)
  );

endmodule
