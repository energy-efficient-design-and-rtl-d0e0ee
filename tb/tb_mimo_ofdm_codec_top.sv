// tb_mimo_ofdm_codec_top: end-to-end testbench of the channel-coding path,
// with the top at its default (and only) configuration.
//
// Each frame is encoded and interleaved by the transmit chain, passed through
// a channel model that flips bits of the 64-bit interleaved word, and decoded
// by the receive chain. The channel model applies, in turn: no error, one
// flipped bit, a burst of 2 to 10 consecutive flipped bits, and 8 to 15
// scattered flipped bits. The decoded bits are compared with the transmitted
// frame (clean, single-bit and burst cases, all within what the link
// corrects) or with the behavioural reference decoder (heavy scattered
// errors, which may exceed the code's power).
//
// It counts how often each mechanism of the design happened and fails if one
// never did: error-free frames, single-bit corrections, bursts that the
// de-interleaver spread into correctable errors although the same burst
// applied to the non-interleaved code word defeats the decoder, and frames
// whose errors exceeded the code's correcting power.
module tb_mimo_ofdm_codec_top;
  import codec_ref_pkg::*;

  logic            clk = 1'b0;
  logic            tx_reset;
  logic            tx_enable;
  logic [15:0]     tx_data_in;
  logic [63:0]     tx_code_out;
  logic            tx_data_out_en;
  logic            rx_reset;
  logic [7:0][7:0] rx_rows;
  logic            rx_out_enable;
  logic            rx_sout;
  int              checks = 0;
  int              failures = 0;

  int n_clean = 0, n_single = 0, n_burst = 0, n_burst_needs_intlv = 0;
  int n_uncorrectable = 0;

  mimo_ofdm_codec_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic transmit(input bit [15:0] d, output bit [63:0] word);
    int cycles;
    @(negedge clk);
    tx_data_in = d;
    tx_enable  = 1'b1;
    @(negedge clk);
    tx_enable = 1'b0;
    cycles    = 0;
    while (!tx_data_out_en && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 21, $sformatf("transmit latency %0d, expected 21", cycles));
    word = tx_code_out;
    check(word == ref_interleave({4'h0, ref_encode(d)}),
          $sformatf("data %h: code_out %h", d, word));
  endtask

  task automatic receive(input bit [63:0] rx, output bit [15:0] got);
    int cycles;
    @(negedge clk);
    rx_reset = 1'b1;
    rx_rows  = rx;
    repeat (2) @(negedge clk);
    rx_reset = 1'b0;
    cycles   = 0;
    while (!rx_out_enable && cycles < 200) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 43, $sformatf("receive latency %0d, expected 43", cycles));
    for (int i = 0; i < 16; i++) begin
      got[15-i] = rx_sout;
      @(negedge clk);
    end
  endtask

  initial begin
    bit [15:0] d, got;
    bit [63:0] word, mask;
    tx_reset   = 1'b1;
    rx_reset   = 1'b1;
    tx_enable  = 1'b0;
    tx_data_in = '0;
    rx_rows    = '0;
    repeat (3) @(negedge clk);
    tx_reset = 1'b0;

    // worked example through the whole path
    transmit(EX_DATA, word);
    check(word == EX_INTLV, "worked example: 3d77324af3cd8105 on the link");
    receive(word, got);
    check(got == EX_DATA, "worked example decoded");
    n_clean++;

    for (int f = 0; f < 160; f++) begin
      int kind;
      d    = 16'($urandom);
      transmit(d, word);
      kind = f % 4;
      mask = '0;
      case (kind)
        0: ;
        1: mask[$urandom_range(63, 0)] = 1'b1;
        2: begin
          int len, pos;
          bit [59:0] raw;
          len  = 2 + (f / 4) % 9;
          pos  = $urandom_range(64 - len, 0);
          mask = ((64'd1 << len) - 1) << pos;
          // the same burst on the code word sent without interleaving
          raw  = ref_encode(d) ^ 60'(((64'd1 << len) - 1) << (pos > 60 - len ? 60 - len : pos));
          if (ref_viterbi(raw) != d) n_burst_needs_intlv++;
        end
        default: while ($countones(mask) < 8 + (f / 4) % 8) mask[$urandom_range(63, 0)] = 1'b1;
      endcase
      receive(word ^ mask, got);
      if (kind == 3) begin
        bit [63:0] dw;
        dw = ref_deinterleave(word ^ mask);
        check(got == ref_viterbi(dw[59:0]), $sformatf("frame %0d: heavy errors, decoder differs from reference", f));
        if (got != d) n_uncorrectable++;
      end else begin
        check(got == d, $sformatf("frame %0d (kind %0d): decoded %h, sent %h", f, kind, got, d));
        if (kind == 0) n_clean++;
        if (kind == 1) n_single++;
        if (kind == 2) n_burst++;
      end
    end

    $display("error-free frames: %0d", n_clean);
    $display("single-bit errors corrected: %0d", n_single);
    $display("bursts corrected: %0d (of which %0d defeat the decoder without interleaving)",
             n_burst, n_burst_needs_intlv);
    $display("frames beyond the code's correcting power: %0d", n_uncorrectable);
    check(n_clean > 0, "no error-free frame");
    check(n_single > 0, "no single-bit correction");
    check(n_burst > 0, "no burst correction");
    check(n_burst_needs_intlv > 0, "no burst that needed the interleaver");
    check(n_uncorrectable > 0, "no frame beyond the correcting power");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
