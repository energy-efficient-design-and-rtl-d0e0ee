// tb_convolutional_decoder_with_deinterleaver: self-checking testbench of the
// receive chain. Each frame: hold reset, apply the eight received rows,
// release reset, collect the 16 bits on sout while out_enable is high.
// Checks:
//   * the worked example rows 05 81 cd f3 4a 32 77 3d give 1101001111001011;
//   * every single flipped bit of the 64 received bits is corrected;
//   * bursts of 1 to 10 consecutive flipped bits in the received word (a
//     burst inside or across transmitted rows) are corrected, because
//     de-interleaving spreads them 8 code bits apart;
//   * the first output bit comes 43 clocks after reset is released, the 16
//     bits come on consecutive clocks, and the block stays quiet afterwards.
module tb_convolutional_decoder_with_deinterleaver;
  import codec_ref_pkg::*;

  logic       clk = 1'b0;
  logic       reset;
  logic [7:0] r0, r1, r2, r3, r4, r5, r6, r7;
  logic       out_enable;
  logic       sout;
  int         checks = 0;
  int         failures = 0;

  convolutional_decoder_with_deinterleaver dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic receive(input bit [63:0] rx, input bit [15:0] exp, input string what);
    int cycles;
    bit [15:0] got;
    @(negedge clk);
    reset = 1'b1;
    {r7, r6, r5, r4, r3, r2, r1, r0} = rx;
    repeat (2) @(negedge clk);
    reset  = 1'b0;
    cycles = 0;
    @(negedge clk);
    {r7, r6, r5, r4, r3, r2, r1, r0} = ~rx;   // rows only needed on the first clock
    cycles = 1;
    while (!out_enable && cycles < 200) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 43, $sformatf("%s: first bit %0d clocks after reset, expected 43", what, cycles));
    for (int i = 0; i < 16; i++) begin
      if (!out_enable) begin
        check(1'b0, $sformatf("%s: out_enable low at bit %0d", what, i));
        break;
      end
      got[15-i] = sout;
      @(negedge clk);
    end
    check(got == exp, $sformatf("%s: decoded %b, expected %b", what, got, exp));
    repeat (50) begin
      if (out_enable) break;
      @(negedge clk);
    end
    check(!out_enable, $sformatf("%s: output repeated without a reset", what));
  endtask

  initial begin
    bit [15:0] d;
    bit [63:0] tx;
    reset = 1'b1;
    {r7, r6, r5, r4, r3, r2, r1, r0} = '0;
    repeat (2) @(negedge clk);

    receive(EX_INTLV, EX_DATA, "worked example");
    for (int p = 0; p < 64; p++)
      receive(EX_INTLV ^ (64'd1 << p), EX_DATA, $sformatf("example, bit %0d flipped", p));
    for (int i = 0; i < 60; i++) begin
      int len, pos;
      d   = 16'($urandom);
      tx  = ref_interleave({4'h0, ref_encode(d)});
      len = 1 + i % 10;
      pos = $urandom_range(64 - len, 0);
      receive(tx ^ (((64'd1 << len) - 1) << pos), d,
              $sformatf("burst of %0d at bit %0d", len, pos));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
