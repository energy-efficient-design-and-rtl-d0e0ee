// tb_deinterleaver: self-checking testbench of deinterleaver. Loads the
// worked example's received rows (05 81 cd f3 4a 32 77 3d) and 30 random
// 64-bit words, and checks that the 20 symbols coming out are, in order, the
// 3-bit groups of the de-interleaved word from bit 59 down, one per clock
// starting the clock after the load, that `last` marks the 20th and that a
// load while busy is ignored.
module tb_deinterleaver;
  import codec_ref_pkg::*;

  logic            clk = 1'b0;
  logic            reset;
  logic            load;
  logic [7:0][7:0] rows_in;
  logic [2:0]      sym_out;
  logic            sym_valid;
  logic            last;
  logic            busy;
  int              checks = 0;
  int              failures = 0;

  deinterleaver dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  task automatic run(input bit [63:0] rx);
    bit [63:0] word;
    bit [59:0] got;
    int n;
    word = ref_deinterleave(rx);
    @(negedge clk);
    rows_in = rx;
    load    = 1'b1;
    @(negedge clk);
    load    = 1'b0;
    n = 0;
    got = '0;
    check(busy, "busy after load");
    for (int c = 0; c < 20; c++) begin
      if (c == 3) begin
        rows_in = ~rx;       // a load while busy must be ignored
        load    = 1'b1;
      end
      @(negedge clk);
      load = 1'b0;
      if (sym_valid) begin
        got[59-3*n -: 3] = sym_out;
        check(last == (n == 19), $sformatf("last flag at symbol %0d", n));
        n++;
      end
    end
    check(n == 20, $sformatf("%0d symbols in 20 clocks, expected 20", n));
    check(got == word[59:0], $sformatf("rx %h: stream %h, expected %h", rx, got, word[59:0]));
    if (rx == EX_INTLV) check(got == EX_CODE, "worked example gives code word 0e5ce8e894c578cf");
    @(negedge clk);
    check(!sym_valid, "no symbol after the 20th");
  endtask

  initial begin
    reset   = 1'b1;
    load    = 1'b0;
    rows_in = '0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    run(EX_INTLV);
    for (int i = 0; i < 30; i++) run({$urandom, $urandom});
    // the worked example must give back the encoder's code word
    run(EX_INTLV);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
