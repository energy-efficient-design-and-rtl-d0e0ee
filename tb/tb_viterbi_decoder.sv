// tb_viterbi_decoder: self-checking testbench of viterbi_decoder.
// Feeds terminated frames (16 data bits + 4 tail bits, 20 symbols), with
// random gaps in data_in_valid, and checks:
//   * error-free frames and frames with 1 to 5 flipped code bits decode to
//     the transmitted data (the code's free distance is 12);
//   * every single-bit error position of the worked example is corrected;
//   * frames with 6 to 12 flipped bits decode exactly as the behavioural
//     reference Viterbi decoder does;
//   * decoded_valid comes 20 clocks after the last symbol, and the 16 bits
//     then come out on sout, MSB first, on 16 consecutive clocks with
//     out_enable high, starting the clock after decoded_valid.
module tb_viterbi_decoder;
  import codec_ref_pkg::*;

  logic        clk = 1'b0;
  logic        reset;
  logic [2:0]  data_in;
  logic        data_in_valid;
  logic [15:0] decoded;
  logic        decoded_valid;
  logic        sout;
  logic        out_enable;
  int          checks = 0;
  int          failures = 0;

  viterbi_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // Flip n distinct random bits of a code word.
  function automatic bit [59:0] add_errors(input bit [59:0] c, input int n);
    bit [59:0] m;
    m = '0;
    while ($countones(m) < n) m[$urandom_range(59, 0)] = 1'b1;
    return c ^ m;
  endfunction

  task automatic decode(input bit [59:0] rx, input bit [15:0] exp, input bit gaps,
                        input string what);
    int cycles;
    bit [15:0] ser;
    for (int t = 0; t < 20; t++) begin
      if (gaps) begin
        int g;
        g = $urandom_range(2, 0);
        repeat (g) begin
          @(negedge clk);
          data_in_valid = 1'b0;
          data_in       = 3'($urandom);
        end
      end
      @(negedge clk);
      data_in       = rx[59-3*t -: 3];
      data_in_valid = 1'b1;
    end
    @(negedge clk);
    data_in_valid = 1'b0;
    cycles = 0;
    while (!decoded_valid && cycles < 200) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 20, $sformatf("%s: decoded_valid %0d clocks after last symbol, expected 20",
                                  what, cycles));
    check(decoded == exp, $sformatf("%s: decoded %b, expected %b", what, decoded, exp));
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      if (!out_enable) begin
        check(1'b0, $sformatf("%s: out_enable low at output bit %0d", what, i));
        break;
      end
      ser[15-i] = sout;
    end
    check(ser == exp, $sformatf("%s: serial output %b, expected %b", what, ser, exp));
    @(negedge clk);
    check(!out_enable, $sformatf("%s: out_enable longer than 16 clocks", what));
  endtask

  initial begin
    bit [15:0] d;
    bit [59:0] c;
    reset         = 1'b1;
    data_in       = '0;
    data_in_valid = 1'b0;
    repeat (3) @(negedge clk);
    reset = 1'b0;

    decode(EX_CODE, EX_DATA, 1'b0, "worked example");
    for (int p = 0; p < 60; p++)
      decode(EX_CODE ^ (60'd1 << p), EX_DATA, p[0], $sformatf("example, bit %0d flipped", p));
    for (int i = 0; i < 60; i++) begin
      d = 16'($urandom);
      c = ref_encode(d);
      decode(add_errors(c, i % 6), d, 1'b1, $sformatf("random frame, %0d errors", i % 6));
    end
    for (int i = 0; i < 40; i++) begin
      d = 16'($urandom);
      c = add_errors(ref_encode(d), 6 + i % 7);
      decode(c, ref_viterbi(c), 1'b1, $sformatf("random frame, %0d errors", 6 + i % 7));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
