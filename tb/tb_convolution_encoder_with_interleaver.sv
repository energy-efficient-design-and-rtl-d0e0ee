// tb_convolution_encoder_with_interleaver: self-checking testbench of the
// transmit chain. The worked-example frame 1101001111001011 must give
// code_out = 3d77324af3cd8105; 40 random frames are checked against the
// reference encoder followed by the reference interleaver. data_out_en must
// come 21 clocks after enable and last one clock.
module tb_convolution_encoder_with_interleaver;
  import codec_ref_pkg::*;

  logic        clk = 1'b0;
  logic        reset;
  logic        enable;
  logic [15:0] data_in;
  logic [63:0] code_out;
  logic        data_out_en;
  int          checks = 0;
  int          failures = 0;

  convolution_encoder_with_interleaver dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic send(input bit [15:0] d);
    int cycles;
    bit [63:0] exp;
    exp = ref_interleave({4'h0, ref_encode(d)});
    @(negedge clk);
    data_in = d;
    enable  = 1'b1;
    @(negedge clk);
    enable  = 1'b0;
    cycles  = 0;
    while (!data_out_en && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 21, $sformatf("latency %0d, expected 21", cycles));
    check(code_out == exp, $sformatf("data %h: code_out %h, expected %h", d, code_out, exp));
    @(negedge clk);
    check(!data_out_en, "data_out_en longer than one clock");
  endtask

  initial begin
    reset   = 1'b1;
    enable  = 1'b0;
    data_in = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    send(EX_DATA);
    check(code_out == EX_INTLV, "worked example: code_out 3d77324af3cd8105");
    for (int i = 0; i < 40; i++) send(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
