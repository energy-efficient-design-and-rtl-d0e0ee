// tb_convolutional_encoder: self-checking testbench of convolutional_encoder.
// Encodes the worked-example frame (expected code word 0e5ce8e894c578cf) and
// 40 random frames, compares each code word with the reference encoder, checks
// that data_out_en comes exactly 20 clocks after enable and lasts one clock,
// and that enable is ignored while a frame is being encoded.
module tb_convolutional_encoder;
  import codec_ref_pkg::*;

  logic        clk = 1'b0;
  logic        reset;
  logic        enable;
  logic [15:0] data_in;
  logic [59:0] data_out;
  logic        data_out_en;
  int          checks = 0;
  int          failures = 0;

  convolutional_encoder dut (.*);

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

  task automatic encode(input bit [15:0] d, input bit poke_enable);
    int cycles;
    @(negedge clk);
    data_in = d;
    enable  = 1'b1;
    @(negedge clk);
    enable  = 1'b0;
    data_in = ~d;                         // input must have been latched
    cycles  = 0;
    while (!data_out_en && cycles < 100) begin
      if (poke_enable && cycles == 5) enable = 1'b1;   // must be ignored
      @(negedge clk);
      enable = 1'b0;
      cycles++;
    end
    check(cycles == 20, $sformatf("latency %0d, expected 20", cycles));
    check(data_out == ref_encode(d),
          $sformatf("data %h: code %h, expected %h", d, data_out, ref_encode(d)));
    @(negedge clk);
    check(!data_out_en, "data_out_en longer than one clock");
    check(data_out == ref_encode(d), "data_out not held");
  endtask

  initial begin
    reset   = 1'b1;
    enable  = 1'b0;
    data_in = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    encode(EX_DATA, 1'b0);
    check(data_out == EX_CODE, "worked example code word");
    encode(EX_DATA ^ 16'h0001, 1'b1);
    for (int i = 0; i < 40; i++) encode(16'($urandom), i[0]);
    encode(16'hffff, 1'b0);
    encode(16'h0000, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
