// tb_interleaver: self-checking testbench of interleaver. Loads the worked
// example's 8x8 matrix (code word 0e5ce8e894c578cf, expected output
// 3d77324af3cd8105) and 50 random matrices, checks the result against the
// index formula out[8j+k] = in[8k+j], the one-clock latency, the single-clock
// out_valid and that rows_out holds between loads.
module tb_interleaver;
  import codec_ref_pkg::*;

  logic                 clk = 1'b0;
  logic                 reset;
  logic                 load;
  logic [7:0][7:0]      rows_in;
  logic [7:0][7:0]      rows_out;
  logic                 out_valid;
  int                   checks = 0;
  int                   failures = 0;

  interleaver dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic run(input bit [63:0] m);
    @(negedge clk);
    rows_in = m;
    load    = 1'b1;
    @(negedge clk);
    load    = 1'b0;
    rows_in = ~m;
    check(out_valid, "out_valid one clock after load");
    check(rows_out == ref_interleave(m),
          $sformatf("in %h: out %h, expected %h", m, rows_out, ref_interleave(m)));
    @(negedge clk);
    check(!out_valid, "out_valid longer than one clock");
    check(rows_out == ref_interleave(m), "rows_out not held");
  endtask

  initial begin
    reset   = 1'b1;
    load    = 1'b0;
    rows_in = '0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    run({4'h0, EX_CODE});
    check(rows_out == EX_INTLV, "worked example interleaved word");
    check(rows_out[0] == 8'b00000101 && rows_out[7] == 8'b00111101,
          "worked example first and last output rows");
    for (int i = 0; i < 50; i++) run({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
