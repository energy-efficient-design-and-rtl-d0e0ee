// convolutional_encoder: rate-1/3, constraint-length-5 convolutional encoder
// for one 16-bit frame.
//
// On a clock with `enable` high while idle, the frame on data_in is latched.
// Its bits then enter the shift register one per clock, MSB first, followed by
// 4 zero tail bits that bring the encoder back to the all-zero state. Each
// clock appends one 3-bit symbol (generators 37, 33, 25 octal) at the LSB end
// of data_out, so after 20 clocks data_out holds the whole 60-bit code word
// with the first symbol in bits [59:57]. data_out_en is then high for one
// clock; data_out holds its value until the next frame starts.
//
// Timing: enable at clock 0, data_out_en at clock 20 after it (20 encoding
// clocks); a new enable is accepted the clock after data_out_en.
//
// From the source design: the port names (data_in[15:0], clk, enable, reset,
// data_out[59:0]), the rate, the 16-bit frame and 60-bit code word. Own
// choices: the generators (recovered from the worked example, see codec_pkg),
// serial bit-per-clock operation, synchronous active-high reset, and that
// data_out is cleared when a frame starts.
module convolutional_encoder
  import codec_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_BITS,
  localparam int unsigned NSTEP = DATA_W + MEM,
  localparam int unsigned CODE_W = NSTEP * N_OUT
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              enable,
  input  logic [DATA_W-1:0] data_in,
  output logic [CODE_W-1:0] data_out,
  output logic              data_out_en
);

  logic [DATA_W-1:0]          shreg;   // remaining data bits, next bit in MSB
  state_t                     state;   // previous 4 input bits, newest in MSB
  logic [$clog2(NSTEP+1)-1:0] count;   // steps still to run
  logic                       busy;
  logic                       cur_bit;

  // Tail steps feed zeros: the shift register has shifted zeros in by then.
  assign cur_bit = shreg[DATA_W-1];

  always_ff @(posedge clk) begin
    if (reset) begin
      shreg       <= '0;
      state       <= '0;
      count       <= '0;
      busy        <= 1'b0;
      data_out    <= '0;
      data_out_en <= 1'b0;
    end else begin
      data_out_en <= 1'b0;
      if (!busy) begin
        if (enable) begin
          shreg    <= data_in;
          state    <= '0;
          count    <= ($clog2(NSTEP+1))'(NSTEP);
          busy     <= 1'b1;
          data_out <= '0;
        end
      end else begin
        data_out <= {data_out[CODE_W-N_OUT-1:0], conv_symbol(cur_bit, state)};
        state    <= {cur_bit, state[MEM-1:1]};
        shreg    <= {shreg[DATA_W-2:0], 1'b0};
        count    <= count - 1'b1;
        if (count == 1) begin
          busy        <= 1'b0;
          data_out_en <= 1'b1;
        end
      end
    end
  end

  // The completion strobe lasts exactly one clock.
  a_done_one_clock: assert property (@(posedge clk) disable iff (reset) data_out_en |=> !data_out_en);

endmodule
