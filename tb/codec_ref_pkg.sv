// codec_ref_pkg: reference models used by the testbenches of the channel
// coder. They are written from the definition of the code, independently of
// the RTL: the encoder walks a bit list with explicit tap vectors, the
// (de)interleaver uses the index formula out[8j+k] = in[8k+j], and the
// Viterbi reference is a plain behavioural loop over integers.
//
// Code: rate 1/3, constraint length 5, generators 37, 33, 25 (octal), 16 data
// bits sent MSB first, 4 zero tail bits; symbol t at code[59-3t -: 3].
package codec_ref_pkg;

  localparam bit [4:0] TAPS [3] = '{5'b11111, 5'b11011, 5'b10101};

  // Worked example of the source design.
  localparam bit [15:0] EX_DATA  = 16'b1101001111001011;
  localparam bit [59:0] EX_CODE  = 60'he5ce8e894c578cf;
  localparam bit [63:0] EX_INTLV = 64'h3d77324af3cd8105;

  function automatic bit [59:0] ref_encode(input bit [15:0] data);
    bit seq [20];
    bit [59:0] code;
    int pos;
    for (int i = 0; i < 20; i++) seq[i] = (i < 16) ? data[15-i] : 1'b0;
    pos = 59;
    for (int t = 0; t < 20; t++) begin
      for (int g = 0; g < 3; g++) begin
        bit v;
        v = 1'b0;
        // tap 4 (MSB) = current bit, tap 0 = bit four steps back
        for (int d = 0; d < 5; d++)
          if (TAPS[g][4-d] && (t - d) >= 0) v ^= seq[t-d];
        code[pos] = v;
        pos--;
      end
    end
    return code;
  endfunction

  function automatic bit [63:0] ref_interleave(input bit [63:0] in);
    bit [63:0] out;
    for (int j = 0; j < 8; j++)
      for (int k = 0; k < 8; k++)
        out[8*j+k] = in[8*k+j];
    return out;
  endfunction

  // The transpose is its own inverse.
  function automatic bit [63:0] ref_deinterleave(input bit [63:0] in);
    return ref_interleave(in);
  endfunction

  // Branch output of the encoder for input bit b and the four previous bits
  // p[0] (newest) .. p[3] (oldest), packed in state as {p0,p1,p2,p3}.
  function automatic bit [2:0] ref_branch(input int b, input int state);
    bit [4:0] u;
    bit [2:0] o;
    u = 5'((b << 4) | state);
    for (int g = 0; g < 3; g++) o[2-g] = ^(u & TAPS[g]);
    return o;
  endfunction

  // Behavioural hard-decision Viterbi decoder of one terminated frame.
  // On equal metrics the predecessor whose oldest bit is 0 is kept.
  function automatic bit [15:0] ref_viterbi(input bit [59:0] code);
    int pm [16];
    int npm [16];
    int dec [20][16];
    int st;
    bit [15:0] data;
    for (int s = 0; s < 16; s++) pm[s] = (s == 0) ? 0 : 1000;
    for (int t = 0; t < 20; t++) begin
      bit [2:0] rx;
      rx = code[59-3*t -: 3];
      for (int ns = 0; ns < 16; ns++) begin
        int best;
        best = -1;
        for (int x = 0; x < 2; x++) begin
          int ps, m;
          bit [2:0] d;
          ps = ((ns & 7) << 1) | x;
          d  = ref_branch(ns >> 3, ps) ^ rx;
          m  = pm[ps] + d[0] + d[1] + d[2];
          if (best < 0 || m < best) begin
            best = m;
            dec[t][ns] = x;
          end
        end
        npm[ns] = best;
      end
      pm = npm;
    end
    st = 0;
    for (int t = 19; t >= 0; t--) begin
      if (t < 16) data[15-t] = bit'(st >> 3);
      st = ((st & 7) << 1) | dec[t][st];
    end
    return data;
  endfunction

endpackage
