// exp_golomb: single-cycle Exp-Golomb decoder (ue(v) and se(v)).
//
// The input is the next 33 bits of the bitstream, first bit in bits[32].
// A code is M leading zeros, a one, then M info bits; codeNum is
// 2^M - 1 + info. The signed mapping gives 0, 1, -1, 2, -2, ... for
// codeNum 0, 1, 2, 3, 4, ... (value = (-1)^(k+1) * ceil(k/2)).
// This is the one-cycle decoder for syntax elements of at most 16 bits
// (codes of at most 33 bits); `ok` is low when no code of that size starts
// at bits[32]. Purely combinational: a leading-zero count, a shift, an add.
module exp_golomb (
  input  logic [32:0]        bits,
  output logic               ok,
  output logic [5:0]         len,      // code length in bits
  output logic [15:0]        code_num, // ue(v)
  output logic signed [16:0] se_val    // se(v)
);
  logic [4:0]  lz;
  logic [32:0] shifted;
  logic [16:0] cn;

  always_comb begin
    lz = 5'd17;
    for (int i = 0; i <= 16; i++)
      if (lz == 5'd17 && bits[32-i]) lz = 5'(i);
    ok       = (lz <= 5'd16);
    len      = ok ? 6'(2 * lz + 1) : 6'd0;
    // the M+1 bits starting at the leading one are codeNum + 1
    shifted  = bits << lz;
    cn       = ok ? (17'(shifted[32:16] >> (5'd16 - lz)) - 17'd1) : 17'd0;
    code_num = cn[15:0];
    se_val   = cn[0] ? $signed((cn + 17'd1) >> 1) : -$signed(cn >> 1);
  end
endmodule
