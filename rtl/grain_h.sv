// grain_h - pre-output function y of Grain-128AEAD.
//
// y = h(x) + s93 + b2 + b15 + b36 + b45 + b64 + b73 + b89, with
// h(x) = x0 x1 + x2 x3 + x4 x5 + x6 x7 + x0 x4 x8 and
// (x0..x8) = (b12, s8, s13, s20, b95, s42, s60, s79, s94).
// Two NFSR bits and seven LFSR bits feed h; seven further NFSR bits and one
// LFSR bit are added linearly. Purely combinational; index 0 of each window
// is the oldest bit.
module grain_h (
  input  logic [127:0] s,  // LFSR window
  input  logic [127:0] b,  // NFSR window
  output logic         y   // pre-output bit y_t
);

  logic h;

  always_comb begin
    h = (b[12] & s[8]) ^ (s[13] & s[20]) ^ (b[95] & s[42]) ^ (s[60] & s[79])
      ^ (b[12] & b[95] & s[94]);
    y = h ^ s[93] ^ b[2] ^ b[15] ^ b[36] ^ b[45] ^ b[64] ^ b[73] ^ b[89];
  end

endmodule
