// grain_g - non-linear feedback function F(B) of the 128-bit NFSR.
//
// F(B) = b0 + b26 + b56 + b91 + b96 + b3 b67 + b11 b13 + b17 b18 + b27 b59
//      + b40 b48 + b61 b65 + b68 b84 + b22 b24 b25 + b70 b78 b82
//      + b88 b92 b93 b95
// over GF(2). The NFSR feedback is s0 + F(B); the s0 term is added by the
// caller because it comes from the LFSR. Purely combinational; the input is
// the whole 128-bit NFSR window (index 0 = oldest bit).
module grain_g (
  input  logic [127:0] b,   // NFSR window b_t .. b_{t+127}
  output logic         fb   // F(B_t)
);

  logic lin, quad, cub, quart;

  always_comb begin
    lin   = b[0] ^ b[26] ^ b[56] ^ b[91] ^ b[96];
    quad  = (b[3] & b[67]) ^ (b[11] & b[13]) ^ (b[17] & b[18]) ^ (b[27] & b[59])
          ^ (b[40] & b[48]) ^ (b[61] & b[65]) ^ (b[68] & b[84]);
    cub   = (b[22] & b[24] & b[25]) ^ (b[70] & b[78] & b[82]);
    quart = b[88] & b[92] & b[93] & b[95];
    fb    = lin ^ quad ^ cub ^ quart;
  end

endmodule
