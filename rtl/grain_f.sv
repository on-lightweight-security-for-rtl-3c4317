// grain_f - linear feedback function of the 128-bit LFSR.
//
// Computes L(S) = s0 + s7 + s38 + s70 + s81 + s96 over GF(2), the feedback of
// the primitive polynomial f(x) = 1 + x^32 + x^47 + x^58 + x^90 + x^121 + x^128.
// Purely combinational. The input is the whole 128-bit window of the LFSR
// (index 0 = oldest bit, the one leaving next); only the six taps are used.
// The pre-output generator instantiates one copy per step it advances in a
// clock, which is how the cipher is parallelized.
module grain_f (
  input  logic [127:0] s,  // LFSR window s_t .. s_{t+127}
  output logic         l   // L(S_t)
);

  assign l = s[0] ^ s[7] ^ s[38] ^ s[70] ^ s[81] ^ s[96];

endmodule
