// grain_ref_pkg - bit-serial software model of Grain-128AEAD for testbenches.
//
// The model keeps the LFSR and NFSR as bit arrays, computes feedback and
// pre-output from tap lists, and steps one bit at a time exactly as the
// cipher is specified: load, 256 steps with pre-output feedback, 128 steps
// with the key re-introduced while y_256..319 go to the accumulator and
// y_320..383 to the register, then alternating keystream/authentication
// bits. It shares no code with the RTL.
package grain_ref_pkg;

  class grain_model;
    bit s[128];
    bit b[128];
    bit k[128];
    bit a[64];
    bit r[64];

    static function bit parity_of(const ref bit v[128], input int taps[]);
      bit p = 0;
      foreach (taps[i]) p ^= v[taps[i]];
      return p;
    endfunction

    function bit lin_s();
      int taps[] = '{0, 7, 38, 70, 81, 96};
      return parity_of(s, taps);
    endfunction

    function bit nl_b();
      int lin[] = '{0, 26, 56, 91, 96};
      int q[][] = '{'{3, 67}, '{11, 13}, '{17, 18}, '{27, 59}, '{40, 48},
                    '{61, 65}, '{68, 84}, '{22, 24, 25}, '{70, 78, 82},
                    '{88, 92, 93, 95}};
      bit v = parity_of(b, lin);
      foreach (q[i]) begin
        bit m = 1;
        foreach (q[i][j]) m &= b[q[i][j]];
        v ^= m;
      end
      return v;
    endfunction

    function bit pre_out();
      int aset[] = '{2, 15, 36, 45, 64, 73, 89};
      bit x[9];
      x = '{b[12], s[8], s[13], s[20], b[95], s[42], s[60], s[79], s[94]};
      return (x[0] & x[1]) ^ (x[2] & x[3]) ^ (x[4] & x[5]) ^ (x[6] & x[7])
           ^ (x[0] & x[4] & x[8]) ^ s[93] ^ parity_of(b, aset);
    endfunction

    function void step(bit add_s, bit add_b);
      bit ns = lin_s() ^ add_s;
      bit nb = s[0] ^ nl_b() ^ add_b;
      for (int i = 0; i < 127; i++) begin
        s[i] = s[i+1];
        b[i] = b[i+1];
      end
      s[127] = ns;
      b[127] = nb;
    endfunction

    // Load and initialize; returns the 384 init pre-output bits.
    function void init(logic [127:0] key, logic [95:0] iv, output bit ys[$]);
      ys = {};
      for (int i = 0; i < 128; i++) begin
        k[i] = key[i];
        b[i] = key[i];
        s[i] = (i < 96) ? iv[i] : (i < 127);
      end
      for (int t = 0; t < 256; t++) begin
        bit yt = pre_out();
        ys.push_back(yt);
        step(yt, yt);
      end
      for (int t = 0; t < 128; t++) begin
        bit yt = pre_out();
        ys.push_back(yt);
        step(k[t], 0);
        if (t < 64) a[t] = yt; else r[t-64] = yt;
      end
    endfunction

    // Encrypt/authenticate one message bit (ad = associated data).
    function bit crypt_bit(bit m, bit ad);
      bit z, zp;
      z = pre_out();
      step(0, 0);
      zp = pre_out();
      step(0, 0);
      if (m) foreach (a[j]) a[j] ^= r[j];
      for (int j = 0; j < 63; j++) r[j] = r[j+1];
      r[63] = zp;
      return m ^ (z & !ad);
    endfunction

    function logic [63:0] tag();
      logic [63:0] t;
      foreach (a[j]) t[j] = a[j];
      return t;
    endfunction
  endclass

  // Reverse the bit order of a 128-bit hex literal: hex MSB first -> index 0.
  function automatic logic [127:0] rev128(logic [127:0] v);
    logic [127:0] o;
    for (int i = 0; i < 128; i++) o[i] = v[127-i];
    return o;
  endfunction

  function automatic logic [95:0] rev96(logic [95:0] v);
    logic [95:0] o;
    for (int i = 0; i < 96; i++) o[i] = v[95-i];
    return o;
  endfunction

  function automatic logic [63:0] rev64(logic [63:0] v);
    logic [63:0] o;
    for (int i = 0; i < 64; i++) o[i] = v[63-i];
    return o;
  endfunction

endpackage
