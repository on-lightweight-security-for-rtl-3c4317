// grain_top_driver - stimulus and checking for one grain128aead instance.
//
// Drives the core through complete key/nonce/message operations and checks
// every ciphertext chunk and every tag against the bit-serial model in
// grain_ref_pkg. It runs:
//  * the two test vectors published with the cipher, once with the given
//    message (tag checked against the published value) and once with a
//    zero message, whose ciphertext is the published keystream;
//  * NRAND random key/nonce/message operations with associated-data bits,
//    random stalls on in_valid and, in some of them, a restart (start
//    pulsed again in the middle of initialization);
// and checks the clock counts: 512/P clocks from start to ready, 640/P
// clocks from start to the last chunk of a 64-bit message without stalls,
// and the tag latency (1 clock, +1 with AUTH_PIPE, +1 at P = 1).
// Stimulus and sampling happen on the falling clock edge. The mechanism
// counters report how often each behaviour was exercised.
module grain_top_driver
  import grain_ref_pkg::*;
#(
  parameter int unsigned P         = 32,
  parameter bit          AUTH_PIPE = 1'b1,
  parameter int unsigned NRAND     = 6,
  localparam int unsigned W        = (P > 1) ? P / 2 : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         start,
  output logic [127:0] key,
  output logic [95:0]  iv,
  input  logic         ready,
  output logic         in_valid,
  input  logic         in_ready,
  output logic [W-1:0] in_data,
  output logic [W-1:0] in_ad,
  output logic         in_last,
  input  logic         out_valid,
  input  logic [W-1:0] out_data,
  input  logic [63:0]  tag,
  input  logic         tag_valid,
  output logic         finished,
  output int           checks,
  output int           failures,
  output int           n_ops,
  output int           n_stall,
  output int           n_ad,
  output int           n_restart,
  output int           n_tv
);

  int cyc_start_to_last;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL P=%0d pipe=%0d: %s", P, AUTH_PIPE, what);
    end
  endtask

  task automatic do_start(logic [127:0] k, logic [95:0] v, bit restart, output int clocks);
    key   = k;
    iv    = v;
    start = 1'b1;
    @(negedge clk);
    start  = 1'b0;
    clocks = 1;
    if (restart) begin
      repeat (1 + $urandom_range(256 / P)) begin
        @(negedge clk);
        clocks++;
      end
      start = 1'b1;
      @(negedge clk);
      start  = 1'b0;
      clocks = 1;
      n_restart++;
    end
    while (!ready) begin
      @(negedge clk);
      clocks++;
      if (clocks > 2000) break;
    end
    clocks = clocks - 1;  // clocks after the start edge until running
  endtask

  // One operation: message bits m (padding included, zero-filled to W),
  // ad flags; checks ciphertext and tag against the model.
  task automatic run_op(logic [127:0] k, logic [95:0] v, bit m[$], bit ad[$],
                        bit stalls, bit restart, bit check_ks, logic [127:0] ks_exp,
                        bit check_tag, logic [63:0] tag_exp, output int total_clocks);
    grain_model g = new;
    bit ys[$];
    bit c_exp[$];
    logic [127:0] ks_got;
    int clocks, nchunks, lat, pos;
    g.init(k, v, ys);
    foreach (m[i]) c_exp.push_back(g.crypt_bit(m[i], ad[i]));
    do_start(k, v, restart, clocks);
    check(clocks == 512 / P, $sformatf("start to ready %0d clocks, expected %0d", clocks, 512 / P));
    check(!tag_valid, "tag_valid cleared by start");
    total_clocks = clocks;
    nchunks = m.size() / W;
    pos = 0;
    for (int ci = 0; ci < nchunks; ci++) begin
      if (stalls && ($urandom_range(3) == 0)) begin
        in_valid = 1'b0;
        repeat (1 + $urandom_range(3)) begin
          @(negedge clk);
          total_clocks++;
          n_stall++;
          check(!out_valid || ci > 0, "no output while stalled");
        end
      end
      for (int u = 0; u < W; u++) begin
        in_data[u] = m[ci*W+u];
        in_ad[u]   = ad[ci*W+u];
        if (ad[ci*W+u]) n_ad++;
      end
      in_last  = (ci == nchunks - 1);
      in_valid = 1'b1;
      while (!in_ready) begin
        @(negedge clk);
        total_clocks++;
      end
      @(negedge clk);  // accepted at this edge
      total_clocks++;
      in_valid = 1'b0;
      check(out_valid, "out_valid after accept");
      for (int u = 0; u < W; u++) begin
        if (out_data[u] !== c_exp[ci*W+u]) begin
          check(0, $sformatf("ciphertext chunk %0d bit %0d", ci, u));
          break;
        end
        if (ci*W+u < 128) ks_got[127-(ci*W+u)] = out_data[u];
      end
      checks++;
    end
    in_last = 1'b0;
    lat = 0;
    while (!tag_valid && lat < 10) begin
      @(negedge clk);
      lat++;
    end
    check(lat == ((P == 1) ? 1 : 0) + (AUTH_PIPE ? 1 : 0),
          $sformatf("tag latency %0d clocks after last chunk", lat + 1));
    check(tag === g.tag(), $sformatf("tag %h, model %h", tag, g.tag()));
    if (check_tag) begin
      check(tag === rev64(tag_exp), $sformatf("tag %h vs published %h", rev64(tag), tag_exp));
      n_tv++;
    end
    if (check_ks) begin
      check(ks_got === ks_exp, $sformatf("keystream %h vs published %h", ks_got, ks_exp));
      n_tv++;
    end
    n_ops++;
  endtask

  task automatic pad(ref bit m[$], ref bit ad[$]);
    m.push_back(1'b1);
    ad.push_back(1'b0);
    while (m.size() % W != 0) begin
      m.push_back(1'b0);
      ad.push_back(1'b0);
    end
  endtask

  // Hex message string to bits, MSB of each byte first.
  function automatic void hexbits(logic [127:0] v, int nbits, ref bit m[$], ref bit ad[$]);
    for (int i = nbits - 1; i >= 0; i--) begin
      m.push_back(v[i]);
      ad.push_back(1'b0);
    end
  endfunction

  initial begin
    bit m[$], ad[$];
    int tc;
    logic [127:0] k;
    logic [95:0]  v;
    start = 0; key = '0; iv = '0; in_valid = 0; in_data = '0; in_ad = '0; in_last = 0;
    finished = 0; checks = 0; failures = 0;
    n_ops = 0; n_stall = 0; n_ad = 0; n_restart = 0; n_tv = 0;
    @(posedge rst_n);
    @(negedge clk);

    // Published vector 1: all-zero key and nonce, empty message.
    m = {}; ad = {};
    m.push_back(1'b1); ad.push_back(1'b0);           // message stream 0x80
    while (m.size() % W != 0) begin m.push_back(0); ad.push_back(0); end
    run_op(rev128(128'h0), rev96(96'h0), m, ad, 0, 0, 0, '0, 1, 64'haab555c073e67664, tc);
    m = {}; ad = {};
    for (int i = 0; i < 128; i++) begin m.push_back(0); ad.push_back(0); end
    pad(m, ad);
    run_op(rev128(128'h0), rev96(96'h0), m, ad, 0, 0, 1,
           128'hc800a52f948b89b85cee6cfd8571f90f, 0, '0, tc);

    // Published vector 2: message 0xFF plus padding.
    k = rev128(128'h0123456789abcdef123456789abcdef0);
    v = rev96(96'h0123456789abcdef12345678);
    m = {}; ad = {};
    hexbits(128'hFF80, 16, m, ad);
    while (m.size() % W != 0) begin m.push_back(0); ad.push_back(0); end
    run_op(k, v, m, ad, 0, 0, 0, '0, 1, 64'h782f4c4a8907ba7f, tc);
    m = {}; ad = {};
    for (int i = 0; i < 128; i++) begin m.push_back(0); ad.push_back(0); end
    pad(m, ad);
    run_op(k, v, m, ad, 0, 0, 1, 128'hc2b918c6baf6dea0865200d46858a37b, 0, '0, tc);

    // One 64-bit block without stalls: 640/P clocks to the last chunk.
    m = {}; ad = {};
    for (int i = 0; i < 64; i++) begin m.push_back(1'($urandom)); ad.push_back(0); end
    run_op({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom},
           m, ad, 0, 0, 0, '0, 0, '0, tc);
    // At P = 1 the last authentication clock follows the last accepted bit.
    check(tc + ((P == 1) ? 1 : 0) == 640 / P,
          $sformatf("64-bit block took %0d clocks, expected %0d", tc, 640 / P));

    // Random operations with associated data, stalls and restarts.
    for (int n = 0; n < NRAND; n++) begin
      int len, adlen;
      len   = $urandom_range(300);
      adlen = $urandom_range(len);
      m = {}; ad = {};
      for (int i = 0; i < len; i++) begin
        m.push_back(1'($urandom));
        ad.push_back(i < adlen || ($urandom_range(15) == 0));
      end
      pad(m, ad);
      run_op({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom},
             m, ad, 1, (n % 3 == 1), 0, '0, 0, '0, tc);
    end
    finished = 1;
  end

endmodule
