// grain_blocks_bench - one grain128aead instance encrypting whole 64-bit
// blocks back to back: one block, then 1000 blocks (64,000 message bits),
// each under a fresh random key and nonce.
//
// The message is random, padded with a single 1 and zero-filled to the
// chunk width W. in_valid stays high for the whole message, so the core
// runs at its full rate. Every ciphertext chunk and the final tag are
// compared with the bit-serial model in grain_ref_pkg. The bench also checks
// the clock count from start to the last accepted chunk: 512/P clocks to
// ready, then one clock per chunk (two per message bit at P = 1, where the
// count ends on the last accepted bit). These sizes are the "1 block" and
// "1000 blocks" cases used to compare implementations of the cipher;
// holding in_valid high throughout is this bench's choice.
// Stimulus and sampling happen on the falling clock edge.
module grain_blocks_bench
  import grain_ref_pkg::*;
#(
  parameter int unsigned P         = 32,
  parameter bit          AUTH_PIPE = 1'b1,
  parameter bit          OPT_CTRL  = 1'b1,
  localparam int unsigned W        = (P > 1) ? P / 2 : 1
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_blocks
);
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  logic         start, ready, in_valid, in_ready, in_last, out_valid, tag_valid;
  logic [127:0] key;
  logic [95:0]  iv;
  logic [W-1:0] in_data, in_ad, out_data;
  logic [63:0]  tag;

  grain128aead #(.P(P), .AUTH_PIPE(AUTH_PIPE), .OPT_CTRL(OPT_CTRL)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL P=%0d: %s", P, what);
    end
  endtask

  task automatic run_blocks(int nblk);
    grain_model   g = new;
    bit           ys[$];
    bit           m[$];
    bit           c_exp[$];
    logic [127:0] k;
    logic [95:0]  v;
    int           nchunks, clocks, bad, expect_clocks;
    k = {$urandom, $urandom, $urandom, $urandom};
    v = {$urandom, $urandom, $urandom};
    for (int i = 0; i < 64 * nblk; i++) m.push_back(1'($urandom));
    m.push_back(1'b1);
    while (m.size() % W != 0) m.push_back(1'b0);
    nchunks = m.size() / W;
    g.init(k, v, ys);
    foreach (m[i]) c_exp.push_back(g.crypt_bit(m[i], 1'b0));

    key   = k;
    iv    = v;
    start = 1'b1;
    @(negedge clk);
    start  = 1'b0;
    clocks = 0;
    while (!ready && clocks < 1000) begin
      @(negedge clk);
      clocks++;
    end
    check(clocks == 512 / P, $sformatf("start to ready %0d clocks", clocks));

    bad = 0;
    in_valid = 1'b1;
    for (int ci = 0; ci < nchunks; ci++) begin
      for (int u = 0; u < W; u++) in_data[u] = m[ci*W+u];
      in_last = (ci == nchunks - 1);
      while (!in_ready) begin
        @(negedge clk);
        clocks++;
      end
      @(negedge clk);  // accepted at this edge
      clocks++;
      for (int u = 0; u < W; u++)
        if (out_data[u] !== c_exp[ci*W+u]) bad++;
    end
    in_valid = 1'b0;
    in_last  = 1'b0;
    check(bad == 0, $sformatf("%0d wrong ciphertext bits in %0d blocks", bad, nblk));
    expect_clocks = 512 / P + ((P == 1) ? 2 * nchunks - 1 : nchunks);
    check(clocks == expect_clocks,
          $sformatf("%0d blocks took %0d clocks, expected %0d", nblk, clocks, expect_clocks));
    repeat (4) begin
      if (!tag_valid) @(negedge clk);
    end
    check(tag_valid, "tag_valid after the last chunk");
    check(tag === g.tag(), $sformatf("tag %h, model %h after %0d blocks", tag, g.tag(), nblk));
    n_blocks += nblk;
  endtask

  initial begin
    start = 0; key = '0; iv = '0; in_valid = 0; in_data = '0; in_ad = '0; in_last = 0;
    finished = 0; checks = 0; failures = 0; n_blocks = 0;
    @(posedge rst_n);
    @(negedge clk);
    run_blocks(1);
    run_blocks(1000);
    finished = 1;
  end
endmodule
