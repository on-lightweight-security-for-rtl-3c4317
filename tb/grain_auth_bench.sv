// grain_auth_bench - drives one grain_auth (width P, pipeline on or off)
// through its initialization (128 random pre-output bits, move after the
// first 64) and a stream of random message/authentication chunks with
// random gaps, checking the accumulator against a per-bit model whenever
// the inputs have drained, and the tag_valid timing after the last chunk.
module grain_auth_bench #(
  parameter int unsigned P         = 32,
  parameter bit          AUTH_PIPE = 1'b1,
  localparam int unsigned W        = (P > 1) ? P / 2 : 1
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output int   gaps
);
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         clear, ld_en, ld_move, run_en, last, tag_valid;
  logic [P-1:0] ld_y;
  logic [W-1:0] m, zp;
  logic [63:0]  acc;

  grain_auth #(.P(P), .AUTH_PIPE(AUTH_PIPE)) dut (.*);

  bit a[64], r[64];

  function automatic logic [63:0] model_acc();
    logic [63:0] v;
    foreach (a[j]) v[j] = a[j];
    return v;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL P=%0d pipe=%0d: %s", P, AUTH_PIPE, what);
    end
  endtask

  initial begin
    bit yq[128];
    int lat;
    finished = 0; checks = 0; failures = 0; gaps = 0;
    clear = 0; ld_en = 0; ld_move = 0; run_en = 0; last = 0; ld_y = '0; m = '0; zp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 3; op++) begin
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      chk(!tag_valid, "tag_valid cleared");
      foreach (yq[i]) yq[i] = 1'($urandom);
      for (int c = 0; c < 128 / P; c++) begin
        ld_en = 1'b1;
        ld_move = (c == 64 / P);
        for (int k = 0; k < P; k++) ld_y[k] = yq[c*P+k];
        @(negedge clk);
      end
      ld_en = 1'b0;
      ld_move = 1'b0;
      for (int j = 0; j < 64; j++) begin
        a[j] = yq[j];
        r[j] = yq[64+j];
      end
      repeat (2) @(negedge clk);
      chk(acc === model_acc(), "accumulator after initialization");
      for (int ch = 0; ch < 40; ch++) begin
        int idle;
        run_en = 1'b1;
        last = (ch == 39);
        m = W'({$urandom, $urandom});
        zp = W'({$urandom, $urandom});
        for (int u = 0; u < W; u++) begin
          if (m[u]) foreach (a[j]) a[j] ^= r[j];
          for (int j = 0; j < 63; j++) r[j] = r[j+1];
          r[63] = zp[u];
        end
        @(negedge clk);
        run_en = 1'b0;
        last = 1'b0;
        if (ch == 39) break;
        idle = $urandom_range(3);
        if (idle > 0) gaps++;
        repeat (idle) @(negedge clk);
        if (idle > int'(AUTH_PIPE)) chk(acc === model_acc(), $sformatf("accumulator after chunk %0d", ch));
        chk(!tag_valid, "no tag before the last chunk");
      end
      lat = 0;
      while (!tag_valid && lat < 5) begin
        @(negedge clk);
        lat++;
      end
      chk(lat == int'(AUTH_PIPE), $sformatf("tag_valid %0d clocks late", lat));
      chk(acc === model_acc(), "final tag");
    end
    finished = 1;
  end
endmodule
