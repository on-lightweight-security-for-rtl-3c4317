// tb_grain128aead - end-to-end test of the grain128aead core across its
// configurations: P = 1 (bit-serial, alternating keystream and
// authentication clocks), 2, 4, 16, 32 and 64 (unrolled beyond the native
// 32), with and without the authentication pipeline stage and with both
// controllers. Every bench runs the published test vectors, a timed 64-bit
// block and random messages with associated data, stalls and restarts; all
// results are checked against a bit-serial model. A mechanism that never
// happened counts as a failure.
module tb_grain128aead;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int NB = 6;
  logic fin [NB];
  int ck[NB], fl[NB], ops[NB], stl[NB], adb[NB], rst[NB], tv[NB], odd[NB], mv[NB];

  grain_top_bench #(.P(1),  .AUTH_PIPE(0), .OPT_CTRL(0), .NRAND(3)) b0 (fin[0], ck[0], fl[0], ops[0], stl[0], adb[0], rst[0], tv[0], odd[0], mv[0]);
  grain_top_bench #(.P(2),  .AUTH_PIPE(1), .OPT_CTRL(1), .NRAND(3)) b1 (fin[1], ck[1], fl[1], ops[1], stl[1], adb[1], rst[1], tv[1], odd[1], mv[1]);
  grain_top_bench #(.P(4),  .AUTH_PIPE(0), .OPT_CTRL(1), .NRAND(4)) b2 (fin[2], ck[2], fl[2], ops[2], stl[2], adb[2], rst[2], tv[2], odd[2], mv[2]);
  grain_top_bench #(.P(16), .AUTH_PIPE(1), .OPT_CTRL(0), .NRAND(4)) b3 (fin[3], ck[3], fl[3], ops[3], stl[3], adb[3], rst[3], tv[3], odd[3], mv[3]);
  grain_top_bench #(.P(32), .AUTH_PIPE(0), .OPT_CTRL(0), .NRAND(4)) b4 (fin[4], ck[4], fl[4], ops[4], stl[4], adb[4], rst[4], tv[4], odd[4], mv[4]);
  grain_top_bench #(.P(64), .AUTH_PIPE(1), .OPT_CTRL(1), .NRAND(6)) b5 (fin[5], ck[5], fl[5], ops[5], stl[5], adb[5], rst[5], tv[5], odd[5], mv[5]);

  int checks = 0, failures = 0;

  initial begin
    #1;  // let the benches clear their flags first
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    #1;
    for (int i = 0; i < NB; i++) begin
      checks   += ck[i] + 4;
      failures += fl[i];
      $display("bench %0d: checks=%0d failures=%0d ops=%0d stalls=%0d ad_bits=%0d restarts=%0d vectors=%0d odd=%0d moves=%0d",
               i, ck[i], fl[i], ops[i], stl[i], adb[i], rst[i], tv[i], odd[i], mv[i]);
      if (stl[i] == 0) begin failures++; $display("FAIL: bench %0d no stall", i); end
      if (adb[i] == 0) begin failures++; $display("FAIL: bench %0d no associated data", i); end
      if (rst[i] == 0) begin failures++; $display("FAIL: bench %0d no restart", i); end
      if (mv[i] != ops[i]) begin
        failures++;
        $display("FAIL: bench %0d accumulator moves %0d, expected %0d", i, mv[i], ops[i]);
      end
    end
    if (odd[0] == 0) begin failures++; $display("FAIL: P=1 never alternated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;  // 200k clocks of the 10 ns bench clocks
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
