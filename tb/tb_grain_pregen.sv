// tb_grain_pregen - pre-output generator at P = 1, 8, 32 (default) and 64
// (unrolled): every pre-output bit of loading, initialization, key
// re-introduction and running, with pauses, against the bit-serial model.
module tb_grain_pregen;
  timeunit 1ns;
  timeprecision 1ps;
  logic fin [4];
  int ck[4], fl[4], pa[4];
  int checks = 0, failures = 0;

  grain_pregen_bench #(.P(1))  b0 (fin[0], ck[0], fl[0], pa[0]);
  grain_pregen_bench #(.P(8))  b1 (fin[1], ck[1], fl[1], pa[1]);
  grain_pregen_bench #(.P(32)) b2 (fin[2], ck[2], fl[2], pa[2]);
  grain_pregen_bench #(.P(64)) b3 (fin[3], ck[3], fl[3], pa[3]);

  initial begin
    #1;  // let the benches clear their flags first
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    foreach (ck[i]) begin
      checks += ck[i];
      failures += fl[i];
      if (pa[i] == 0) begin failures++; $display("FAIL: bench %0d never paused", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
