// tb_grain_auth - authentication module at P = 1, 2, 32 (default, with the
// pipeline stage), 64, and at P = 32 without the pipeline stage: init
// loading and move, chunked accumulation with future register bits, and
// tag_valid timing, against a per-bit model.
module tb_grain_auth;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int NB = 5;
  logic fin [NB];
  int ck[NB], fl[NB], gp[NB];
  int checks = 0, failures = 0;

  grain_auth_bench #(.P(1),  .AUTH_PIPE(0)) b0 (fin[0], ck[0], fl[0], gp[0]);
  grain_auth_bench #(.P(2),  .AUTH_PIPE(1)) b1 (fin[1], ck[1], fl[1], gp[1]);
  grain_auth_bench #(.P(32), .AUTH_PIPE(1)) b2 (fin[2], ck[2], fl[2], gp[2]);
  grain_auth_bench #(.P(32), .AUTH_PIPE(0)) b3 (fin[3], ck[3], fl[3], gp[3]);
  grain_auth_bench #(.P(64), .AUTH_PIPE(1)) b4 (fin[4], ck[4], fl[4], gp[4]);

  initial begin
    #1;  // let the benches clear their flags first
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    foreach (ck[i]) begin
      checks += ck[i];
      failures += fl[i];
      if (gp[i] == 0) begin failures++; $display("FAIL: bench %0d had no gaps", i); end
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
