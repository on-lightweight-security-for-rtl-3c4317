// tb_grain_ctrl - both controller implementations at P = 1, 8, 32 and 64
// against the phase schedule of the cipher, including restarts.
module tb_grain_ctrl;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int NB = 4;
  logic fin [NB];
  int ck[NB], fl[NB], rs[NB];
  int checks = 0, failures = 0;

  grain_ctrl_bench #(.P(1))  b0 (fin[0], ck[0], fl[0], rs[0]);
  grain_ctrl_bench #(.P(8))  b1 (fin[1], ck[1], fl[1], rs[1]);
  grain_ctrl_bench #(.P(32)) b2 (fin[2], ck[2], fl[2], rs[2]);
  grain_ctrl_bench #(.P(64)) b3 (fin[3], ck[3], fl[3], rs[3]);

  initial begin
    #1;  // let the benches clear their flags first
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    foreach (ck[i]) begin
      checks += ck[i];
      failures += fl[i];
      if (rs[i] == 0) begin failures++; $display("FAIL: bench %0d never restarted", i); end
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
