// tb_grain128aead_blocks - the "1 block" and "1000 blocks" workloads (64
// and 64,000 message bits) run through complete cores: the default
// high-speed configuration (P = 32, authentication pipeline, divider
// controller), the unrolled P = 64 core and the bit-serial P = 1 core with
// the counter FSM and no pipeline. Each bench checks every ciphertext bit,
// the tag and the clock count against the bit-serial model. The test fails
// if a bench did not run all 1001 blocks.
module tb_grain128aead_blocks;
  timeunit 1ns;
  timeprecision 1ps;

  logic fin[3];
  int   chk[3], fail[3], blk[3];

  grain_blocks_bench #(.P(32), .AUTH_PIPE(1'b1), .OPT_CTRL(1'b1))
    b32 (.finished(fin[0]), .checks(chk[0]), .failures(fail[0]), .n_blocks(blk[0]));
  grain_blocks_bench #(.P(64), .AUTH_PIPE(1'b1), .OPT_CTRL(1'b1))
    b64 (.finished(fin[1]), .checks(chk[1]), .failures(fail[1]), .n_blocks(blk[1]));
  grain_blocks_bench #(.P(1), .AUTH_PIPE(1'b0), .OPT_CTRL(1'b0))
    b1 (.finished(fin[2]), .checks(chk[2]), .failures(fail[2]), .n_blocks(blk[2]));

  int checks, failures;

  initial begin
    #1;  // let the benches clear their flags first
    wait (fin[0] && fin[1] && fin[2]);
    checks   = 0;
    failures = 0;
    for (int i = 0; i < 3; i++) begin
      checks   += chk[i];
      failures += fail[i];
      if (blk[i] != 1001) begin
        failures++;
        $display("FAIL: bench %0d ran %0d blocks", i, blk[i]);
      end
    end
    $display("blocks run: P=32 %0d, P=64 %0d, P=1 %0d", blk[0], blk[1], blk[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4_000_000;  // 400,000 clocks of 10 ns
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2],
             fail[0] + fail[1] + fail[2] + 1);
    $finish;
  end
endmodule
