// tb_grain128aead_full - the grain128aead core at its default parameters
// (P = 32 steps per clock, authentication pipeline and divider controller
// on), taken through the published test vectors, a 64-bit block with its
// clock count, and random messages with associated data, stalls and
// restarts, all checked against a bit-serial model of the cipher.
module tb_grain128aead_full;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned P = 32;
  localparam int unsigned W = P / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start, ready, in_valid, in_ready, in_last, out_valid, tag_valid;
  logic [127:0] key;
  logic [95:0]  iv;
  logic [W-1:0] in_data, in_ad, out_data;
  logic [63:0]  tag;
  logic         finished;
  int checks, failures, n_ops, n_stall, n_ad, n_restart, n_tv;

  grain128aead dut (.*);

  grain_top_driver #(.P(P), .AUTH_PIPE(1'b1), .NRAND(12)) drv (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;  // let the benches clear their flags first
    wait (finished);
    if (n_stall == 0)   begin failures++; $display("FAIL: no stall exercised"); end
    if (n_ad == 0)      begin failures++; $display("FAIL: no associated data exercised"); end
    if (n_restart == 0) begin failures++; $display("FAIL: no restart exercised"); end
    if (n_tv != 4)      begin failures++; $display("FAIL: published vectors not all run"); end
    $display("ops=%0d stalls=%0d ad_bits=%0d restarts=%0d vectors=%0d", n_ops, n_stall, n_ad, n_restart, n_tv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
