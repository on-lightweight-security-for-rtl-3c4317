// grain_top_bench - one grain128aead instance at a chosen configuration,
// with its clock, reset and a grain_top_driver, reporting its results and
// how often each mechanism was exercised.
module grain_top_bench #(
  parameter int unsigned P         = 32,
  parameter bit          AUTH_PIPE = 1'b1,
  parameter bit          OPT_CTRL  = 1'b1,
  parameter int unsigned NRAND     = 4,
  localparam int unsigned W        = (P > 1) ? P / 2 : 1
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_ops,
  output int   n_stall,
  output int   n_ad,
  output int   n_restart,
  output int   n_tv,
  output int   n_odd,
  output int   n_move
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

  grain_top_driver #(.P(P), .AUTH_PIPE(AUTH_PIPE), .NRAND(NRAND)) drv (.*);

  // Clocks in which the core steps without taking input (P = 1 odd half)
  // and register-to-accumulator moves.
  initial begin
    n_odd  = 0;
    n_move = 0;
  end
  always @(posedge clk) begin
    if (ready && !in_ready) n_odd++;
    if (dut.acc_move) n_move++;
  end
endmodule
