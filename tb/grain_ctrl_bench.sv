// grain_ctrl_bench - runs the counter controller and the divider/shift
// register controller of the same P side by side on the same start/done
// stimulus, and checks both, clock by clock, against the schedule of the
// cipher: 128/P loading clocks, 256/P initialization clocks, 128/P key
// re-introduction clocks with the accumulator move at the clock that
// produces y_320, then running until done. Also restarts in mid-sequence.
module grain_ctrl_bench
  import grain_pkg::*;
#(
  parameter int unsigned P = 32,
  localparam int unsigned CPW = 128 / P,
  localparam int unsigned SW  = (CPW > 1) ? $clog2(CPW) : 1
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output int   restarts
);
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start, done;
  phase_e        ph_f, ph_o;
  logic [SW-1:0] sl_f, sl_o;
  logic          mv_f, mv_o;

  grain_ctrl #(.P(P), .OPT_CTRL(1'b0)) u_fsm (.clk, .rst_n, .start, .done, .phase(ph_f), .slice(sl_f), .acc_move(mv_f));
  grain_ctrl #(.P(P), .OPT_CTRL(1'b1)) u_opt (.clk, .rst_n, .start, .done, .phase(ph_o), .slice(sl_o), .acc_move(mv_o));

  task automatic expect_state(phase_e ph, int sl, bit mv, string what);
    checks++;
    if (ph_f !== ph || ph_o !== ph || (sl >= 0 && (sl_f !== SW'(sl) || sl_o !== SW'(sl))) ||
        mv_f !== mv || mv_o !== mv) begin
      failures++;
      $display("FAIL P=%0d %s: fsm %s/%0d/%0d opt %s/%0d/%0d expected %s/%0d/%0d", P, what,
               ph_f.name(), sl_f, mv_f, ph_o.name(), sl_o, mv_o, ph.name(), sl, mv);
    end
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0; restarts = 0;
    start = 0; done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_state(PH_IDLE, -1, 0, "after reset");
    for (int op = 0; op < 4; op++) begin
      int stop_at;
      stop_at = (op == 1) ? $urandom_range(4 * CPW - 1) : -1;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int c = 0; c < 4 * CPW; c++) begin
        phase_e ph;
        if (c == stop_at) break;
        ph = (c < CPW) ? PH_LOAD : (c < 3 * CPW) ? PH_INIT : PH_KEYMIX;
        expect_state(ph, c % CPW, (c == 3 * CPW + CPW / 2), $sformatf("clock %0d", c));
        @(negedge clk);
      end
      if (stop_at >= 0) begin
        restarts++;
        continue;
      end
      repeat (1 + $urandom_range(5)) begin
        expect_state(PH_RUN, -1, 0, "running");
        @(negedge clk);
      end
      done = 1'b1;
      expect_state(PH_RUN, -1, 0, "done input");
      @(negedge clk);
      done = 1'b0;
      repeat (3) begin
        expect_state(PH_DONE, -1, 0, "finished");
        @(negedge clk);
      end
    end
    finished = 1;
  end
endmodule
