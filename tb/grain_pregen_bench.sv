// grain_pregen_bench - drives one grain_pregen of width P through loading,
// both initialization parts and a running stretch with random pauses of
// en, and compares every pre-output bit with the bit-serial model.
module grain_pregen_bench
  import grain_pkg::*;
  import grain_ref_pkg::*;
#(
  parameter int unsigned P = 32
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output int   pauses
);
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         en;
  fsr_mode_e    mode;
  logic [P-1:0] ld_b, ld_s, key_bits, y;

  grain_pregen #(.P(P)) dut (.*);

  task automatic cmp(bit exp_y[$], int base, string what);
    for (int k = 0; k < P; k++) begin
      if (y[k] !== exp_y[base+k]) begin
        failures++;
        $display("FAIL P=%0d %s: y bit %0d", P, what, base + k);
        break;
      end
    end
    checks++;
  endtask

  initial begin
    grain_model g = new;
    bit ys[$], yr[$];
    logic [127:0] key, sinit;
    logic [95:0]  iv;
    finished = 0; checks = 0; failures = 0; pauses = 0;
    en = 0; mode = MODE_RUN; ld_b = '0; ld_s = '0; key_bits = '0;
    for (int op = 0; op < 3; op++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      iv  = {$urandom, $urandom, $urandom};
      if (op == 0) begin key = '0; iv = '0; end
      sinit = {1'b0, {31{1'b1}}, iv};
      g.init(key, iv, ys);
      yr = {};
      for (int t = 0; t < 2048; t++) begin
        yr.push_back(g.pre_out());
        g.step(0, 0);
      end
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      mode = MODE_LOAD;
      en = 1'b1;
      for (int c = 0; c < 128 / P; c++) begin
        ld_b = key[c*P +: P];
        ld_s = sinit[c*P +: P];
        @(negedge clk);
      end
      mode = MODE_INIT;
      for (int c = 0; c < 256 / P; c++) begin
        #1 cmp(ys, c * P, "init");
        @(negedge clk);
      end
      mode = MODE_KEYMIX;
      for (int c = 0; c < 128 / P; c++) begin
        key_bits = key[c*P +: P];
        #1 cmp(ys, 256 + c * P, "keymix");
        @(negedge clk);
      end
      mode = MODE_RUN;
      for (int c = 0; c < 2048 / P; c++) begin
        if ($urandom_range(3) == 0) begin
          en = 1'b0;
          @(negedge clk);
          pauses++;
          en = 1'b1;
        end
        #1 cmp(yr, c * P, "run");
        @(negedge clk);
      end
      rst_n = 1'b0;
    end
    finished = 1;
  end
endmodule
