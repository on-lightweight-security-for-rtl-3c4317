// tb_grain_g - checks grain_g, the NFSR non-linear feedback F(B), against
// the bit-serial model on random windows, on sparse windows (so that the
// product terms switch on one by one) and on all-ones.
module tb_grain_g;
  import grain_ref_pkg::*;
  logic [127:0] b;
  logic         fb;
  int checks = 0, failures = 0;
  grain_model g = new;

  grain_g dut (.b(b), .fb(fb));

  task automatic check_one(logic [127:0] v);
    b = v;
    #1;
    foreach (g.b[i]) g.b[i] = v[i];
    checks++;
    if (fb !== g.nl_b()) begin failures++; $display("FAIL %h", v); end
  endtask

  initial begin
    check_one('0);
    check_one('1);
    for (int n = 0; n < 3000; n++) check_one({$urandom, $urandom, $urandom, $urandom});
    // Dense windows make the high-degree products likely to be 1.
    for (int n = 0; n < 3000; n++)
      check_one({$urandom, $urandom, $urandom, $urandom} | {$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
