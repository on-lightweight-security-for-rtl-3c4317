// tb_grain_f - checks grain_f, the LFSR feedback, on random and on
// single-bit windows against the tap list {0, 7, 38, 70, 81, 96}.
module tb_grain_f;
  logic [127:0] s;
  logic         l;
  int checks = 0, failures = 0;

  grain_f dut (.s(s), .l(l));

  function automatic bit expect_l(logic [127:0] v);
    int taps[6] = '{0, 7, 38, 70, 81, 96};
    bit p = 0;
    foreach (taps[i]) p ^= v[taps[i]];
    return p;
  endfunction

  initial begin
    // Each single bit: only the six taps may reach the output.
    for (int i = 0; i < 128; i++) begin
      s = 128'b1 << i;
      #1;
      checks++;
      if (l !== expect_l(s)) begin failures++; $display("FAIL bit %0d", i); end
    end
    for (int n = 0; n < 2000; n++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (l !== expect_l(s)) begin failures++; $display("FAIL %h", s); end
    end
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
