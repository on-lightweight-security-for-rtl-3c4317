// tb_grain_h - checks grain_h, the pre-output function y, against the
// bit-serial model on random and dense random LFSR/NFSR windows.
module tb_grain_h;
  import grain_ref_pkg::*;
  logic [127:0] s, b;
  logic         y;
  int checks = 0, failures = 0;
  grain_model g = new;

  grain_h dut (.s(s), .b(b), .y(y));

  task automatic check_one(logic [127:0] vs, logic [127:0] vb);
    s = vs;
    b = vb;
    #1;
    foreach (g.b[i]) begin
      g.b[i] = vb[i];
      g.s[i] = vs[i];
    end
    checks++;
    if (y !== g.pre_out()) begin failures++; $display("FAIL s=%h b=%h", vs, vb); end
  endtask

  initial begin
    check_one('0, '0);
    check_one('1, '1);
    for (int n = 0; n < 3000; n++)
      check_one({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    for (int n = 0; n < 3000; n++)
      check_one({$urandom, $urandom, $urandom, $urandom} | {$urandom, $urandom, $urandom, $urandom},
                {$urandom, $urandom, $urandom, $urandom} | {$urandom, $urandom, $urandom, $urandom});
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
