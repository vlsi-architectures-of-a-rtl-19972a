// tb_symmetrization -- checks the 7-tap reconstruction: mirrored outer
// taps, centre tap S - 2*(x0+x1+x2), and that the taps sum to S.
module tb_symmetrization;
  import wf_pkg::*;
  import wf_ref_pkg::*;
  sol_t  x;
  word_t taps [WIN];
  int checks = 0, failures = 0;

  symmetrization dut (.x, .taps);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xv [3];
    vec7_t f;
    longint sum;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 3; i++) begin
        xv[i] = longint'($signed($urandom)) >>> (t % 20);
        x[i] = xv[i];
      end
      #1;
      symm(xv, f);
      sum = 0;
      for (int i = 0; i < 7; i++) begin
        sum += taps[i];
        checks++;
        if (taps[i] != f[i]) begin failures++; $display("tap %0d: %0d != %0d", i, taps[i], f[i]); end
      end
      checks++;
      if (sum != 65536) begin failures++; $display("taps sum to %0d", sum); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
