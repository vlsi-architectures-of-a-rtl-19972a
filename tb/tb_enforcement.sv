// tb_enforcement -- drives random folded statistics into the enforcement
// block and compares the 3x3 system with the reference substitution.
module tb_enforcement;
  import wf_pkg::*;
  import wf_ref_pkg::*;
  word_t    vec_a [HALF1];
  word_t    mat_b [HALF1][HALF1];
  lin_sys_t sys;
  int checks = 0, failures = 0;

  enforcement dut (.vec_a, .mat_b, .sys);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec4_t av; mat4_t bm; sys_a_t sa; sys_b_t sb;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 4; i++) begin
        av[i] = longint'({$urandom, $urandom}) >>> (t % 40);
        for (int j = 0; j < 4; j++) bm[i][j] = longint'({$urandom, $urandom}) >>> (t % 40);
      end
      foreach (av[i]) vec_a[i] = av[i];
      foreach (bm[i, j]) mat_b[i][j] = bm[i][j];
      #1;
      enforce(av, bm, sa, sb);
      for (int i = 0; i < 3; i++) begin
        checks++;
        if ($signed(sys.b[i]) != sb[i]) begin
          failures++; $display("b[%0d] %0d != %0d", i, $signed(sys.b[i]), sb[i]);
        end
        for (int j = 0; j < 3; j++) begin
          checks++;
          if ($signed(sys.a[i][j]) != sa[i][j]) begin
            failures++; $display("a[%0d][%0d] %0d != %0d", i, j, $signed(sys.a[i][j]), sa[i][j]);
          end
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
