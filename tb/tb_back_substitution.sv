// tb_back_substitution -- random upper-triangular systems (scaled like
// real filter statistics) solved by the block and by the reference loop;
// checks X(0..2), the 3*(W+1)+11 cycle latency and the zero-diagonal flag.
module tb_back_substitution;
  import wf_pkg::*;
  import wf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  lin_sys_t s_in;
  sol_t x;
  logic done, sing;
  int checks = 0, failures = 0;

  back_substitution dut (.clk, .rst_n, .start, .sys_in(s_in), .done, .singular(sing), .x);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sys_a_t sa; sys_b_t sb; longint xr [3]; bit z;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      for (int i = 0; i < 3; i++) begin
        sb[i] = longint'({$urandom, $urandom}) >>> (24 + t % 10);
        for (int j = 0; j < 3; j++)
          sa[i][j] = (j < i) ? 0 : longint'({$urandom, $urandom}) >>> (26 + t % 10);
        if (sa[i][i] == 0) sa[i][i] = 1;
      end
      if (t == 7) sa[2][2] = 0;
      if (t == 8) sa[0][0] = 0;
      for (int i = 0; i < 3; i++) begin
        s_in.b[i] = sb[i];
        for (int j = 0; j < 3; j++) s_in.a[i][j] = sa[i][j];
      end
      @(negedge clk) start = 1;
      @(posedge clk);
      @(negedge clk) start = 0;
      s_in = '0;
      cyc = 0;
      while (!done) begin @(posedge clk); #1; cyc++; end
      z = backsub(sa, sb, xr);
      checks++;
      if (cyc != 3 * (WORD_W + 1) + 11) begin failures++; $display("latency %0d", cyc); end
      checks++;
      if (sing != z) begin failures++; $display("singular flag %b", sing); end
      if (!z) for (int i = 0; i < 3; i++) begin
        checks++;
        if ($signed(x[i]) != xr[i]) begin
          failures++; $display("X(%0d) %0d != %0d", i, $signed(x[i]), xr[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
