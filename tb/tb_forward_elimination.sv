// tb_forward_elimination -- runs both elimination stages (K = 0 and K = 1)
// on random 3x3 systems and compares every element with the reference
// elimination; checks the W+3 cycle latency and the zero-pivot flag.
module tb_forward_elimination;
  import wf_pkg::*;
  import wf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  lin_sys_t s_in, s_out0, s_out1;
  logic done0, done1, sing0, sing1;
  int checks = 0, failures = 0;

  forward_elimination #(.K(0)) dut0 (.clk, .rst_n, .start, .sys_in(s_in),
    .done(done0), .singular(sing0), .sys_out(s_out0));
  forward_elimination #(.K(1)) dut1 (.clk, .rst_n, .start, .sys_in(s_in),
    .done(done1), .singular(sing1), .sys_out(s_out1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit same(lin_sys_t s, sys_a_t sa, sys_b_t sb);
    for (int i = 0; i < 3; i++) begin
      if ($signed(s.b[i]) != sb[i]) return 0;
      for (int j = 0; j < 3; j++) if ($signed(s.a[i][j]) != sa[i][j]) return 0;
    end
    return 1;
  endfunction

  task automatic run(input sys_a_t sa, input sys_b_t sb);
    sys_a_t ra0, ra1; sys_b_t rb0, rb1; bit z0, z1;
    int cyc = 0;
    for (int i = 0; i < 3; i++) begin
      s_in.b[i] = sb[i];
      for (int j = 0; j < 3; j++) s_in.a[i][j] = sa[i][j];
    end
    @(negedge clk) start = 1;
    @(posedge clk);
    @(negedge clk) start = 0;
    s_in = '0;
    while (!done0) begin @(posedge clk); #1; cyc++; end
    ra0 = sa; rb0 = sb; z0 = eliminate(ra0, rb0, 0);
    ra1 = sa; rb1 = sb; z1 = eliminate(ra1, rb1, 1);
    checks++;
    if (cyc != WORD_W + 3 || !done1) begin failures++; $display("latency %0d", cyc); end
    checks++;
    if (sing0 != z0 || sing1 != z1) begin failures++; $display("singular flag %b%b", sing0, sing1); end
    checks++;
    if (!z0 && !same(s_out0, ra0, rb0)) begin failures++; $display("stage 0 mismatch"); end
    checks++;
    if (!z1 && !same(s_out1, ra1, rb1)) begin failures++; $display("stage 1 mismatch"); end
  endtask

  initial begin
    sys_a_t sa; sys_b_t sb;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      for (int i = 0; i < 3; i++) begin
        sb[i] = longint'({$urandom, $urandom}) >>> (20 + t % 12);
        for (int j = 0; j < 3; j++) sa[i][j] = longint'({$urandom, $urandom}) >>> (24 + t % 12);
      end
      if (t == 5) sa[0][0] = 0;
      if (t == 6) sa[1][1] = 0;
      run(sa, sb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
