// tb_partial_pivoting -- both pivoting stages against the reference
// adjacent-swap pass, with small random values so that equal magnitudes
// (ties) and sign differences occur often. Counts how many inputs led to
// each of the four stage-0 row orders and to a stage-1 swap, and fails if
// any of them never occurred.
module tb_partial_pivoting;
  import wf_pkg::*;
  import wf_ref_pkg::*;
  lin_sys_t s_in, s_out0, s_out1;
  int checks = 0, failures = 0;
  int order_seen [4];
  int swap1 = 0;

  partial_pivoting #(.K(0)) dut0 (.sys_in(s_in), .sys_out(s_out0));
  partial_pivoting #(.K(1)) dut1 (.sys_in(s_in), .sys_out(s_out1));

  initial begin
    #100000;
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

  initial begin
    sys_a_t sa, sa0, sa1; sys_b_t sb, sb0, sb1;
    order_seen = '{default: 0};
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < 3; i++) begin
        sb[i] = (t < 200) ? longint'($urandom_range(9)) - 4 : longint'({$urandom, $urandom});
        for (int j = 0; j < 3; j++)
          sa[i][j] = (t < 200) ? longint'($urandom_range(9)) - 4 : longint'({$urandom, $urandom}) >>> 3;
      end
      for (int i = 0; i < 3; i++) begin
        s_in.b[i] = sb[i];
        for (int j = 0; j < 3; j++) s_in.a[i][j] = sa[i][j];
      end
      #1;
      sa0 = sa; sb0 = sb; pivot(sa0, sb0, 0);
      sa1 = sa; sb1 = sb; pivot(sa1, sb1, 1);
      checks++;
      if (!same(s_out0, sa0, sb0)) begin failures++; $display("stage 0 mismatch, test %0d", t); end
      checks++;
      if (!same(s_out1, sa1, sb1)) begin failures++; $display("stage 1 mismatch, test %0d", t); end
      // which order came out of stage 0 (by the b entries' provenance)
      if (sa0[0] == sa[0] && sa0[1] == sa[1]) order_seen[0]++;
      else if (sa0[0] == sa[0]) order_seen[1]++;
      else if (sa0[0] == sa[1]) order_seen[2]++;
      else order_seen[3]++;
      if (sa1[1] != sa[1]) swap1++;
      #1;
    end
    for (int o = 0; o < 4; o++) begin
      checks++;
      if (order_seen[o] == 0) begin failures++; $display("row order %0d never seen", o); end
    end
    checks++;
    if (swap1 == 0) begin failures++; $display("stage 1 never swapped"); end
    $display("stage-0 orders seen: %0d %0d %0d %0d, stage-1 swaps: %0d",
             order_seen[0], order_seen[1], order_seen[2], order_seen[3], swap1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
