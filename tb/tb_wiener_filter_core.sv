// tb_wiener_filter_core -- end-to-end test of one filter-estimation
// iteration (update a, then update b) at the design's own sizes.
//
// Problems: statistics of synthetic blurred-and-noisy frames, random
// statistics (which exercise the row swaps of partial pivoting) and an
// all-zero set (singular in both updates). The H blocks are served on the
// request port, with random h_valid stalls on some problems. Both output
// filters are compared with the reference model; the latency without
// stalls must be 808 cycles. Counted mechanisms, each required at least
// once: h_valid stall, stage-0 row reorder, stage-1 row swap, singular
// fallback of update a and of update b.
module tb_wiener_filter_core;
  import wf_pkg::*;
  import wf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  word_t b_in [WIN];
  word_t m_in [WIN][WIN];
  word_t h_blk [WIN][WIN];
  logic h_req, h_valid, busy, done, a_sing, b_sing;
  logic [2:0] h_i, h_j;
  word_t a_out [WIN];
  word_t b_out [WIN];
  int checks = 0, failures = 0;
  int n_stall = 0, n_reorder0 = 0, n_swap1 = 0, n_sing_a = 0, n_sing_b = 0;
  bit stall_mode = 0;
  hmat_t h;

  wiener_filter_core dut (.clk, .rst_n, .start, .b_in, .m_in, .h_req, .h_i, .h_j,
    .h_valid, .h_blk, .busy, .done, .a_out, .b_out, .a_singular(a_sing), .b_singular(b_sing));

  always #5 clk = ~clk;

  always_comb begin
    for (int k = 0; k < WIN; k++)
      for (int l = 0; l < WIN; l++) h_blk[k][l] = h[h_i][h_j][k][l];
  end
  always @(negedge clk) begin
    h_valid <= stall_mode ? ($urandom_range(3) != 0) : 1'b1;
    if (h_req && stall_mode && !h_valid) n_stall++;
  end

  // pivoting activity inside both solvers, sampled when each stage's
  // result is registered
  always @(posedge clk) begin
    if (dut.u_update_a.u_solver.state == 1 && dut.u_update_a.u_solver.u_piv0.g_stage0.r0 != 0) n_reorder0++;
    if (dut.u_update_b.u_solver.state == 1 && dut.u_update_b.u_solver.u_piv0.g_stage0.r0 != 0) n_reorder0++;
    if (dut.u_update_a.u_solver.fe0_done && dut.u_update_a.u_solver.u_piv1.g_stage1.c59) n_swap1++;
    if (dut.u_update_b.u_solver.fe0_done && dut.u_update_b.u_solver.u_piv1.g_stage1.c59) n_swap1++;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input mat7_t m, input vec7_t bi, input bit stall);
    vec7_t ra, rb; bit za, zb;
    int cyc = 0;
    stall_mode = stall;
    for (int i = 0; i < WIN; i++) begin
      b_in[i] = bi[i];
      for (int j = 0; j < WIN; j++) m_in[i][j] = m[i][j];
    end
    @(negedge clk) start = 1;
    @(posedge clk);
    @(negedge clk) start = 0;
    b_in = '{default: '0};
    m_in = '{default: '{default: '0}};
    while (!done) begin @(posedge clk); #1; cyc++; end
    iterate(h, m, bi, ra, rb, za, zb);
    n_sing_a += za;
    n_sing_b += zb;
    checks++;
    if (!stall && cyc != 808) begin failures++; $display("latency %0d", cyc); end
    checks++;
    if (a_sing != za || b_sing != zb) begin failures++; $display("singular flags %b%b", a_sing, b_sing); end
    for (int i = 0; i < WIN; i++) begin
      checks++;
      if (a_out[i] != ra[i]) begin failures++; $display("a[%0d] %0d != %0d", i, a_out[i], ra[i]); end
      checks++;
      if (b_out[i] != rb[i]) begin failures++; $display("b[%0d] %0d != %0d", i, b_out[i], rb[i]); end
    end
    $display("a = %0d %0d %0d %0d | b = %0d %0d %0d %0d (%0d cycles)",
             a_out[0], a_out[1], a_out[2], a_out[3], b_out[0], b_out[1], b_out[2], b_out[3], cyc);
  endtask

  initial begin
    mat7_t m; vec7_t b0, bz;
    b0 = '{1536, -3584, 7680, 54272, 7680, -3584, 1536};
    bz = '{0, 0, 0, 65536, 0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // frame statistics
    for (int t = 0; t < 3; t++) begin
      make_stats(12, 5 + t, h, m);
      run(m, t == 2 ? bz : b0, t == 1);
    end
    // random statistics
    for (int t = 0; t < 6; t++) begin
      foreach (h[i, j, k, l]) h[i][j][k][l] = longint'($signed($urandom)) >>> 12;
      foreach (m[i, j]) m[i][j] = longint'($signed($urandom)) >>> 12;
      run(m, b0, t == 3);
    end
    // empty statistics: both systems singular
    h = '{default: '{default: '{default: '{default: 0}}}};
    m = '{default: '{default: 0}};
    run(m, b0, 0);
    $display("stalls %0d, stage-0 reorders %0d, stage-1 swaps %0d, singular a %0d, singular b %0d",
             n_stall, n_reorder0, n_swap1, n_sing_a, n_sing_b);
    checks++; if (n_stall == 0)    begin failures++; $display("no stall"); end
    checks++; if (n_reorder0 == 0) begin failures++; $display("no stage-0 reorder"); end
    checks++; if (n_swap1 == 0)    begin failures++; $display("no stage-1 swap"); end
    checks++; if (n_sing_a == 0)   begin failures++; $display("no singular a"); end
    checks++; if (n_sing_b == 0)   begin failures++; $display("no singular b"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
