// tb_update_a -- feeds update_a with statistics of synthetic frames (and
// one all-zero, singular set) through its H-block request port, with and
// without stalls on h_valid, and compares the updated filter a with the
// reference model. Checks the 403-cycle latency when no stall occurs,
// that the taps sum to S, and that stalls and the singular fallback
// each happened at least once.
module tb_update_a;
  import wf_pkg::*;
  import wf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  word_t fixed_in [WIN];
  word_t m_in [WIN][WIN];
  word_t h_blk [WIN][WIN];
  logic h_req, h_valid, busy, done, singular;
  logic [2:0] h_i, h_j;
  word_t taps [WIN];
  int checks = 0, failures = 0;
  int stalls = 0, singular_seen = 0;
  bit stall_mode = 0;
  hmat_t h;

  update_a dut (.clk, .rst_n, .start, .fixed_in, .m_in, .h_req, .h_i, .h_j,
                .h_valid, .h_blk, .busy, .done, .singular, .taps);

  always #5 clk = ~clk;

  // H source: answers the request with the addressed block
  always_comb begin
    for (int k = 0; k < WIN; k++)
      for (int l = 0; l < WIN; l++) h_blk[k][l] = h[h_i][h_j][k][l];
  end
  always @(negedge clk) begin
    h_valid <= stall_mode ? ($urandom_range(3) != 0) : 1'b1;
    if (h_req && stall_mode && !h_valid) stalls++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input mat7_t m, input vec7_t bfix, input bit stall);
    vec4_t av; mat4_t bm; vec7_t ref_a; bit z;
    longint sum;
    int cyc = 0;
    stall_mode = stall;
    for (int i = 0; i < WIN; i++) begin
      fixed_in[i] = bfix[i];
      for (int j = 0; j < WIN; j++) m_in[i][j] = m[i][j];
    end
    @(negedge clk) start = 1;
    @(posedge clk);
    @(negedge clk) start = 0;
    fixed_in = '{default: '0};
    while (!done) begin @(posedge clk); #1; cyc++; end
    stats_a(h, m, bfix, av, bm);
    z = solve_sys(av, bm, ref_a);
    if (z) ref_a = bfix;
    if (z) singular_seen++;
    checks++;
    if (!stall && cyc != 403) begin failures++; $display("latency %0d", cyc); end
    checks++;
    if (singular != z) begin failures++; $display("singular %b expected %b", singular, z); end
    sum = 0;
    for (int i = 0; i < WIN; i++) begin
      sum += taps[i];
      checks++;
      if (taps[i] != ref_a[i]) begin failures++; $display("a[%0d] %0d != %0d", i, taps[i], ref_a[i]); end
    end
    checks++;
    if (sum != 65536) begin failures++; $display("taps sum %0d", sum); end
    $display("a = %0d %0d %0d %0d (cycles %0d)", taps[0], taps[1], taps[2], taps[3], cyc);
  endtask

  initial begin
    mat7_t m; vec7_t b0;
    b0 = '{1536, -3584, 7680, 54272, 7680, -3584, 1536};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      make_stats(8, 17 + t, h, m);
      run(m, b0, t[0]);
    end
    h = '{default: '{default: '{default: '{default: 0}}}};
    m = '{default: '{default: 0}};
    run(m, b0, 0);
    checks++;
    if (stalls == 0) begin failures++; $display("no stall happened"); end
    checks++;
    if (singular_seen == 0) begin failures++; $display("no singular case"); end
    $display("stalls %0d, singular cases %0d", stalls, singular_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
