// tb_wiener_filter_top -- end-to-end test from pixels to filters at the
// design's own sizes.
//
// Synthetic frames (random source, separable [1 2 1]/4 blur plus noise as
// the degraded frame) are streamed as 7x7 windows with their source pixel;
// then one iteration runs and both filters are compared with the reference
// model applied to the same statistics. Mechanisms counted, each required
// at least once: windows ignored while busy, a start that has to wait for
// the last window to be added, statistics accumulated over two regions
// without clear, and a singular iteration on cleared (empty) statistics.
// Latency: 809 cycles from start when no window is in flight, 810 when one is.
module tb_wiener_filter_top;
  import wf_pkg::*;
  import wf_ref_pkg::*;
  localparam int PW = 16;
  logic clk = 0, rst_n = 0, clear = 0, win_valid = 0, start = 0;
  logic signed [PW-1:0] win_x [WIN][WIN];
  logic signed [PW-1:0] win_y;
  word_t b_in [WIN];
  logic busy, done, a_sing, b_sing;
  word_t a_out [WIN];
  word_t b_out [WIN];
  int checks = 0, failures = 0;
  int n_ignored = 0, n_wait = 0, n_accum2 = 0, n_sing = 0;
  hmat_t h_ref;
  mat7_t m_ref;

  wiener_filter_top dut (.clk, .rst_n, .clear, .win_valid, .win_x, .win_y, .start, .b_in,
    .busy, .done, .a_out, .b_out, .a_singular(a_sing), .b_singular(b_sing));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream every window of an n x n region; leaves win_valid high after
  // the last one when keep is set
  task automatic stream(input int n, input int seed, input bit keep);
    frame_t src, deg;
    make_frames(n, seed, src, deg);
    for (int py = 3; py < n + 3; py++)
      for (int px = 3; px < n + 3; px++) begin
        @(negedge clk);
        win_valid = 1;
        win_y = PW'(src[py][px]);
        for (int r = 0; r < WIN; r++)
          for (int c = 0; c < WIN; c++) win_x[r][c] = PW'(deg[py+r-3][px+c-3]);
      end
    if (!keep) begin @(negedge clk); win_valid = 0; end
  endtask

  task automatic do_clear();
    @(negedge clk); clear = 1; win_valid = 0;
    @(negedge clk); clear = 0;
    h_ref = '{default: '{default: '{default: '{default: 0}}}};
    m_ref = '{default: '{default: 0}};
  endtask

  task automatic add_ref(input int n, input int seed);
    hmat_t h; mat7_t m;
    make_stats(n, seed, h, m);
    foreach (h[i, j, k, l]) h_ref[i][j][k][l] += h[i][j][k][l];
    foreach (m[i, j]) m_ref[i][j] += m[i][j];
  endtask

  task automatic iterate_and_check(input vec7_t bi, input bit inflight, input bit noise);
    vec7_t ra, rb; bit za, zb;
    int cyc = 0;
    // start coincides with the last window when inflight is set
    if (!inflight) @(negedge clk);
    start = 1;
    for (int i = 0; i < WIN; i++) b_in[i] = bi[i];
    @(posedge clk);
    if (inflight && dut.u_pre.pending) n_wait++;
    @(negedge clk);
    start = 0;
    win_valid = 0;
    b_in = '{default: '0};
    while (!done) begin
      @(posedge clk); #1; cyc++;
      if (noise && busy) begin
        // random windows while busy must be ignored
        win_valid = 1;
        foreach (win_x[r, c]) win_x[r][c] = PW'($urandom);
        win_y = PW'($urandom);
        n_ignored++;
      end
    end
    win_valid = 0;
    iterate(h_ref, m_ref, bi, ra, rb, za, zb);
    n_sing += za && zb;
    checks++;
    if (cyc != (inflight ? 810 : 809)) begin failures++; $display("latency %0d", cyc); end
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
    vec7_t b0;
    b0 = '{1536, -3584, 7680, 54272, 7680, -3584, 1536};
    win_y = 0;
    foreach (win_x[r, c]) win_x[r][c] = 0;
    b_in = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // region 1, random windows pushed while busy
    do_clear();
    stream(10, 3, 0); add_ref(10, 3);
    iterate_and_check(b0, 0, 1);
    // region 2 added to region 1 (no clear), start with the last window
    stream(8, 4, 1); add_ref(8, 4); n_accum2++;
    iterate_and_check(b0, 1, 0);
    // fresh region, start on the previous result
    do_clear();
    stream(12, 9, 0); add_ref(12, 9);
    iterate_and_check('{a_out[0], a_out[1], a_out[2], a_out[3], a_out[4], a_out[5], a_out[6]}, 0, 0);
    // empty statistics
    do_clear();
    iterate_and_check(b0, 0, 0);
    $display("ignored windows %0d, waits %0d, two-region sums %0d, singular %0d",
             n_ignored, n_wait, n_accum2, n_sing);
    checks++; if (n_ignored == 0) begin failures++; $display("no window ignored"); end
    checks++; if (n_wait == 0)    begin failures++; $display("start never waited"); end
    checks++; if (n_accum2 == 0)  begin failures++; $display("no two-region sum"); end
    checks++; if (n_sing == 0)    begin failures++; $display("no singular run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
