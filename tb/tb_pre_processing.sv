// tb_pre_processing -- streams random 7x7 windows and source pixels
// (full 16-bit range and pixel-sized values) into the statistics block, reads
// back every H block through (h_i, h_j) and M, and compares with sums
// computed here. Checks the two-clock visibility (`pending` for one clock
// after the last window), that a clear empties all sums, and that a window
// in flight at clear time is dropped.
module tb_pre_processing;
  import wf_pkg::*;
  localparam int PW = 16;
  logic clk = 0, rst_n = 0, clear = 0, win_valid = 0, pending;
  logic signed [PW-1:0] win_x [WIN][WIN];
  logic signed [PW-1:0] win_y;
  logic [2:0] h_i = 0, h_j = 0;
  word_t h_blk [WIN][WIN];
  word_t m_out [WIN][WIN];
  longint h_ref [7][7][7][7];
  longint m_ref [7][7];
  int checks = 0, failures = 0;

  pre_processing #(.PIX_W(PW)) dut (.clk, .rst_n, .clear, .win_valid, .win_x, .win_y,
    .pending, .h_i, .h_j, .h_blk, .m_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input bit narrow);
    @(negedge clk);
    win_valid = 1;
    win_y = narrow ? PW'($urandom_range(255)) - 16'sd128 : PW'($urandom);
    foreach (win_x[r, c]) win_x[r][c] = narrow ? PW'($urandom_range(255)) - 16'sd128 : PW'($urandom);
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 7; j++) begin
        m_ref[i][j] += longint'(win_y) * longint'(win_x[j][i]);
        for (int k = 0; k < 7; k++)
          for (int l = 0; l < 7; l++)
            h_ref[i][j][k][l] += longint'(win_x[k][i]) * longint'(win_x[l][j]);
      end
  endtask

  // one check per H block and per M element
  task automatic compare(input string tag);
    int bad = 0;
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 7; j++) begin
        int blk_bad = 0;
        h_i = 3'(i); h_j = 3'(j);
        #1;
        for (int k = 0; k < 7; k++)
          for (int l = 0; l < 7; l++) if (h_blk[k][l] != h_ref[i][j][k][l]) blk_bad++;
        checks += 2;
        if (blk_bad != 0) begin failures++; bad++; end
        if (m_out[i][j] != m_ref[i][j]) begin failures++; bad++; end
      end
    if (bad != 0) $display("%s: %0d mismatching blocks or M elements", tag, bad);
  endtask

  task automatic zero_ref();
    h_ref = '{default: '{default: '{default: '{default: 0}}}};
    m_ref = '{default: '{default: 0}};
  endtask

  initial begin
    zero_ref();
    win_y = 0;
    foreach (win_x[r, c]) win_x[r][c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) send(t % 2 == 0);
    @(negedge clk) win_valid = 0;
    // last window still being added
    checks++;
    if (!pending) begin failures++; $display("pending low one clock after the last window"); end
    @(negedge clk);
    checks++;
    if (pending) begin failures++; $display("pending still high"); end
    compare("after 40 windows");
    // clear, with a window in flight that must be dropped
    send(1);
    zero_ref();
    @(negedge clk) begin win_valid = 0; clear = 1; end
    @(negedge clk) clear = 0;
    compare("after clear");
    for (int t = 0; t < 25; t++) send(1);
    @(negedge clk) win_valid = 0;
    @(negedge clk);
    compare("after 25 more windows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
