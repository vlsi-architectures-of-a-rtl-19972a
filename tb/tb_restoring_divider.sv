// tb_restoring_divider -- checks the sequential signed divider against
// SystemVerilog's own truncating division on random and corner operands,
// the divide-by-zero flag, and the latency of W+1 cycles from start to done.
module tb_restoring_divider;
  localparam int W = 64;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [W-1:0] dividend, divisor, quotient, remainder;
  logic busy, done, dz;
  int checks = 0, failures = 0;

  restoring_divider #(.W(W)) dut (.clk, .rst_n, .start, .dividend, .divisor,
    .busy, .done, .quotient, .remainder, .div_by_zero(dz));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint n, input longint d);
    int cyc = 0;
    @(negedge clk);
    dividend = n; divisor = d; start = 1;
    @(posedge clk);
    @(negedge clk);
    start = 0;
    dividend = $urandom; divisor = $urandom;  // inputs need not stay stable
    cyc = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != W + 1) begin failures++; $display("latency %0d for %0d/%0d", cyc, n, d); end
    checks++;
    if (d == 0) begin
      if (!dz) begin failures++; $display("no div_by_zero flag"); end
    end else if (dz || quotient != n / d || remainder != n % d) begin
      failures++;
      $display("%0d / %0d: got q=%0d r=%0d", n, d, quotient, remainder);
    end
  endtask

  initial begin
    longint n, d;
    dividend = 0; divisor = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(100, 7); run(-100, 7); run(100, -7); run(-100, -7);
    run(0, 5); run(5, 0); run(64'sh7fffffffffffffff, 1);
    run(64'sh7fffffffffffffff, 64'sh7fffffffffffffff);
    run(-64'sh7fffffffffffffff, 3); run(12345, 12346);
    for (int t = 0; t < 150; t++) begin
      n = {$urandom, $urandom};
      d = {$urandom, $urandom};
      case (t % 4)
        0: d = d >>> 40;
        1: d = d >>> 20;
        2: n = n >>> 16;
        default: ;
      endcase
      if (d == 0) d = 1;
      if (n == 64'sh8000000000000000) n = 0;
      run(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
