// tb_threshold_limiter -- drives filtered values and compares the threshold, the
// ready flag and the window swaps with a software model: maximum of the first 100
// values + 100, then maximum of each next 100 + 100 while no pulse freezes it. Also
// checks the freeze on `stop` and the restart on the algorithm reset.
module tb_threshold_limiter;
  logic clk = 0, rst = 1, algo_rst = 0, in_valid = 0, stop = 0;
  logic [14:0] in_data = '0, threshold;
  logic ready, swap;
  int checks = 0, failures = 0, swaps = 0;

  threshold_limiter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (swap && !rst) swaps++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(int v);
    in_valid <= 1; in_data <= 15'(v);
    @(posedge clk);
    in_valid <= 0;
    @(posedge clk); #1;
  endtask

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (thr=%0d ready=%0b)", what, threshold, ready); end
  endtask

  initial begin
    int m;
    repeat (3) @(posedge clk);
    rst <= 0;
    // First window.
    m = 0;
    for (int i = 0; i < 100; i++) begin
      automatic int v = $urandom_range(1000, 2000);
      if (v > m) m = v;
      check("not ready inside first window", !ready);
      push(v);
    end
    check("ready after 100", ready);
    check("first threshold = max + 100", int'(threshold) == m + 100);
    // Second and third windows: swap to their maxima.
    for (int w = 0; w < 2; w++) begin
      automatic int m2 = 0;
      for (int i = 0; i < 100; i++) begin
        automatic int v = $urandom_range(500, 900 + 300 * w);
        if (v > m2) m2 = v;
        if (i < 99) check("threshold held inside window", int'(threshold) == m + 100);
        push(v);
      end
      check("threshold swapped to window max + 100", int'(threshold) == m2 + 100);
      m = m2;
    end
    check("two swaps seen", swaps == 2);
    // Freeze while stop is high.
    stop <= 1;
    for (int i = 0; i < 250; i++) push(4000);
    check("frozen by stop", int'(threshold) == m + 100 && ready);
    check("no swap while frozen", swaps == 2);
    // Algorithm reset restarts from an empty first window.
    algo_rst <= 1; stop <= 0;
    @(posedge clk);
    algo_rst <= 0;
    @(posedge clk);
    check("not ready after algorithm reset", !ready);
    for (int i = 0; i < 100; i++) push(10 + i);
    check("ready again", ready);
    check("restart threshold", int'(threshold) == 109 + 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
