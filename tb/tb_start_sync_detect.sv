// tb_start_sync_detect -- feeds five-point sums of generated tag packets and checks
// that a good preamble raises startid right after the synchronising pulse (with
// countbias = samples already past its peak), that a ONE among the start bits and a
// lone pulse both end in syncerr, and that the algorithm reset re-arms the stage.
module tb_start_sync_detect;
  import tag_wave_pkg::*;
  logic clk = 0, rst = 1, algo_rst = 0, ps_pulse = 0, in_valid = 0;
  logic [14:0] in_data = '0, threshold = 15'd2500;
  logic startid, syncerr;
  logic [6:0] countbias;
  int checks = 0, failures = 0;
  int nerr = 0;
  always @(posedge clk) if (syncerr && !rst) nerr++;

  start_sync_detect dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int s0, bad, lone;
  function automatic int raw(int i);
    int v = BASE + noise_at(i);
    if (lone != 0) begin
      if (i >= s0 + 12 && i <= s0 + 17) v += AMP;
    end else v += pulse_at(i, s0, 64'h0123456789ABCDEF, bad);
    return v;
  endfunction
  function automatic int filt(int i);
    int s = 0;
    for (int k = 0; k < 5; k++) s += raw(i - k);
    return s;
  endfunction

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Runs one candidate; returns sample index at which startid / syncerr appeared.
  task automatic run_case(output int start_at, output int err_at);
    bit armed = 0;
    start_at = -1; err_at = -1;
    nerr = 0;
    for (int i = 0; i < s0 + 400; i++) begin
      in_valid <= 1; in_data <= 15'(filt(i));
      @(posedge clk);
      in_valid <= 0;
      if (!armed && filt(i) > int'(threshold)) begin
        armed = 1; ps_pulse <= 1;
      end
      @(posedge clk);
      ps_pulse <= 0;
      @(posedge clk); #1;
      if (startid && start_at < 0) start_at = i;
      if (nerr > 0 && err_at < 0) err_at = i;
    end
  endtask

  task automatic algo_reset();
    algo_rst <= 1; @(posedge clk); algo_rst <= 0; @(posedge clk); #1;
  endtask

  initial begin
    int st, er;
    repeat (3) @(posedge clk);
    rst <= 0;
    // Good preamble: sync peak at s0 + 244, its window closes at s0 + 248.
    for (int t = 0; t < 4; t++) begin
      s0 = 40 + 7 * t; bad = 0; lone = 0;
      run_case(st, er);
      check("good preamble gives startid", st >= 0 && er < 0);
      check("startid right after the sync window", st >= s0 + 248 && st <= s0 + 250);
      check("countbias counts samples past the sync peak", countbias >= 7'd3 && countbias <= 7'd5);
      algo_reset();
      check("reset clears startid", !startid);
    end
    // A ONE among the start bits.
    s0 = 60; bad = 5; lone = 0;
    run_case(st, er);
    check("bad start bit gives syncerr", er >= 0 && st < 0);
    check("syncerr at the bad bit", er > s0 + 4 * 24 && er < s0 + 6 * 24);
    algo_reset();
    // A lone pulse with no packet around it.
    s0 = 60; bad = 0; lone = 1;
    run_case(st, er);
    check("lone pulse gives syncerr", er >= 0 && st < 0);
    algo_reset();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
