// tb_ppd_algorithm -- drives raw ADC samples (noise floor and generated tag
// packets) into the whole PPD pipeline, acting as the main control (algorithm reset
// after syncerr or idready). Checks the first threshold against the maximum of the
// first 100 five-point sums + 100, that the threshold follows a changed noise floor
// by a window swap, that a corrupted preamble is rejected with syncerr and that
// every good packet's 64 ID bits come out exactly, shortly after the packet ends.
module tb_ppd_algorithm;
  import tag_wave_pkg::*;
  logic clk = 0, rst = 1, algo_rst = 0, sample_valid = 0;
  logic [11:0] sample = '0;
  logic syncerr, idready, ps, startid, swap;
  logic [63:0] id;
  logic [14:0] threshold;
  int checks = 0, failures = 0;
  int nerr = 0, nid = 0, nswap = 0;
  logic [63:0] ids [$];

  ppd_algorithm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    algo_rst <= syncerr || idready;
    if (syncerr) nerr++;
    if (idready) begin nid++; ids.push_back(id); end
    if (swap) nswap++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus: tags at the given sample offsets.
  localparam int NT = 4;
  int          s0  [NT] = '{500, 2600, 4700, 6800};
  int          bad [NT] = '{0, 3, 0, 0};
  logic [63:0] tid [NT];
  function automatic int raw(int i);
    int v = BASE + noise_at(i) + ((i >= 200 && i < 400) ? -15 : 0);
    for (int t = 0; t < NT; t++) v += pulse_at(i, s0[t], tid[t], bad[t]);
    return v;
  endfunction

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int m = 0, thr1 = -1, end_ok = 0;
    tid[0] = 64'h058000000B631F97;
    tid[1] = make_id(48'hDEADBEEF0001);
    tid[2] = make_id({$urandom, 16'($urandom)});
    tid[3] = make_id(48'h000000000000);
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 9000; i++) begin
      // Reference: first threshold = max of the first 100 five-point sums + 100.
      if (i < 100) begin
        automatic int s = 0;
        for (int k = 0; k < 5; k++) if (i - k >= 0) s += raw(i - k);
        if (s > m) m = s;
      end
      sample_valid <= 1; sample <= 12'(raw(i));
      @(posedge clk);
      sample_valid <= 0;
      repeat (5) @(posedge clk);
      #1;
      if (i == 101) thr1 = int'(threshold);
      if (i == s0[0] + NBITS * SPB + 20 && nid == 1) end_ok = 1;
    end
    check("first threshold = max of first 100 sums + 100", thr1 == m + 100);
    check("threshold followed the noise floor (window swaps)", nswap >= 2);
    check("corrupted preamble rejected", nerr >= 1);
    check("three good IDs", nid == 3);
    check("first ID within 20 samples of the packet end", end_ok == 1);
    if (ids.size() == 3) begin
      check("ID 1", ids[0] == tid[0]);
      check("ID 2", ids[1] == tid[2]);
      check("ID 3", ids[2] == tid[3]);
    end
    $display("errors=%0d ids=%0d swaps=%0d exp %h %h %h", nerr, nid, nswap, tid[0], tid[2], tid[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
