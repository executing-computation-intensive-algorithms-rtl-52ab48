// tb_id_extract -- feeds five-point sums of generated tag packets, starts the stage
// after the synchronising pulse as the start/sync stage would, and checks that the
// 64 bits come out in order (first bit in bit 63) for random and extreme IDs, with
// idready pulsing once, shortly after the last bit of the packet.
module tb_id_extract;
  import tag_wave_pkg::*;
  logic clk = 0, rst = 1, algo_rst = 0, startid = 0, in_valid = 0;
  logic [6:0] countbias = 7'd4;
  logic [14:0] in_data = '0;
  logic idready;
  logic [63:0] id;
  int checks = 0, failures = 0;

  id_extract dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int s0;
  logic [63:0] cur_id;
  function automatic int filt(int i);
    int s = 0;
    for (int k = 0; k < 5; k++) s += BASE + noise_at(i - k) + pulse_at(i - k, s0, cur_id, 0);
    return s;
  endfunction

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_id(logic [63:0] v);
    int ready_at = -1, nready = 0;
    cur_id = v;
    s0 = 30;
    for (int i = 0; i < s0 + NBITS * SPB + 60; i++) begin
      in_valid <= 1; in_data <= 15'(filt(i));
      @(posedge clk);
      in_valid <= 0;
      // Hand over four samples past the sync peak (s0 + 244).
      if (i == s0 + 248) startid <= 1;
      @(posedge clk); #1;
      if (idready) begin nready++; if (ready_at < 0) ready_at = i; end
      @(posedge clk); #1;
      if (idready) begin nready++; if (ready_at < 0) ready_at = i; end
    end
    check($sformatf("id %h decoded (got %h)", v, id), id == v);
    check("idready pulsed once", nready == 1);
    check("idready right after the last bit", ready_at > s0 + 74 * SPB && ready_at < s0 + NBITS * SPB + 30);
    startid <= 0;
    algo_rst <= 1; @(posedge clk); algo_rst <= 0; @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    run_id(64'h058000000B631F97);
    run_id('0);
    run_id('1);
    run_id(64'hAAAA_AAAA_AAAA_AAAA);
    run_id(64'h5555_5555_5555_5555);
    run_id(64'hF0F0_0F0F_CC33_33CC);
    for (int n = 0; n < 6; n++) run_id({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
