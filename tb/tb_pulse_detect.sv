// tb_pulse_detect -- checks that only a value strictly above the threshold, seen
// while the threshold is ready, raises ps; that ps holds and ps_pulse is a single
// clock; and that the algorithm reset clears it.
module tb_pulse_detect;
  logic clk = 0, rst = 1, algo_rst = 0, ready = 0, in_valid = 0;
  logic [14:0] in_data = '0, threshold = 15'd1000;
  logic ps, ps_pulse;
  int checks = 0, failures = 0, pulses = 0;

  pulse_detect dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (ps_pulse && !rst) pulses++;

  initial begin
    repeat (100000) @(posedge clk);
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
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    push(5000);
    check("ignored while not ready", !ps);
    ready <= 1;
    push(1000);
    check("equal to threshold is not a pulse", !ps);
    push(999);
    check("below threshold", !ps);
    in_valid <= 0; in_data <= 15'd3000; @(posedge clk); @(posedge clk); #1;
    check("no pulse without in_valid", !ps);
    push(1001);
    check("above threshold sets ps", ps);
    check("one pulse", pulses == 1);
    push(2000); push(500);
    check("ps held", ps && pulses == 1);
    algo_rst <= 1; @(posedge clk); algo_rst <= 0; @(posedge clk); #1;
    check("reset clears ps", !ps);
    push(1500);
    check("detects again", ps && pulses == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
