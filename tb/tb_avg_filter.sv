// tb_avg_filter -- checks the five-point moving sum against a software sum over
// random samples arriving at random intervals, including the one-clock latency.
module tb_avg_filter;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [11:0] in_data = '0;
  logic        out_valid;
  logic [14:0] out_data;
  int checks = 0, failures = 0;
  int hist[$];

  avg_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sum;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 400; n++) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      in_valid <= 1;
      in_data  <= (n == 5) ? 12'hFFF : 12'($urandom_range(0, 4095));
      @(posedge clk);
      in_valid <= 0;
      hist.push_front(int'(in_data));
      exp_sum = 0;
      for (int k = 0; k < 5 && k < hist.size(); k++) exp_sum += hist[k];
      #1;
      checks++;
      if (!out_valid || int'(out_data) != exp_sum) begin
        failures++;
        $display("mismatch n=%0d got %0d exp %0d valid %0b", n, out_data, exp_sum, out_valid);
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
