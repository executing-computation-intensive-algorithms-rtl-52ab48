// tb_byte_fifo -- random writes and reads against a queue model on a small FIFO
// (depth 13, not a power of two, so the pointer wrap is exercised), checking q,
// full and empty every clock, and that writes when full and reads when empty are
// ignored.
module tb_byte_fifo;
  localparam int D = 13;
  logic clk = 0, rst = 1, wrreq = 0, rdreq = 0;
  logic [7:0] data = '0, q;
  logic full, empty;
  int checks = 0, failures = 0, nfull = 0;
  logic [7:0] model [$];

  byte_fifo #(.WIDTH(8), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    for (int n = 0; n < 3000; n++) begin
      // Bias towards filling in the first half, draining in the second.
      automatic bit w = ($urandom_range(0, 99) < ((n % 600) < 300 ? 70 : 30));
      automatic bit r = ($urandom_range(0, 99) < ((n % 600) < 300 ? 30 : 70));
      checks++;
      if (full != (model.size() == D) || empty != (model.size() == 0) ||
          (model.size() > 0 && q != model[0])) begin
        failures++;
        $display("FAIL n=%0d size=%0d full=%0b empty=%0b q=%h", n, model.size(), full, empty, q);
      end
      if (full) nfull++;
      wrreq <= w; rdreq <= r; data <= 8'($urandom);
      @(posedge clk);
      if (r && model.size() > 0) void'(model.pop_front());
      if (w && model.size() < D + (r ? 1 : 0) && !(full)) model.push_back(data);
      #1;
    end
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
