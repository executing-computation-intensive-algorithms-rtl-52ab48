// tb_uat_control -- writes bursts of bytes into the UAT control block (FIFO,
// control state machine and transmitter) and decodes the serial line: every byte
// must come out once, in order, 8N1; the FIFO must drain to empty; a small FIFO
// is filled to full to show the flag.
module tb_uat_control;
  localparam int DIV = 16;
  localparam int D   = 20;
  logic clk = 0, rst = 1, wrreq = 0;
  logic [7:0] data_in = '0;
  logic txd, full, empty;
  logic rx_valid;
  logic [7:0] rx_byte;
  int frame_errors;
  int checks = 0, failures = 0, nfull = 0;
  logic [7:0] sent [$], rxq [$];

  uat_control #(.BAUD_DIV(DIV), .FIFO_DEPTH(D)) dut (.*);
  uart_rx_model #(.BAUD_DIV(DIV)) rx (.clk, .txd, .rx_valid, .rx_byte, .frame_errors);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rx_valid) rxq.push_back(rx_byte);
    if (full && !rst) nfull++;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    for (int burst = 0; burst < 4; burst++) begin
      for (int k = 0; k < (burst == 2 ? 30 : 9); k++) begin
        automatic logic [7:0] v = 8'($urandom);
        @(posedge clk);
        if (!full) begin
          wrreq <= 1; data_in <= v; sent.push_back(v);
          @(posedge clk);
          wrreq <= 0;
        end
      end
      wait (empty);
      repeat (12 * DIV) @(posedge clk);
    end
    checks++;
    if (rxq.size() != sent.size()) begin failures++; $display("FAIL %0d bytes sent, %0d received", sent.size(), rxq.size()); end
    for (int k = 0; k < sent.size() && k < rxq.size(); k++) begin
      checks++;
      if (rxq[k] != sent[k]) begin failures++; $display("FAIL byte %0d: %h vs %h", k, rxq[k], sent[k]); end
    end
    checks++;
    if (frame_errors != 0) begin failures++; $display("FAIL framing"); end
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
