// tb_uat_transmitter -- sends bytes through the transmitter and decodes the line
// with an independent receiver: each byte must come back intact, framed 8N1 with
// the bit time of 160 clocks, cts must be low while a byte is sent and high again
// from the start of the stop bit, 9 to 10 bit times after the load.
module tb_uat_transmitter;
  localparam int DIV = 160;
  logic clk = 0, rst = 1, dtr = 0;
  logic [7:0] din = '0;
  logic txd, cts, baud;
  logic rx_valid;
  logic [7:0] rx_byte;
  int frame_errors;
  int checks = 0, failures = 0;

  uat_transmitter #(.BAUD_DIV(DIV)) dut (.*);
  uart_rx_model #(.BAUD_DIV(DIV)) rx (.clk, .txd, .rx_valid, .rx_byte, .frame_errors);

  always #5 clk = ~clk;
  logic [7:0] rxq [$];
  always @(posedge clk) if (rx_valid) rxq.push_back(rx_byte);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] bytes [$] = '{8'hAA, 8'h05, 8'h80, 8'h00, 8'hFF, 8'h0B, 8'h63, 8'h1F, 8'h97};
    int baud_gap = 0, last_baud = -1, t = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // Baud tick period.
    while (baud_gap == 0) begin
      @(posedge clk); t++;
      if (baud) begin if (last_baud >= 0) baud_gap = t - last_baud; last_baud = t; end
    end
    check("baud tick every 160 clocks", baud_gap == DIV);
    check("line idles high", txd == 1'b1);
    for (int n = 0; n < 20; n++) begin
      automatic logic [7:0] v = (n < bytes.size()) ? bytes[n] : 8'($urandom);
      automatic int cyc = 0;
      wait (cts);
      @(posedge clk);
      din <= v; dtr <= 1;
      @(posedge clk);
      dtr <= 0; din <= 8'($urandom);
      @(posedge clk); #1;
      check("cts low while sending", !cts);
      while (!cts) begin @(posedge clk); #1; cyc++; end
      check($sformatf("byte time %0d clocks", cyc), cyc >= 9 * DIV - 2 && cyc <= 10 * DIV);
      wait (rxq.size() > 0);
      begin
        automatic logic [7:0] got = rxq.pop_front();
        check($sformatf("byte %h received as %h", v, got), got == v);
      end
      @(posedge clk);
    end
    check("no framing errors", frame_errors == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
