// tb_host_comms -- hands several checked IDs, some back to back, to the host
// communications block at the real bit rate (clock / 160) and decodes the serial
// line: each must arrive as 0xAA plus its eight bytes, most significant first, in
// order, and a packet must take 90 bit times on the line.
module tb_host_comms;
  localparam int DIV = 160;
  logic clk = 0, rst = 1, crc_correct = 0;
  logic [63:0] id = '0;
  logic txd, fifo_full, fifo_empty;
  logic rx_valid;
  logic [7:0] rx_byte;
  int frame_errors;
  int checks = 0, failures = 0;
  logic [7:0] expq [$], rxq [$];
  int first_rx = -1, last_rx = -1, t = 0;

  host_comms dut (.*);
  uart_rx_model #(.BAUD_DIV(DIV)) rx (.clk, .txd, .rx_valid, .rx_byte, .frame_errors);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    t++;
    if (rx_valid) begin
      rxq.push_back(rx_byte);
      if (first_rx < 0) first_rx = t;
      last_rx = t;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic give(logic [63:0] v);
    @(posedge clk);
    id <= v; crc_correct <= 1;
    @(posedge clk);
    crc_correct <= 0;
    expq.push_back(8'hAA);
    for (int k = 7; k >= 0; k--) expq.push_back(v[8 * k +: 8]);
    repeat (60) @(posedge clk);   // the packer needs 45 clocks per packet
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    give(64'h058000000B631F97);
    checks++;
    if (fifo_empty) begin failures++; $display("FAIL FIFO empty after a packet"); end
    give({$urandom, $urandom});
    give({$urandom, $urandom});
    wait (rxq.size() == expq.size());
    checks++;
    // Nine bytes of 10 bit times each per packet; 27 bytes span 26 frames between
    // the first and last byte.
    if (last_rx - first_rx < 26 * 10 * DIV || last_rx - first_rx > 27 * 11 * DIV) begin
      failures++; $display("FAIL timing %0d", last_rx - first_rx);
    end
    for (int k = 0; k < expq.size(); k++) begin
      checks++;
      if (rxq[k] != expq[k]) begin failures++; $display("FAIL byte %0d %h vs %h", k, rxq[k], expq[k]); end
    end
    repeat (2 * DIV) @(posedge clk);
    checks++;
    if (!fifo_empty || frame_errors != 0) begin failures++; $display("FAIL FIFO not drained / framing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
