// uart_rx_model -- behavioural serial receiver standing in for the host computer.
//
// Watches the line for a falling edge, samples the middle of the start bit, of the
// eight data bits (least significant first) and of the stop bit, BAUD_DIV clocks
// apart, and reports each byte with a one-clock rx_valid. Counts frames whose start
// bit is not low at its middle or whose stop bit is not high.
module uart_rx_model #(
  parameter int BAUD_DIV = 160
) (
  input  logic       clk,
  input  logic       txd,
  output logic       rx_valid,
  output logic [7:0] rx_byte,
  output int         frame_errors
);
  initial begin
    rx_valid     = 0;
    rx_byte      = '0;
    frame_errors = 0;
    // Wait for the idle line after reset before looking for start bits.
    repeat (4) @(posedge clk);
    while (txd !== 1'b1) @(posedge clk);
    forever begin
      @(posedge clk);
      rx_valid <= 0;
      if (txd === 1'b0) begin
        logic [7:0] b;
        repeat (BAUD_DIV / 2 - 1) @(posedge clk);
        if (txd !== 1'b0) frame_errors++;
        for (int k = 0; k < 8; k++) begin
          repeat (BAUD_DIV) @(posedge clk);
          b[k] = txd;
        end
        repeat (BAUD_DIV) @(posedge clk);
        if (txd !== 1'b1) frame_errors++;
        rx_byte  <= b;
        rx_valid <= 1;
      end
    end
  end
endmodule
