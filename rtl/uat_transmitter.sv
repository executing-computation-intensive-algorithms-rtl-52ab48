// uat_transmitter -- RS-232 transmitter towards the host computer.
//
// A free-running counter divides the clock by BAUD_DIV and pulses `baud` once per
// bit time (18.432 MHz / 160 = 115 200 bit/s). A byte offered with `dtr` while
// `cts` is high is loaded into the shift register and `cts` drops. On the following
// baud pulses the line carries one start bit (0), the eight data bits least
// significant first (the shift register moves right and fills with ones), and one
// stop bit (1). `cts` rises as the stop bit starts, so a byte offered during the
// stop bit starts on the next baud pulse and back-to-back bytes take exactly 10
// bit times each. No parity.
//
// Timing: the start bit begins on the first baud pulse after the load, so it starts
// up to BAUD_DIV clocks after `dtr`; `cts` is low from the load until the stop bit
// begins, nine bit times after the start bit. Divider, frame format and bit order are the document's; raising cts at
// the start of the stop bit is this design's.
module uat_transmitter #(
  parameter int unsigned BAUD_DIV = 160
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       dtr,
  input  logic [7:0] din,
  output logic       txd,
  output logic       cts,
  output logic       baud
);

  logic [$clog2(BAUD_DIV)-1:0] div_cnt;
  logic [7:0]                  shift_reg;
  logic [3:0]                  bit_count;

  // Bit-rate tick.
  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt <= '0;
      baud    <= 1'b0;
    end else if (32'(div_cnt) == BAUD_DIV - 1) begin
      div_cnt <= '0;
      baud    <= 1'b1;
    end else begin
      div_cnt <= div_cnt + 1'b1;
      baud    <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      txd       <= 1'b1;
      cts       <= 1'b1;
      shift_reg <= '1;
      bit_count <= '0;
    end else if (cts) begin
      if (dtr) begin
        shift_reg <= din;
        cts       <= 1'b0;
        bit_count <= '0;
      end
    end else if (baud) begin
      bit_count <= bit_count + 1'b1;
      unique case (bit_count)
        4'd0:    txd <= 1'b0;                       // start bit
        4'd9: begin                                 // stop bit; next byte may load
          txd       <= 1'b1;
          cts       <= 1'b1;
          bit_count <= '0;
        end
        default: begin                              // data bits, LSB first
          txd       <= shift_reg[0];
          shift_reg <= {1'b1, shift_reg[7:1]};
        end
      endcase
    end
  end

endmodule
