// crc16_check -- serial CRC-16 check of a received tag ID.
//
// The 64 ID bits are 48 data bits followed by their 16-bit CRC. Starting from
// 0xFFFF, the bits are shifted MSB first, one per clock, through a CRC register
// with feedback taps for x^16 + x^15 + x^2 + 1. When all 64 bits are in, a zero
// register means the ID arrived intact: `correct` pulses; otherwise `fail` pulses.
//
// Timing: `id_av` loads the ID and starts the check (ignored while busy); the
// result pulses ID_BITS + 1 clocks later. `id_out` holds the checked ID. The serial
// structure, the taps, the 0xFFFF start value and the zero test are the
// document's.
module crc16_check
  import rfid_pkg::*;
#(
  parameter int unsigned  ID_BITS = ID_W,
  parameter logic [15:0]  INIT    = CRC_INIT
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                id_av,
  input  logic [ID_BITS-1:0]  id,
  output logic                busy,
  output logic                correct,
  output logic                fail,
  output logic [ID_BITS-1:0]  id_out
);

  logic [15:0]                    data_sig;
  logic [$clog2(ID_BITS+1)-1:0]   count;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      correct  <= 1'b0;
      fail     <= 1'b0;
      count    <= '0;
      data_sig <= INIT;
      id_out   <= '0;
    end else begin
      correct <= 1'b0;
      fail    <= 1'b0;
      if (!busy) begin
        if (id_av) begin
          id_out   <= id;
          data_sig <= INIT;
          count    <= '0;
          busy     <= 1'b1;
        end
      end else if (32'(count) == ID_BITS) begin
        busy <= 1'b0;
        if (data_sig == 16'h0000) correct <= 1'b1;
        else                      fail    <= 1'b1;
      end else begin
        data_sig <= crc16_step(data_sig, id_out[ID_BITS - 1 - 32'(count)]);
        count    <= count + 1'b1;
      end
    end
  end

endmodule
