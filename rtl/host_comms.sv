// host_comms -- host communications block of the detector.
//
// A tag ID that passed its CRC check is packed into a 9-byte packet (0xAA header,
// then the ID most significant byte first), queued in the packet FIFO and sent to
// the host over RS-232 at 115 200 bit/s, 8 data bits, no parity, one stop bit.
// The FIFO decouples the fast detector from the slow serial line: a packet takes
// 90 bit times (14 400 clocks at 18.432 MHz) to send.
//
// Timing: the first start bit leaves within a few hundred clocks of crc_correct.
module host_comms
  import rfid_pkg::*;
#(
  parameter int unsigned BAUD_DIV   = 160,
  parameter int unsigned FIFO_DEPTH = 8092
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    crc_correct,
  input  tag_id_t id,
  output logic    txd,
  output logic    fifo_full,
  output logic    fifo_empty
);

  logic       pda, pack_busy;
  logic [7:0] pack_byte;

  packet_packer u_pack (
    .clk, .rst, .crc_correct, .id, .full(fifo_full),
    .pda, .byte_o(pack_byte), .busy(pack_busy)
  );

  uat_control #(.BAUD_DIV(BAUD_DIV), .FIFO_DEPTH(FIFO_DEPTH)) u_uart (
    .clk, .rst, .wrreq(pda), .data_in(pack_byte), .txd,
    .full(fifo_full), .empty(fifo_empty)
  );

endmodule
