// packet_packer -- turns a checked tag ID into the 9-byte host packet.
//
// The packet is the header byte 0xAA followed by the eight ID bytes, most
// significant byte first (ID bits 63..56 go out right after the header). After
// the CRC check reports a correct ID the packer latches it and writes one byte
// every GAP + 1 clocks: `byte_o` carries the byte and `pda` (packet data available)
// pulses for one clock as the FIFO write request. While the FIFO is full it holds
// the byte and waits. IDs that arrive while a packet is being written are dropped.
//
// Timing: the header is written GAP + 1 clocks after crc_correct, the last byte
// 9 * (GAP + 1) clocks after it when the FIFO never fills. The packet layout and the
// byte-per-pulse hand-off are the document's; GAP and the full-FIFO wait are this
// design's.
module packet_packer
  import rfid_pkg::*;
#(
  parameter logic [7:0]  HEADER = PACKET_HEADER,
  parameter int unsigned GAP    = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       crc_correct,
  input  tag_id_t    id,
  input  logic       full,
  output logic       pda,
  output logic [7:0] byte_o,
  output logic       busy
);

  localparam int unsigned NBYTES = ID_W / 8 + 1;

  tag_id_t                        id_buff;
  logic [$clog2(NBYTES+1)-1:0]    cnt;
  logic [$clog2(GAP+1)-1:0]       wait_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      pda      <= 1'b0;
      byte_o   <= '0;
      id_buff  <= '0;
      cnt      <= '0;
      wait_cnt <= '0;
    end else begin
      pda <= 1'b0;
      if (!busy) begin
        if (crc_correct) begin
          id_buff  <= id;
          busy     <= 1'b1;
          cnt      <= '0;
          wait_cnt <= '0;
        end
      end else if (32'(wait_cnt) != GAP) begin
        wait_cnt <= wait_cnt + 1'b1;
      end else if (!full) begin
        wait_cnt <= '0;
        pda      <= 1'b1;
        if (cnt == 0) begin
          byte_o <= HEADER;
        end else begin
          byte_o  <= id_buff[ID_W-1 -: 8];
          id_buff <= {id_buff[ID_W-9:0], 8'h00};
        end
        if (32'(cnt) == NBYTES - 1) busy <= 1'b0;
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
