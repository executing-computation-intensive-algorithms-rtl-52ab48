// uat_control -- moves packet bytes from the FIFO to the serial transmitter.
//
// Holds the packet FIFO and the transmitter and a three-state machine between
// them. IDLE waits until the FIFO holds a byte and the transmitter is clear to send
// (cts). GET_DATA takes the oldest byte from the FIFO (rdreq) into txdata. SET_DTR
// offers it to the transmitter with dtr and returns to IDLE, where the machine
// waits for cts to rise again after the byte has gone out. Sending stops when the
// FIFO is empty.
//
// Timing: one byte per transmitter frame; GET_DATA and SET_DTR take one clock each
// while cts is high. State names and the conditions on FIFO_empty and clear-to-send
// are the document's; the one-clock dtr strobe is this design's.
module uat_control #(
  parameter int unsigned BAUD_DIV   = 160,
  parameter int unsigned FIFO_DEPTH = 8092
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       wrreq,
  input  logic [7:0] data_in,
  output logic       txd,
  output logic       full,
  output logic       empty
);

  typedef enum logic [1:0] {U_IDLE, U_GET_DATA, U_SET_DTR} txd_state_t;
  txd_state_t txd_state;

  logic [7:0] q, txdata;
  logic       rdreq, cts, dtr, baud;

  byte_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .wrreq, .data(data_in), .rdreq, .q, .full, .empty
  );

  uat_transmitter #(.BAUD_DIV(BAUD_DIV)) u_xmit (
    .clk, .rst, .dtr, .din(txdata), .txd, .cts, .baud
  );

  assign rdreq = (txd_state == U_GET_DATA) && cts;
  assign dtr   = (txd_state == U_SET_DTR);

  always_ff @(posedge clk) begin
    if (rst) begin
      txd_state <= U_IDLE;
      txdata    <= '0;
    end else begin
      unique case (txd_state)
        U_IDLE:     if (!empty && cts) txd_state <= U_GET_DATA;
        U_GET_DATA: if (cts) begin
          txdata    <= q;
          txd_state <= U_SET_DTR;
        end
        U_SET_DTR:  if (cts) txd_state <= U_IDLE;
        default:    txd_state <= U_IDLE;
      endcase
    end
  end

endmodule
