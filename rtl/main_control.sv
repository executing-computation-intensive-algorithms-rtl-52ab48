// main_control -- keeps the detector's blocks in step.
//
// It watches the PPD pipeline. When the start/sync stage gives up on a candidate
// (`syncerr`) or the ID stage delivers 64 bits (`idready`), it issues a one-clock
// algorithm reset so the threshold, pulse, start and ID stages look for the next
// packet. A delivered ID is captured and handed to the CRC check with `id_av`; if
// the check is still busy with the previous ID, the new one waits in the capture
// register until the check is free.
//
// Timing: algo_rst and id_av are registered, one clock after the event. That this
// block resets the algorithm and passes data between the other blocks is the
// document's; the capture register and the wait are this design's.
module main_control
  import rfid_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          syncerr,
  input  logic          idready,
  input  tag_id_t       id_in,
  input  logic          crc_busy,
  output logic          algo_rst,
  output logic          id_av,
  output tag_id_t       id_out
);

  logic pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      algo_rst    <= 1'b0;
      id_av       <= 1'b0;
      id_out      <= '0;
      pending     <= 1'b0;
    end else begin
      algo_rst <= syncerr || idready;
      id_av    <= 1'b0;
      if (idready) begin
        id_out  <= id_in;
        pending <= 1'b1;
      end else if (pending && !crc_busy && !id_av) begin
        id_av   <= 1'b1;
        pending <= 1'b0;
      end
    end
  end

endmodule
