// byte_fifo -- packet buffer between the packer and the serial transmitter.
//
// A single-clock first-in first-out memory of DEPTH bytes (8092: room for 899
// nine-byte packets), so tags detected in a burst wait while the 115.2 kb/s serial
// line catches up. It runs in show-ahead mode: `q` always shows the oldest byte and
// `rdreq` removes it. `full` and `empty` are flags on the stored count. A write to a
// full FIFO and a read from an empty one are ignored.
//
// Timing: a byte written on one clock is visible on q from the next clock when the
// FIFO was empty. Width, depth and the full/empty flags are the document's; the
// show-ahead read and the synchronous reset (the original used an asynchronous
// clear) are this design's.
module byte_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8092
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wrreq,
  input  logic [WIDTH-1:0] data,
  input  logic             rdreq,
  output logic [WIDTH-1:0] q,
  output logic             full,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;
  logic             do_wr, do_rd;

  assign full  = (32'(count) == DEPTH);
  assign empty = (count == '0);
  assign do_wr = wrreq && !full;
  assign do_rd = rdreq && !empty;
  assign q     = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= (32'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (32'(rd_ptr) == DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

endmodule
