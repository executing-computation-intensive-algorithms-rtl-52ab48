// id_extract -- decides the 64 ID bits of a tag packet.
//
// Started by the start/sync stage, it treats the synchronising pulse as the last
// bit, a ONE, and then decides each following bit by looking ahead of the last
// accepted peak. From a ONE the next ONE is N samples away and a ZERO N + N/2; from
// a ZERO the next ONE is N - N/2 away and a ZERO N. The peak found around the ONE
// position is compared with the peak around the ZERO position: a larger ONE peak
// gives a 1, anything else a 0. The winning peak becomes the anchor for the next
// bit. Bits are shifted in from the right, so the first ID bit ends in bit 63.
// After ID_BITS bits `idready` pulses once and `id` holds the value until the next
// ID; the stage then waits for the algorithm reset.
//
// Timing: `startid` is sampled on the clock after it rises; `countbias` says how
// many samples past the synchronising peak have already passed. Samples must be at
// least two clocks apart. The distances come from the document's formula (N + N/2 =
// 36 and N - N/2 = 12 for N = 24); the document also quotes 32 and 8 or 12 for the
// hardware, which do not add up to two bit periods, so the formula is used. The
// 64-bit register and the comparison are the document's.
module id_extract
  import rfid_pkg::*;
#(
  parameter int unsigned N          = 24,
  parameter int unsigned HALF_W     = 3,
  parameter int unsigned D_ONE_ZERO = N + N / 2,
  parameter int unsigned D_ZERO_ONE = N - N / 2,
  parameter int unsigned ID_BITS    = ID_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             algo_rst,
  input  logic             startid,
  input  logic [CNT_W-1:0] countbias,
  input  logic             in_valid,
  input  filt_t            in_data,
  output logic             idready,
  output tag_id_t          id
);

  typedef enum logic [1:0] {X_IDLE, X_RUN, X_DONE} state_t;
  state_t state;

  logic                         last_one;
  logic [$clog2(ID_BITS+1)-1:0] nbits;
  logic [CNT_W-1:0]             centre_a, centre_b, la_cnt;
  logic                         la_load, decided, a_wins;
  filt_t                        max_a, max_b;

  // A = ONE position, B = ZERO position, both measured from the last peak.
  assign centre_a = last_one ? CNT_W'(N) : CNT_W'(D_ZERO_ONE);
  assign centre_b = last_one ? CNT_W'(D_ONE_ZERO) : CNT_W'(N);
  assign la_load  = (state == X_IDLE) && startid;

  ppd_lookahead #(.HALF_W(HALF_W)) u_look (
    .clk, .rst(rst || algo_rst), .load(la_load), .load_cnt(countbias),
    .in_valid, .in_data, .centre_a, .centre_b,
    .decided, .a_wins, .max_a, .max_b, .cnt(la_cnt)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      id <= '0;
    end else if (state == X_RUN && decided) begin
      id <= {id[ID_W-2:0], a_wins};
    end
  end

  always_ff @(posedge clk) begin
    if (rst || algo_rst) begin
      state    <= X_IDLE;
      last_one <= 1'b1;
      nbits    <= '0;
      idready  <= 1'b0;
    end else begin
      idready <= 1'b0;
      unique case (state)
        X_IDLE: if (startid) begin
          state    <= X_RUN;
          last_one <= 1'b1;
          nbits    <= '0;
        end
        X_RUN: if (decided) begin
          last_one <= a_wins;
          nbits    <= nbits + 1'b1;
          if (32'(nbits) + 1 == ID_BITS) begin
            idready <= 1'b1;
            state   <= X_DONE;
          end
        end
        X_DONE: state <= X_DONE;
        default: state <= X_IDLE;
      endcase
    end
  end

endmodule
