// start_sync_detect -- confirms the start bits and finds the synchronising bit.
//
// A tag packet opens with START_BITS logic ZEROs (a pulse in the third quarter of
// each bit), two dead bits and a synchronising ONE. When the pulse detector flags a
// possible pulse, this stage first takes the peak of that pulse (window 0..2*HALF_W
// samples after the threshold crossing) as the first start bit. For each further
// start bit it looks N/2 samples ahead for a ONE and N samples ahead for a ZERO and
// compares the two window peaks; the ZERO must be larger, otherwise the candidate is
// dropped with a `syncerr` pulse. After the last start bit it looks SYNC_DIST
// samples ahead (the ZERO-to-ONE distance plus two dead bits, 3N - N/2) for the
// synchronising pulse, whose peak must exceed the threshold. Then `startid` goes
// high, and stays high until the algorithm reset, and `countbias` tells the ID stage
// how many samples past the synchronising peak have already gone by.
//
// Timing: decisions come one clock after the sample that closes a window; startid
// and syncerr are registered one clock later. N = 24 samples per bit (3.072 MS/s,
// 128 kb/s tags), +/-3 sample windows, eight start bits and the comparison rule are
// the document's. The document gives the synchronising distance three ways (60 by
// its formula, 52 and 54 in the text); 60, which matches the formula and the grid,
// is used here.
module start_sync_detect
  import rfid_pkg::*;
#(
  parameter int unsigned N          = 24,
  parameter int unsigned HALF_W     = 3,
  parameter int unsigned START_BITS = 8,
  parameter int unsigned SYNC_DIST  = 3 * N - N / 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             algo_rst,
  input  logic             ps_pulse,
  input  logic             in_valid,
  input  filt_t            in_data,
  input  filt_t            threshold,
  output logic             startid,
  output logic             syncerr,
  output logic [CNT_W-1:0] countbias
);

  typedef enum logic [2:0] {S_IDLE, S_FIRST, S_START, S_SYNC, S_DONE} state_t;
  state_t state;

  logic [$clog2(START_BITS+1)-1:0] nbits;
  logic [CNT_W-1:0] centre_a, centre_b, la_cnt;
  logic             la_load, decided, a_wins;
  filt_t            max_a, max_b;

  always_comb begin
    unique case (state)
      S_FIRST: begin centre_a = '0;             centre_b = CNT_W'(HALF_W);    end
      S_START: begin centre_a = CNT_W'(N / 2);  centre_b = CNT_W'(N);         end
      S_SYNC:  begin centre_a = '0;             centre_b = CNT_W'(SYNC_DIST); end
      default: begin centre_a = '0;             centre_b = CNT_W'(HALF_W);    end
    endcase
  end

  assign la_load = (state == S_IDLE) && ps_pulse;

  ppd_lookahead #(.HALF_W(HALF_W)) u_look (
    .clk, .rst(rst || algo_rst), .load(la_load), .load_cnt('0),
    .in_valid, .in_data, .centre_a, .centre_b,
    .decided, .a_wins, .max_a, .max_b, .cnt(la_cnt)
  );

  always_ff @(posedge clk) begin
    if (rst || algo_rst) begin
      state     <= S_IDLE;
      nbits     <= '0;
      startid   <= 1'b0;
      syncerr   <= 1'b0;
      countbias <= '0;
    end else begin
      syncerr <= 1'b0;
      unique case (state)
        S_IDLE: if (ps_pulse) state <= S_FIRST;
        S_FIRST: if (decided) begin
          nbits <= 1;
          state <= S_START;
        end
        S_START: if (decided) begin
          if (a_wins) begin
            syncerr <= 1'b1;
            state   <= S_DONE;
          end else begin
            nbits <= nbits + 1'b1;
            if (32'(nbits) + 1 == START_BITS) state <= S_SYNC;
          end
        end
        S_SYNC: if (decided) begin
          state <= S_DONE;
          if (max_b > threshold) begin
            startid   <= 1'b1;
            countbias <= la_cnt;
          end else begin
            syncerr <= 1'b1;
          end
        end
        S_DONE: state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
