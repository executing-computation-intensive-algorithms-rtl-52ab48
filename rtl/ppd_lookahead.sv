// ppd_lookahead -- "look forward" peak comparison shared by the start/sync and
// ID stages.
//
// The detector decides each tag bit by looking ahead of the last pulse peak it
// accepted (the anchor). A logic ONE puts its pulse in the first quarter of a bit
// period and a ZERO in the third quarter, so from the anchor the next pulse can only
// lie at one of two known distances. Around each candidate distance is a window of
// +/-HALF_W samples; the stage keeps the largest filtered value and its position in
// each window. One sample after the later window closes it decides: candidate A
// (the ONE position) wins if its peak is strictly larger than candidate B's (the
// ZERO position), otherwise B wins. The winning peak becomes the new anchor: the
// sample count is re-based so that it counts from that peak, which lets the bit
// grid follow the tag's clock.
//
// Interface: `load` starts counting with `load_cnt` samples already past the anchor
// and clears both windows. centre_a = 0 means there is no A candidate (B always
// wins). The caller may change the centres in the clock after `decided`; the
// smallest window starts 9 samples after an anchor, so no sample is lost as long as
// samples are at least two clocks apart. Outputs `decided`, `a_wins`, `max_a`,
// `max_b` and `cnt` are registered and valid together. The windows of +/-3 samples
// around the expected peak are the document's; the strict compare and the
// re-basing are this design's way of doing it in a stream.
module ppd_lookahead
  import rfid_pkg::*;
#(
  parameter int unsigned HALF_W = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [CNT_W-1:0] load_cnt,
  input  logic             in_valid,
  input  filt_t            in_data,
  input  logic [CNT_W-1:0] centre_a,
  input  logic [CNT_W-1:0] centre_b,
  output logic             decided,
  output logic             a_wins,
  output filt_t            max_a,
  output filt_t            max_b,
  output logic [CNT_W-1:0] cnt
);

  logic [CNT_W-1:0] idx, end_idx, pos_a, pos_b;
  logic             hit_a, hit_b, in_a, in_b, upd_a, upd_b;
  filt_t            cur_a, cur_b;
  logic [CNT_W-1:0] cur_pa, cur_pb;
  logic             win_a;

  assign idx     = cnt + 1'b1;
  assign end_idx = ((centre_a > centre_b) ? centre_a : centre_b) + CNT_W'(HALF_W + 1);
  assign in_a    = (centre_a != '0) && (idx + CNT_W'(HALF_W) >= centre_a) && (idx <= centre_a + CNT_W'(HALF_W));
  assign in_b    = (idx + CNT_W'(HALF_W) >= centre_b) && (idx <= centre_b + CNT_W'(HALF_W));
  assign upd_a   = in_a && (!hit_a || in_data > max_a);
  assign upd_b   = in_b && (!hit_b || in_data > max_b);
  // Window peaks including the current sample.
  assign cur_a   = upd_a ? in_data : max_a;
  assign cur_b   = upd_b ? in_data : max_b;
  assign cur_pa  = upd_a ? idx : pos_a;
  assign cur_pb  = upd_b ? idx : pos_b;
  assign win_a   = (centre_a != '0) && hit_a && (max_a > max_b);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      hit_a   <= 1'b0;
      hit_b   <= 1'b0;
      max_a   <= '0;
      max_b   <= '0;
      pos_a   <= '0;
      pos_b   <= '0;
      decided <= 1'b0;
      a_wins  <= 1'b0;
    end else begin
      decided <= 1'b0;
      if (load) begin
        cnt   <= load_cnt;
        hit_a <= 1'b0;
        hit_b <= 1'b0;
        max_a <= '0;
        max_b <= '0;
      end else if (in_valid) begin
        if (idx == end_idx) begin
          // Both windows are closed: decide and re-anchor at the winning peak.
          decided <= 1'b1;
          a_wins  <= win_a;
          cnt     <= idx - (win_a ? pos_a : pos_b);
          hit_a   <= 1'b0;
          hit_b   <= 1'b0;
        end else begin
          cnt   <= idx;
          hit_a <= hit_a | in_a;
          hit_b <= hit_b | in_b;
          max_a <= cur_a;
          max_b <= cur_b;
          pos_a <= cur_pa;
          pos_b <= cur_pb;
        end
      end
    end
  end

endmodule
