// threshold_limiter -- event threshold of the pulse-peak detector.
//
// After a reset the stage takes the maximum of the first WINDOW filtered values,
// assumed to hold no tag energy, and adds OFFSET to it: that is the threshold a
// pulse must exceed. It then raises `ready` so the pulse detector starts looking.
// While no pulse is found it keeps taking the maximum of every further WINDOW
// values; at the end of each such window the threshold is replaced by that maximum
// plus OFFSET (a one-clock `swap` pulse marks it), so the threshold follows a
// changing noise floor. When the pulse detector reports a pulse (`stop`), the stage
// freezes; the algorithm reset (`algo_rst`, after an error or a detected ID)
// restarts it from an empty first window.
//
// Timing: one update per in_valid; threshold and ready change on the clock after
// the WINDOW-th value. WINDOW = 100 and the freeze/resume rules are the document's;
// OFFSET = 100 is the value the hardware used (the processor version of the
// algorithm added 200). Restarting from an empty window after every algorithm reset
// is this design's reading.
module threshold_limiter
  import rfid_pkg::*;
#(
  parameter int unsigned WINDOW = 100,
  parameter int unsigned OFFSET = 100
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  algo_rst,
  input  logic  in_valid,
  input  filt_t in_data,
  input  logic  stop,
  output filt_t threshold,
  output logic  ready,
  output logic  swap
);

  logic [$clog2(WINDOW)-1:0] cnt;
  filt_t max1, max2;

  filt_t max1_n, max2_n;
  assign max1_n = (in_data > max1) ? in_data : max1;
  assign max2_n = (in_data > max2) ? in_data : max2;

  always_ff @(posedge clk) begin
    if (rst || algo_rst) begin
      cnt       <= '0;
      max1      <= '0;
      max2      <= '0;
      ready     <= 1'b0;
      swap      <= 1'b0;
      threshold <= filt_t'(OFFSET);
    end else begin
      swap <= 1'b0;
      if (in_valid && !stop) begin
        if (32'(cnt) == WINDOW - 1) cnt <= '0;
        else                   cnt <= cnt + 1'b1;
        if (!ready) begin
          // First window: noise floor for the starting threshold.
          max1 <= max1_n;
          if (32'(cnt) == WINDOW - 1) begin
            threshold <= max1_n + filt_t'(OFFSET);
            ready     <= 1'b1;
          end
        end else begin
          // Following windows: second maximum, swapped in when no pulse came.
          if (32'(cnt) == WINDOW - 1) begin
            threshold <= max2_n + filt_t'(OFFSET);
            max1      <= max2_n;
            max2      <= '0;
            swap      <= 1'b1;
          end else begin
            max2 <= max2_n;
          end
        end
      end
    end
  end

endmodule
