// ppd_algorithm -- the pulse-peak-detection (PPD) pipeline.
//
// Each ADC sample flows once through five stages that all run in parallel, so every
// sample is fully handled before the next arrives (point processing, as opposed to
// collecting a buffer and processing it later):
//   avg_filter        five-point moving sum
//   threshold_limiter noise-floor maximum + offset, refreshed every 100 values
//   pulse_detect      first value above the threshold
//   start_sync_detect eight start ZEROs and the synchronising ONE
//   id_extract        the 64 ID bits
// The stages talk through valid pulses and held flags; the block itself only wires
// them. `algo_rst` (from the main control) restarts the threshold, pulse, start and
// ID stages after a failed start or a finished ID; the filter keeps running.
//
// Timing: the filtered value is one clock behind the ADC sample; all other stages
// act on the filtered value. Samples must be at least two clocks apart.
module ppd_algorithm
  import rfid_pkg::*;
#(
  parameter int unsigned N      = 24,
  parameter int unsigned WINDOW = 100,
  parameter int unsigned OFFSET = 100
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    algo_rst,
  input  logic    sample_valid,
  input  sample_t sample,
  output logic    syncerr,
  output logic    idready,
  output tag_id_t id,
  output filt_t   threshold,
  output logic    ps,
  output logic    startid,
  output logic    swap
);

  logic             f_valid, lim_ready, ps_pulse;
  filt_t            f_data;
  logic [CNT_W-1:0] countbias;

  avg_filter #(.TAPS(5), .IN_W(SAMPLE_W), .OUT_W(FILT_W)) u_filter (
    .clk, .rst, .in_valid(sample_valid), .in_data(sample),
    .out_valid(f_valid), .out_data(f_data)
  );

  threshold_limiter #(.WINDOW(WINDOW), .OFFSET(OFFSET)) u_limiter (
    .clk, .rst, .algo_rst, .in_valid(f_valid), .in_data(f_data), .stop(ps),
    .threshold, .ready(lim_ready), .swap
  );

  pulse_detect u_syncpos (
    .clk, .rst, .algo_rst, .ready(lim_ready), .in_valid(f_valid), .in_data(f_data),
    .threshold, .ps, .ps_pulse
  );

  start_sync_detect #(.N(N)) u_synchron (
    .clk, .rst, .algo_rst, .ps_pulse, .in_valid(f_valid), .in_data(f_data),
    .threshold, .startid, .syncerr, .countbias
  );

  id_extract #(.N(N)) u_extractid (
    .clk, .rst, .algo_rst, .startid, .countbias, .in_valid(f_valid), .in_data(f_data),
    .idready, .id
  );

endmodule
