// avg_filter -- five-point moving sum in front of the pulse-peak detector.
//
// Each new ADC sample is added to the four before it and the sum is passed on; the
// sum is not divided, so the result carries three more bits than the sample. This
// low-pass step removes high-frequency noise before the threshold and peak stages.
// The four older samples sit in a small shift register (buff2..buff5), cleared by
// reset, so the first four outputs are partial sums.
//
// Timing: out_valid pulses one clock after in_valid, with the sum including the
// sample that came with in_valid. The five-tap sum is the document's; the
// one-clock latency is this design's.
module avg_filter
  import rfid_pkg::*;
#(
  parameter int unsigned TAPS  = 5,
  parameter int unsigned IN_W  = SAMPLE_W,
  parameter int unsigned OUT_W = IN_W + $clog2(TAPS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  in_data,
  output logic             out_valid,
  output logic [OUT_W-1:0] out_data
);

  logic [IN_W-1:0] hist [TAPS-1];

  // Sum of the new sample and the stored ones.
  logic [OUT_W-1:0] sum;
  always_comb begin
    sum = OUT_W'(in_data);
    for (int i = 0; i < TAPS - 1; i++) sum += OUT_W'(hist[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < TAPS - 1; i++) hist[i] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= sum;
        hist[0]  <= in_data;
        for (int i = 1; i < TAPS - 1; i++) hist[i] <= hist[i-1];
      end
    end
  end

endmodule
