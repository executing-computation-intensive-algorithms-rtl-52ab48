// ths1206_model -- behavioural stand-in for the THS1206 ADC (not synthesizable).
//
// Records every word written over the data bus with WR and checks it against the
// expected set-up sequence (0x401, 0x400, CR0 = 0x000, CR1 = 0x4A0). After the
// fourth write it converts on every rising edge of the conversion clock: the next
// value from the stimulus arrays is put on the bus and data_av is raised for one
// system clock two clocks later. The stimulus is the sum of a noise floor and up
// to MAXTAGS tag packets, each given by its start sample, ID, pulse height
// (tag_amp, AMP unless set) and an optional corrupted start bit.
module ths1206_model
  import tag_wave_pkg::*;
#(
  parameter int MAXTAGS = 8
) (
  input  logic        clk,
  input  logic        wr,
  input  logic        rd,
  input  logic [11:0] data_from_fpga,
  input  logic        data_oe,
  input  logic        convclk,
  output logic        data_av,
  output logic [11:0] data_to_fpga
);

  int          ntags = 0;
  int          tag_s0    [MAXTAGS];
  logic [63:0] tag_id    [MAXTAGS];
  int          tag_bad   [MAXTAGS];
  int          tag_amp   [MAXTAGS] = '{default: AMP};
  int          nwrites   = 0;
  int          cfg_errors = 0;
  int          nsamples  = 0;
  int          rd_count  = 0;
  logic        prev_conv = 1'b0;
  int          av_delay  = -1;
  logic [11:0] expect_words [4] = '{12'h401, 12'h400, 12'h000, 12'h4A0};

  initial begin
    data_av      = 1'b0;
    data_to_fpga = '0;
  end

  function automatic int value_at(int i);
    int v;
    v = BASE + noise_at(i);
    for (int t = 0; t < ntags; t++) v += pulse_at(i, tag_s0[t], tag_id[t], tag_bad[t]) * tag_amp[t] / AMP;
    if (v > 4095) v = 4095;
    if (v < 0) v = 0;
    return v;
  endfunction

  // Ignore the strobes until the FPGA has come out of reset with both low.
  int quiet = 0;
  always @(posedge clk) begin
    data_av <= 1'b0;
    if (quiet < 2) begin
      if (!wr && !rd) quiet++; else quiet = 0;
    end else if (wr) begin
      if (!data_oe || nwrites >= 4 || data_from_fpga != expect_words[nwrites]) cfg_errors++;
      nwrites++;
    end
    if (rd && quiet >= 2) rd_count++;
    prev_conv <= convclk;
    if (convclk && !prev_conv && nwrites >= 4) begin
      data_to_fpga <= 12'(value_at(nsamples));
      nsamples++;
      av_delay = 2;
    end else if (av_delay > 0) begin
      av_delay--;
      if (av_delay == 0) data_av <= 1'b1;
    end
  end

endmodule
