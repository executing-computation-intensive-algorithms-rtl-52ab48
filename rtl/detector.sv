// detector -- FPGA RF-ID tag reader built around the pulse-peak-detection (PPD)
// algorithm.
//
// The reader replaces a buffer-at-a-time processor implementation with a pipeline
// that handles every ADC sample before the next one arrives, so no sample is ever
// lost between buffers. Four blocks make it up:
//   adc_control    configures the THS1206 converter and reads one 12-bit sample per
//                  conversion (3.072 MS/s from an 18.432 MHz clock)
//   ppd_algorithm  filter, threshold, pulse, start/sync and ID stages
//   main_control   resets the algorithm after a failed start or a finished ID and
//                  hands the ID to the CRC check
//   crc16_check +  check the 64-bit ID (48 data + 16 CRC bits), then pack it as
//   host_comms     0xAA + 8 bytes and send it at 115 200 bit/s, 8N1, through a FIFO
//
// Interface: the converter's bidirectional data bus appears as adc_data_i,
// adc_data_o and adc_data_oe; the pins otherwise follow the original design (clk,
// reset, TxD, ADC_WR, ADC_RD, ADC_DATA_AV, ADC_CONVCLK). Reset is synchronous and
// active high.
//
// Timing: a tag packet is 75 bits of 24 samples each (about 0.6 ms at 128 kb/s); its
// last serial byte leaves about 150 clocks plus one packet time (14 400 clocks)
// after the packet's last sample. The block split, clock, sample rate and serial format are
// the document's.
module detector
  import rfid_pkg::*;
#(
  parameter int unsigned CONV_DIV   = 6,
  parameter int unsigned BAUD_DIV   = 160,
  parameter int unsigned FIFO_DEPTH = 8092
) (
  input  logic    clk,
  input  logic    reset,
  output logic    txd,
  output logic    adc_wr,
  output logic    adc_rd,
  input  logic    adc_data_av,
  input  sample_t adc_data_i,
  output sample_t adc_data_o,
  output logic    adc_data_oe,
  output logic    adc_convclk
);

  sample_t sample;
  logic    sample_valid, configured;
  logic    algo_rst, syncerr, idready, ps, startid, swap;
  tag_id_t ppd_id, crc_id_in, crc_id_out;
  filt_t   threshold;
  logic    id_av, crc_busy, crc_correct, crc_fail;
  logic    fifo_full, fifo_empty;

  adc_control #(.CONV_DIV(CONV_DIV)) u_adc (
    .clk, .rst(reset), .adc_wr, .adc_rd, .adc_data_av, .adc_data_i, .adc_data_o,
    .adc_data_oe, .adc_convclk, .sample, .sample_valid, .configured
  );

  ppd_algorithm u_rfid (
    .clk, .rst(reset), .algo_rst, .sample_valid, .sample,
    .syncerr, .idready, .id(ppd_id), .threshold, .ps, .startid, .swap
  );

  main_control u_main (
    .clk, .rst(reset), .syncerr, .idready, .id_in(ppd_id), .crc_busy,
    .algo_rst, .id_av, .id_out(crc_id_in)
  );

  crc16_check u_crc (
    .clk, .rst(reset), .id_av, .id(crc_id_in), .busy(crc_busy),
    .correct(crc_correct), .fail(crc_fail), .id_out(crc_id_out)
  );

  host_comms #(.BAUD_DIV(BAUD_DIV), .FIFO_DEPTH(FIFO_DEPTH)) u_comms (
    .clk, .rst(reset), .crc_correct, .id(crc_id_out), .txd,
    .fifo_full, .fifo_empty
  );

endmodule
