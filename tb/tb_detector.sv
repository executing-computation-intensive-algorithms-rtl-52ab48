// tb_detector -- end-to-end test of the RF-ID reader at its full default size.
//
// A converter model answers the ADC control block and produces a noise floor with
// four tag packets at 3.072 MS/s: a good tag, a tag whose preamble has a ONE among
// its start bits, a tag with one ID bit flipped (its CRC fails) and a second good
// tag. A serial receiver on TxD decodes what the host would see. Checks: the ADC
// set-up words, that exactly the two good tags arrive as 0xAA + 8 ID bytes, in order,
// within one packet time of their last sample; and that each mechanism of the design
// happened at least once: ADC set-up, threshold window swap, pulse detection,
// start/sync rejection, ID extraction, CRC pass, CRC fail, FIFO holding data.
module tb_detector;
  import tag_wave_pkg::*;
  logic clk = 0, reset = 1;
  logic txd, adc_wr, adc_rd, adc_data_av, adc_data_oe, adc_convclk;
  logic [11:0] adc_data_i, adc_data_o;
  logic rx_valid;
  logic [7:0] rx_byte;
  int frame_errors;
  int checks = 0, failures = 0;
  int n_swap = 0, n_ps = 0, n_syncerr = 0, n_idready = 0, n_crc_ok = 0, n_crc_fail = 0, n_fifo = 0;
  logic [7:0] rxq [$];
  int rx_time [$];
  int t = 0;
  int end_sample = -1, tag_end_t = -1;

  detector dut (.*);
  ths1206_model adc (.clk, .wr(adc_wr), .rd(adc_rd), .data_from_fpga(adc_data_o), .data_oe(adc_data_oe),
                     .convclk(adc_convclk), .data_av(adc_data_av), .data_to_fpga(adc_data_i));
  uart_rx_model #(.BAUD_DIV(160)) host (.clk, .txd, .rx_valid, .rx_byte, .frame_errors);

  always #5 clk = ~clk;

  always @(posedge clk) if (!reset) begin
    t++;
    if (dut.swap)                 n_swap++;
    if (dut.u_rfid.ps_pulse)      n_ps++;
    if (dut.syncerr)              n_syncerr++;
    if (dut.idready)              n_idready++;
    if (dut.crc_correct)          n_crc_ok++;
    if (dut.crc_fail)             n_crc_fail++;
    if (!dut.fifo_empty)          n_fifo++;
    if (rx_valid) begin rxq.push_back(rx_byte); rx_time.push_back(t); end
    if (adc.nsamples == end_sample && tag_end_t < 0) tag_end_t = t;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NT = 4;
  initial begin
    logic [63:0] good0, good3;
    int last_sample3;
    good0 = 64'h058000000B631F97;
    good3 = make_id(48'h3141_5926_5358);
    adc.ntags = NT;
    adc.tag_s0[0] = 500;  adc.tag_id[0] = good0;                        adc.tag_bad[0] = 0;
    adc.tag_s0[1] = 2600; adc.tag_id[1] = make_id(48'hABCDEF012345);   adc.tag_bad[1] = 4;
    adc.tag_s0[2] = 4700; adc.tag_id[2] = make_id(48'h1234567890AB) ^ (64'd1 << 20); adc.tag_bad[2] = 0;
    adc.tag_s0[3] = 6800; adc.tag_id[3] = good3;                        adc.tag_bad[3] = 0;
    last_sample3 = 6800 + NBITS * SPB;
    end_sample = last_sample3;
    repeat (4) @(posedge clk);
    reset <= 0;
    wait (adc.nsamples >= last_sample3 + 50);
    wait (rxq.size() >= 18 || adc.nsamples >= last_sample3 + 5000);
    repeat (2000) @(posedge clk);
    check("ADC set-up: four writes, right words", adc.nwrites == 4 && adc.cfg_errors == 0);
    check("18 bytes received", rxq.size() == 18);
    check("no framing errors", frame_errors == 0);
    if (rxq.size() == 18) begin
      for (int p = 0; p < 2; p++) begin
        automatic logic [63:0] v = (p == 0) ? good0 : good3;
        check($sformatf("packet %0d header", p), rxq[9 * p] == 8'hAA);
        for (int k = 0; k < 8; k++)
          check($sformatf("packet %0d byte %0d", p, k), rxq[9 * p + 1 + k] == v[63 - 8 * k -: 8]);
      end
      // Latency: last byte of the second packet one packet time (9 frames of 10
      // bits of 160 clocks) after the last sample of the tag, plus at most 1000
      // clocks for the pipeline, the CRC, the packer and the baud-tick wait.
      checks++;
      begin
        automatic int lat = rx_time[17] - tag_end_t;
        $display("packet latency after tag end: %0d clocks", lat);
        if (lat < 9 * 10 * 160 - 160 || lat > 9 * 10 * 160 + 1000) begin failures++; $display("FAIL latency %0d", lat); end
      end
    end
    check("mechanism: threshold window swap", n_swap > 0);
    check("mechanism: pulse detection", n_ps > 0);
    check("mechanism: start/sync rejection", n_syncerr > 0);
    check("mechanism: ID extraction (3 packets with valid preamble)", n_idready == 3);
    check("mechanism: CRC pass (2)", n_crc_ok == 2);
    check("mechanism: CRC fail (1)", n_crc_fail == 1);
    check("mechanism: FIFO holding data", n_fifo > 0);
    $display("swaps=%0d pulses=%0d syncerr=%0d ids=%0d crc_ok=%0d crc_fail=%0d fifo_busy_clocks=%0d",
             n_swap, n_ps, n_syncerr, n_idready, n_crc_ok, n_crc_fail, n_fifo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
