// tb_detector_tag_stream -- throughput test of the whole reader with several tags
// in the field, at the full default size.
//
// Six tags with different IDs answer in turn, NPKT packets in all, one every
// SPACING samples (2100 samples = 0.68 ms, about 1460 packets per second). That is
// faster than the serial link can send 9-byte packets (0.78 ms each), so IDs pile
// up in the FIFO and drain after the last tag. The pulse height cycles through four
// levels, from a strong near tag down to a weak one a few times the noise, the way
// the signal falls with distance. Checks: every packet arrives at the host as
// 0xAA + its 8 ID bytes, in order, without framing errors; no false start and no
// CRC failure; the FIFO really held more than one packet at a time; and the host
// sees the last byte within 10 serial packet times of the last tag.
module tb_detector_tag_stream;
  import tag_wave_pkg::*;
  localparam int NPKT    = 24;
  localparam int SPACING = 2100;
  localparam int FIRST   = 500;
  logic clk = 0, reset = 1;
  logic txd, adc_wr, adc_rd, adc_data_av, adc_data_oe, adc_convclk;
  logic [11:0] adc_data_i, adc_data_o;
  logic rx_valid;
  logic [7:0] rx_byte;
  int frame_errors;
  int checks = 0, failures = 0;
  int n_syncerr = 0, n_idready = 0, n_crc_ok = 0, n_crc_fail = 0;
  int fifo_level = 0, fifo_max = 0;
  logic [7:0] rxq [$];
  int t = 0, end_t = -1, last_rx_t = -1;
  logic [63:0] ids [6];

  detector dut (.*);
  ths1206_model #(.MAXTAGS(NPKT)) adc (.clk, .wr(adc_wr), .rd(adc_rd), .data_from_fpga(adc_data_o),
                     .data_oe(adc_data_oe), .convclk(adc_convclk), .data_av(adc_data_av),
                     .data_to_fpga(adc_data_i));
  uart_rx_model #(.BAUD_DIV(160)) host (.clk, .txd, .rx_valid, .rx_byte, .frame_errors);

  always #5 clk = ~clk;

  // Bytes written minus bytes read gives the FIFO level, independently of the FIFO.
  always @(posedge clk) if (!reset) begin
    t++;
    if (dut.syncerr)     n_syncerr++;
    if (dut.idready)     n_idready++;
    if (dut.crc_correct) n_crc_ok++;
    if (dut.crc_fail)    n_crc_fail++;
    fifo_level = fifo_level + int'(dut.u_comms.pda) - int'(dut.u_comms.u_uart.rdreq);
    if (fifo_level > fifo_max) fifo_max = fifo_level;
    if (rx_valid) begin rxq.push_back(rx_byte); last_rx_t = t; end
    if (adc.nsamples == FIRST + (NPKT - 1) * SPACING + NBITS * SPB && end_t < 0) end_t = t;
  end

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int levels [4] = '{700, 350, 180, 100};
    ids[0] = 64'h058000000B631F97;
    for (int k = 1; k < 6; k++) ids[k] = make_id(48'h1000_0000_0000 * k + 48'h0123_4567 * k * k);
    #1;
    adc.ntags = NPKT;
    for (int p = 0; p < NPKT; p++) begin
      adc.tag_s0[p]  = FIRST + p * SPACING;
      adc.tag_id[p]  = ids[p % 6];
      adc.tag_bad[p] = 0;
      adc.tag_amp[p] = levels[p % 4];
    end
    repeat (4) @(posedge clk);
    reset <= 0;
    wait (end_t > 0);
    wait (rxq.size() >= 9 * NPKT || t > end_t + 12 * 14400);
    repeat (2000) @(posedge clk);
    check("ADC set-up: four writes, right words", adc.nwrites == 4 && adc.cfg_errors == 0);
    check($sformatf("%0d bytes received (got %0d)", 9 * NPKT, rxq.size()), rxq.size() == 9 * NPKT);
    check("no framing errors", frame_errors == 0);
    check("no false start", n_syncerr == 0);
    check("every packet decoded", n_idready == NPKT);
    check("every CRC correct", n_crc_ok == NPKT && n_crc_fail == 0);
    for (int p = 0; p < NPKT && 9 * p + 8 < rxq.size(); p++) begin
      automatic logic [63:0] v = ids[p % 6];
      check($sformatf("packet %0d header", p), rxq[9 * p] == 8'hAA);
      for (int k = 0; k < 8; k++)
        check($sformatf("packet %0d byte %0d", p, k), rxq[9 * p + 1 + k] == v[63 - 8 * k -: 8]);
    end
    check($sformatf("FIFO held more than one packet (max %0d bytes)", fifo_max), fifo_max > 9);
    check($sformatf("drained within 10 packet times (%0d clocks)", last_rx_t - end_t),
          last_rx_t - end_t <= 10 * 14400);
    $display("packets=%0d fifo_max=%0d bytes, last byte %0d clocks after the last tag",
             rxq.size() / 9, fifo_max, last_rx_t - end_t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
