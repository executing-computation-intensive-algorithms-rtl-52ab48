// tb_adc_control -- runs the ADC control block against the converter model: the
// four set-up words must be written in order (0x401, 0x400, CR0, CR1), the
// conversion clock must have a period of six clocks, and every converted value must
// come out on `sample` with one sample_valid per conversion.
module tb_adc_control;
  logic clk = 0, rst = 1;
  logic adc_wr, adc_rd, adc_data_av, adc_data_oe, adc_convclk, sample_valid, configured;
  logic [11:0] adc_data_i, adc_data_o, sample;
  int checks = 0, failures = 0;
  int nvalid = 0;
  logic [11:0] got [$];

  adc_control dut (.*);
  ths1206_model adc (.clk, .wr(adc_wr), .rd(adc_rd), .data_from_fpga(adc_data_o), .data_oe(adc_data_oe),
                     .convclk(adc_convclk), .data_av(adc_data_av), .data_to_fpga(adc_data_i));

  always #5 clk = ~clk;
  always @(posedge clk) if (sample_valid && !rst) got.push_back(sample);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int rise1 = -1, rise2 = -1, t = 0;
    logic prev = 0;
    adc.ntags = 1; adc.tag_s0[0] = 20; adc.tag_id[0] = 64'h058000000B631F97; adc.tag_bad[0] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (configured);
    check("four set-up writes", adc.nwrites == 4);
    check("set-up words in order", adc.cfg_errors == 0);
    while (rise2 < 0) begin
      @(posedge clk); #1; t++;
      if (adc_convclk && !prev) begin if (rise1 < 0) rise1 = t; else rise2 = t; end
      prev = adc_convclk;
    end
    check("conversion clock period 6", rise2 - rise1 == 6);
    repeat (6 * 400) @(posedge clk);
    #1;
    check("one sample per conversion", got.size() >= adc.nsamples - 1 && got.size() <= adc.nsamples && got.size() > 390);
    for (int i = 0; i < got.size(); i++) begin
      checks++;
      if (int'(got[i]) != adc.value_at(i)) begin failures++; if (failures < 5) $display("FAIL sample %0d: %0d vs %0d", i, got[i], adc.value_at(i)); end
    end
    check("one read strobe per sample", adc.rd_count == got.size() || adc.rd_count == got.size() + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
