// tb_crc16_check -- checks the serial CRC-16 against a software CRC: the ID seen in
// a captured run of the reader (0x058000000B631F97) and random IDs with a correct
// CRC must pass, and the same IDs with any one bit flipped must fail. The result
// must come 65 clocks after id_av.
module tb_crc16_check;
  import tag_wave_pkg::*;
  logic clk = 0, rst = 1, id_av = 0;
  logic [63:0] id = '0, id_out;
  logic busy, correct, fail;
  int checks = 0, failures = 0;

  crc16_check dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [63:0] v, bit expect_ok);
    int cyc = 0;
    @(posedge clk);
    id <= v; id_av <= 1;
    @(posedge clk);
    id_av <= 0;
    while (!(correct || fail)) begin @(posedge clk); #1; cyc++; if (cyc > 200) break; end
    checks++;
    if (correct !== expect_ok || fail !== !expect_ok || id_out != v) begin
      failures++; $display("FAIL id=%h expect_ok=%0b correct=%0b fail=%0b", v, expect_ok, correct, fail);
    end
    checks++;
    if (cyc != 65) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    checks++;
    if (make_id(48'h058000000B63) != 64'h058000000B631F97) begin
      failures++; $display("FAIL reference CRC does not reproduce the captured ID");
    end
    run(64'h058000000B631F97, 1);
    run(64'h058000000B631F96, 0);
    for (int n = 0; n < 30; n++) begin
      automatic logic [63:0] v = make_id({$urandom, 16'($urandom)});
      run(v, 1);
      run(v ^ (64'd1 << $urandom_range(0, 63)), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
