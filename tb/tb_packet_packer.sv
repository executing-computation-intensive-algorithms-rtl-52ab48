// tb_packet_packer -- checks that a correct ID becomes the packet 0xAA followed by
// the ID bytes most significant first, one write pulse per byte, and that the packer
// holds a byte while the FIFO reports full.
module tb_packet_packer;
  logic clk = 0, rst = 1, crc_correct = 0, full = 0;
  logic [63:0] id = '0;
  logic pda, busy;
  logic [7:0] byte_o;
  int checks = 0, failures = 0;
  logic [7:0] got [$];

  packet_packer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (pda && !rst) got.push_back(byte_o);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [63:0] v, bit stall);
    got.delete();
    @(posedge clk);
    id <= v; crc_correct <= 1;
    @(posedge clk);
    crc_correct <= 0; id <= '0;
    @(posedge clk); #1;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy after crc_correct"); end
    if (stall) begin
      // Block the FIFO after the third byte for a while.
      wait (got.size() == 3);
      full <= 1;
      repeat (50) @(posedge clk);
      checks++;
      if (got.size() != 3) begin failures++; $display("FAIL wrote while full"); end
      full <= 0;
    end
    wait (!busy);
    repeat (10) @(posedge clk);
    checks++;
    if (got.size() != 9 || got[0] != 8'hAA) begin failures++; $display("FAIL packet size %0d", got.size()); end
    for (int k = 1; k < 9 && k < got.size(); k++) begin
      checks++;
      if (got[k] != v[63 - 8 * (k - 1) -: 8]) begin failures++; $display("FAIL byte %0d = %h", k, got[k]); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    send(64'h058000000B631F97, 0);
    send({$urandom, $urandom}, 1);
    send(64'h0123456789ABCDEF, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
