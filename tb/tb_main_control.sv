// tb_main_control -- checks that a start error and a finished ID each give a single
// one-clock algorithm reset, that a finished ID reaches the CRC check with id_av
// one clock later, and that an ID waits while the CRC check is busy.
module tb_main_control;
  logic clk = 0, rst = 1, syncerr = 0, idready = 0, crc_busy = 0;
  logic [63:0] id_in = '0, id_out;
  logic algo_rst, id_av;
  int checks = 0, failures = 0, nrst = 0, nav = 0;

  main_control dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (algo_rst) nrst++;
    if (id_av) nav++;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check("no reset while idle", !algo_rst);
    syncerr <= 1; @(posedge clk); syncerr <= 0; #1;
    check("algo_rst after syncerr", algo_rst && !id_av);
    @(posedge clk); #1;
    check("algo_rst one clock", !algo_rst && nrst == 1 && nav == 0);
    // Finished ID, CRC idle.
    id_in <= 64'h058000000B631F97; idready <= 1; @(posedge clk); idready <= 0; id_in <= '0;
    #1;
    check("algo_rst after idready", algo_rst);
    @(posedge clk); #1;
    check("id_av one clock later with the ID", id_av && id_out == 64'h058000000B631F97);
    @(posedge clk); #1;
    check("single id_av", !id_av && nav == 1 && nrst == 2);
    // Finished ID while the CRC is busy.
    crc_busy <= 1;
    id_in <= 64'h1122334455667788; idready <= 1; @(posedge clk); idready <= 0;
    repeat (10) @(posedge clk); #1;
    check("ID waits while CRC busy", nav == 1);
    crc_busy <= 0;
    repeat (3) @(posedge clk); #1;
    check("ID delivered when free", nav == 2 && id_out == 64'h1122334455667788);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
