// tb_hd_sim: writes more words than the disk store holds and checks the
// command and word counters, the sequential placement, the wrap at the end
// of the store and the one-cycle read-back.
`timescale 1ns/1ps
module tb_hd_sim;
  localparam int unsigned DISK_WORDS = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  initial #1 rst_n = 1'b0;
  logic dmawr_begin = 1'b0, scsiwr = 1'b0;
  logic [15:0] scsidb = '0, rd_data;
  logic [2:0] rd_addr = '0;
  logic [31:0] wr_words, cmd_count;

  hd_sim #(.DISK_WORDS(DISK_WORDS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] model [DISK_WORDS];
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) dmawr_begin = 1'b1;
    @(negedge clk) dmawr_begin = 1'b0;
    for (int i = 0; i < 11; i++) begin
      @(negedge clk);
      scsidb = 16'($urandom);
      scsiwr = 1'b1;
      model[i % DISK_WORDS] = scsidb;
      @(negedge clk) scsiwr = 1'b0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    @(negedge clk) dmawr_begin = 1'b1;
    @(negedge clk) dmawr_begin = 1'b0;
    check(wr_words == 11, $sformatf("wr_words %0d", wr_words));
    check(cmd_count == 2, $sformatf("cmd_count %0d", cmd_count));
    for (int a = 0; a < DISK_WORDS; a++) begin
      @(negedge clk) rd_addr = 3'(a);
      @(negedge clk);
      check(rd_data == model[a], $sformatf("word %0d: %04h expected %04h", a, rd_data, model[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
