// tb_fas_sim: drives the protocol chip's DMA as the FPGA would (one word
// acknowledged in the cycle after each dmaclk pulse while dreq is high and
// dwr_n low, with random waits standing for an empty FIFO) and checks that
// the words reach the disk port in order, exactly dma_count of them, that
// dmawr_over pulses once at the end, that dmaclk comes every DMA_DIV cycles
// and that a transfer without waits takes dma_count * DMA_DIV cycles.
`timescale 1ns/1ps
module tb_fas_sim;
  localparam int unsigned DMA_DIV = 3;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  initial #1 rst_n = 1'b0;
  logic dmawr_begin = 1'b0, dack_n = 1'b1;
  logic [15:0] dma_count = '0, dmdb = '0, scsidb, xfer_words;
  logic dreq, dwr_n, dmawr_over, dmaclk, scsiwr, scsien;

  fas_sim #(.DMA_DIV(DMA_DIV)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FPGA side: ack one cycle after a taken dmaclk
  bit stall_en = 1'b0;
  logic [15:0] next_word = 16'h1000;
  logic [15:0] sent [$];
  logic [15:0] recv [$];
  int n_over = 0, last_clk = -1, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    dack_n <= 1'b1;
    if (dmaclk) begin
      if (last_clk >= 0 && dreq) check(cyc - last_clk == DMA_DIV, $sformatf("dmaclk spacing %0d", cyc - last_clk));
      last_clk = cyc;
      if (dreq && !dwr_n && !(stall_en && ($urandom_range(0, 2) == 0))) begin
        dack_n <= 1'b0;
        dmdb   <= next_word;
        sent.push_back(next_word);
        next_word <= next_word + 16'h0101;
      end
    end
    if (scsiwr) begin
      recv.push_back(scsidb);
      check(scsien, "scsien low during a disk write");
    end
    if (dmawr_over) n_over++;
  end

  task automatic run_dma(input int n, output int cycles);
    int t0;
    sent.delete();
    recv.delete();
    n_over = 0;
    last_clk = -1;
    @(negedge clk);
    dma_count = 16'(n);
    dmawr_begin = 1'b1;
    t0 = cyc;
    @(negedge clk) dmawr_begin = 1'b0;
    wait (n_over != 0);
    cycles = cyc - t0;
    repeat (3 * DMA_DIV) @(posedge clk);
    check(n_over == 1, $sformatf("%0d dmawr_over pulses", n_over));
    check(!dreq && dwr_n, "dreq/dwr_n not released after the transfer");
    check(recv.size() == n && sent.size() == n,
          $sformatf("sent %0d received %0d expected %0d", sent.size(), recv.size(), n));
    for (int i = 0; i < recv.size() && i < sent.size(); i++)
      check(recv[i] == sent[i], $sformatf("word %0d", i));
    check(xfer_words == 16'(n), $sformatf("xfer_words %0d", xfer_words));
  endtask

  initial begin
    int cycles;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (4) @(posedge clk);
    check(dreq == 1'b0 && dwr_n == 1'b1, "idle outputs");
    stall_en = 1'b0;
    run_dma(10, cycles);
    check(cycles >= 10 * DMA_DIV && cycles <= 10 * DMA_DIV + 3,
          $sformatf("10-word DMA took %0d cycles", cycles));
    stall_en = 1'b1;
    run_dma(37, cycles);
    run_dma(1, cycles);
    run_dma(0, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
