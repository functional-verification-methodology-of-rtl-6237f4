// tb_mcu_sim: runs the microprocessor state machine against models of the
// camera controller link, the protocol chip and the FPGA's frame interrupt.
// Checks: start-up to wait1 (code 4'b0011) and on once ccdok_n falls; a
// frame interrupt is held until a reference packet has arrived; then a
// fiforst_n pulse of RST_CYCLES followed by the reference record (packet
// bytes, zero pad) on fifoen/fifowrclk/fifodat; DMA blocks of 3, 3 and 2
// words for an 8-word frame; a receive interrupt in the middle of a DMA,
// with dmawr_over arriving during it, is served and the DMA resumes; one
// status pulse on huafu_n per stored frame; a wrong DMA status word sets
// status_err.
`timescale 1ns/1ps
module tb_mcu_sim;
  import memcard_pkg::*;
  localparam int unsigned PIXELS = 4, LINES = 2, PKT_BYTES = 7, BLOCK_WORDS = 3, RST_CYCLES = 4;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  initial #1 rst_n = 1'b0;

  logic rxen = 1'b0, rxclk = 1'b0, ccdok_n = 1'b1, huafu_n;
  logic [7:0] rxdat = '0;
  logic dmawr_begin, dmawr_over = 1'b0, frame = 1'b0;
  logic [15:0] dma_count, xfer_words = '0;
  logic fifoen, fifowrclk, fiforst_n, status_err;
  logic [7:0] fifodat;
  mcu_state_t state;
  logic [15:0] frames_stored, packets_rx;

  mcu_sim #(.PIXELS(PIXELS), .LINES(LINES), .PKT_BYTES(PKT_BYTES),
            .BLOCK_WORDS(BLOCK_WORDS), .RST_CYCLES(RST_CYCLES)) dut (.*);

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

  // free-running link clock, 8 cycles, data changes while low
  always begin
    repeat (4) @(negedge clk);
    rxclk = 1'b1;
    repeat (4) @(negedge clk);
    rxclk = 1'b0;
  end

  task automatic send_packet(input logic [7:0] base);
    @(negedge clk iff rxclk == 1'b0);
    for (int i = 0; i < PKT_BYTES; i++) begin
      rxen  = 1'b1;
      rxdat = base + 8'(i);
      @(posedge rxclk);
      @(negedge rxclk);
    end
    rxen = 1'b0;
  endtask

  // protocol chip model
  int over_delay = 20;
  bit wrong_status = 1'b0;
  int blocks [$];
  always @(posedge clk) if (rst_n && dmawr_begin) begin
    blocks.push_back(int'(dma_count));
    fork
      begin
        automatic logic [15:0] c = dma_count;
        repeat (over_delay) @(negedge clk);
        xfer_words = wrong_status ? c + 16'd1 : c;
        dmawr_over = 1'b1;
        @(negedge clk) dmawr_over = 1'b0;
      end
    join_none
  end

  // FIFO side monitor
  logic [7:0] fifo_bytes [$];
  int rst_len = 0, rst_pulses = 0, n_huafu = 0;
  bit bytes_before_rst = 1'b0;
  bit over_in_rx = 1'b0;
  logic fiforst_q = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (fifoen && fifowrclk) begin
      fifo_bytes.push_back(fifodat);
      if (rst_pulses == 0) bytes_before_rst = 1'b1;
    end
    if (!fiforst_n) rst_len++;
    if (fiforst_n && !fiforst_q) rst_pulses++;
    if (!huafu_n) n_huafu++;
    if (dmawr_over && state == ST_RX422) over_in_rx = 1'b1;
    fiforst_q <= fiforst_n;
  end

  task automatic pulse_frame();
    @(negedge clk) frame = 1'b1;
    @(negedge clk) frame = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (100) @(negedge clk);
    check(state == 4'b0011, $sformatf("state %b, expected wait1 4'b0011", state));
    ccdok_n = 1'b0;
    repeat (100) @(negedge clk);
    check(state == ST_IDLE, $sformatf("state %s after ccdok_n, expected idle", state.name()));
    // frame interrupt with no reference packet yet: held
    pulse_frame();
    repeat (50) @(negedge clk);
    check(fifo_bytes.size() == 0 && rst_pulses == 0, "frame taken before any reference packet");
    send_packet(8'h31);
    wait (blocks.size() == 1);
    check(packets_rx == 1, "packet not counted");
    check(rst_pulses == 1 && rst_len == RST_CYCLES && !bytes_before_rst,
          $sformatf("FIFO reset: %0d pulses, %0d cycles", rst_pulses, rst_len));
    check(fifo_bytes.size() == 8, $sformatf("%0d reference bytes", fifo_bytes.size()));
    for (int i = 0; i < fifo_bytes.size(); i++)
      check(fifo_bytes[i] == ((i < PKT_BYTES) ? 8'h31 + 8'(i) : 8'h00), $sformatf("ref byte %0d = %02h", i, fifo_bytes[i]));
    // receive interrupt during the second block, dmawr_over inside it
    wait (blocks.size() == 2);
    over_delay = 10;
    send_packet(8'h51);
    wait (frames_stored == 1);
    repeat (20) @(negedge clk);
    check(blocks.size() == 3 && blocks[0] == 3 && blocks[1] == 3 && blocks[2] == 2,
          $sformatf("DMA blocks %p", blocks));
    check(packets_rx == 2, "second packet lost");
    check(over_in_rx, "dmawr_over did not fall inside the receive interrupt");
    check(n_huafu == 1, $sformatf("%0d status pulses", n_huafu));
    check(!status_err, "status error without cause");
    check(state == ST_IDLE, "not back in idle");
    // second frame uses the newer packet; a wrong status word is reported
    fifo_bytes.delete();
    blocks.delete();
    wrong_status = 1'b1;
    over_delay = 5;
    pulse_frame();
    wait (frames_stored == 2);
    repeat (5) @(negedge clk);
    check(fifo_bytes.size() == 8 && fifo_bytes[0] == 8'h51 && fifo_bytes[6] == 8'h57, "second record");
    check(status_err, "wrong DMA status not reported");
    check(n_huafu == 2, "status pulse count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
