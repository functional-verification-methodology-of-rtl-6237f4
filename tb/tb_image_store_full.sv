// tb_image_store_full: end-to-end test of the image storage system with
// every parameter at its default: 512 x 512 pixel frames, 15.625 k bytes/s
// camera link (3200 cycles per byte), 256-word DMA blocks, 256K-word FIFO,
// 1M-word disk store. Two frames are stored (about 3.5 million cycles).
//
// Runs the whole chain (camera link, frame interrupts, FIFO, DMA, disk)
// until N_FRAMES frames are stored, then reads the disk back and checks
// every record: a reference packet of the camera controller's format
// (packet number in the high nibble, byte number from 1 in the low nibble,
// one packet number per record, non-decreasing from record to record),
// a zero pad byte, then the frame's pixels, value (pixel + 3*line) mod 256,
// two per word with the first pixel in the low byte. It also counts how
// often each mechanism of the system happened (frame interrupt, skipped
// frame, DMA stall, FIFO reset, DMA block end, partial last block, receive
// interrupt, status reply, every microprocessor state) and counts a
// failure for each one that never did.
`timescale 1ns/1ps
module tb_image_store_full;
  import memcard_pkg::*;

  // the system's defaults, repeated here to compute the expected contents
  localparam int unsigned PIXELS      = 512;
  localparam int unsigned LINES       = 512;
  localparam int unsigned PKT_BYTES   = 7;
  localparam int unsigned BLOCK_WORDS = 256;
  localparam int unsigned DISK_WORDS  = 1048576;
  localparam int unsigned FIFO_DEPTH  = 262144;
  localparam int unsigned N_FRAMES    = 2;
  localparam int unsigned MAX_CYCLES  = 6000000;
  localparam int unsigned BYTE_CYCLES = 3200;

  localparam int unsigned REF_BYTES   = PKT_BYTES + (PKT_BYTES % 2);
  localparam int unsigned REF_WORDS   = REF_BYTES / 2;
  localparam int unsigned FRAME_WORDS = REF_WORDS + PIXELS * LINES / 2;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = !clk;

  logic [$clog2(DISK_WORDS)-1:0] disk_rd_addr;
  logic [15:0] disk_rd_data;
  logic [31:0] disk_words, disk_cmds;
  logic [15:0] frames_stored, packets_rx;
  logic [7:0]  packets_tx;
  logic        status_err, fifo_overflow, fifo_full, capturing, disk_busy;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_level;
  mcu_state_t  mcu_state;
  logic        ev_frame_irq, ev_skip, ev_dma_stall, ev_fifo_rst, ev_dma_over;

  image_store_system dut (.*);

  int checks = 0, failures = 0;
  int n_irq = 0, n_skip = 0, n_stall = 0, n_rst = 0, n_over = 0, n_cap = 0, n_part = 0;
  bit seen_state [16];
  logic cap_q = 1'b0;

  always @(posedge clk) if (rst_n) begin
    if (ev_frame_irq) n_irq++;
    if (ev_skip)      n_skip++;
    if (ev_dma_stall) n_stall++;
    if (ev_fifo_rst && !$past(ev_fifo_rst)) n_rst++;
    if (ev_dma_over)  n_over++;
    if (dut.dmawr_begin && dut.dma_count != 16'(BLOCK_WORDS)) n_part++;
    cap_q <= capturing;
    if (capturing && !cap_q) n_cap++;
    seen_state[mcu_state] = 1'b1;
  end

  // link byte rate: one byte per BYTE_CYCLES clock cycles inside a packet
  int link_cyc = 0, link_last = -1, link_bytes = 0, link_bad = 0;
  logic link_clk_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    link_cyc++;
    link_clk_q <= dut.txclk;
    if (!dut.txen) link_last = -1;
    else if (dut.txclk && !link_clk_q) begin
      if (link_last >= 0 && link_cyc - link_last != BYTE_CYCLES) link_bad++;
      link_last = link_cyc;
      link_bytes++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] pix_val(input int unsigned p, input int unsigned l);
    return 8'((p + 3 * l) % 256);
  endfunction

  task automatic read_disk(input int unsigned a, output logic [15:0] d);
    disk_rd_addr = a[$clog2(DISK_WORDS)-1:0];
    @(posedge clk); #1;
    d = disk_rd_data;
  endtask

  initial begin : watchdog
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after %0d cycles (frames stored %0d)", MAX_CYCLES, frames_stored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [15:0] w;
    int unsigned last_pkt, pkt, pix_bad;
    mcu_state_t all_states [13] = '{ST_RESET, ST_INIT, ST_WAIT1, ST_FASWR, ST_FSWR, ST_FSRD,
                                    ST_DMAWR, ST_FASRD, ST_RX422, ST_TX422, ST_FIFOWR,
                                    ST_EXINT, ST_IDLE};
    disk_rd_addr = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (frames_stored == 16'(N_FRAMES));
    repeat (10) @(posedge clk);

    check(disk_words == N_FRAMES * FRAME_WORDS,
          $sformatf("disk holds %0d words, expected %0d", disk_words, N_FRAMES * FRAME_WORDS));
    check(disk_cmds == N_FRAMES * ((FRAME_WORDS + BLOCK_WORDS - 1) / BLOCK_WORDS),
          $sformatf("%0d DMA commands, expected %0d", disk_cmds,
                    N_FRAMES * ((FRAME_WORDS + BLOCK_WORDS - 1) / BLOCK_WORDS)));
    check(!status_err, "DMA status mismatch reported by the firmware");
    check(!fifo_overflow, "FIFO overflow");

    last_pkt = 0;
    for (int unsigned r = 0; r < N_FRAMES; r++) begin
      int unsigned base;
      base = r * FRAME_WORDS;
      read_disk(base, w);
      pkt = w[7:4];
      check(pkt >= last_pkt, $sformatf("record %0d: packet %0d after packet %0d", r, pkt, last_pkt));
      last_pkt = pkt;
      for (int unsigned b = 0; b < REF_BYTES; b++) begin
        logic [7:0] exp_b, got_b;
        read_disk(base + b / 2, w);
        got_b = (b % 2) ? w[15:8] : w[7:0];
        exp_b = (b < PKT_BYTES) ? {4'(pkt), 4'(b + 1)} : 8'h00;
        check(got_b == exp_b, $sformatf("record %0d ref byte %0d: got %02h expected %02h", r, b, got_b, exp_b));
      end
      pix_bad = 0;
      for (int unsigned k = 0; k < PIXELS * LINES / 2; k++) begin
        int unsigned i0, i1;
        logic [15:0] exp_w;
        i0 = 2 * k;
        i1 = 2 * k + 1;
        exp_w = {pix_val(i1 % PIXELS, i1 / PIXELS), pix_val(i0 % PIXELS, i0 / PIXELS)};
        read_disk(base + REF_WORDS + k, w);
        checks++;
        if (w !== exp_w) begin
          failures++;
          if (pix_bad < 5) $display("FAIL: record %0d pixel word %0d: got %04h expected %04h", r, k, w, exp_w);
          pix_bad++;
        end
      end
    end

    // mechanisms
    $display("events: frame_irq=%0d skipped=%0d captures=%0d dma_stall=%0d fifo_reset=%0d dma_blocks=%0d short_blocks=%0d rx_packets=%0d tx_packets=%0d frames=%0d",
             n_irq, n_skip, n_cap, n_stall, n_rst, n_over, n_part, packets_rx, packets_tx, frames_stored);
    check(link_bytes >= PKT_BYTES && link_bad == 0,
          $sformatf("link: %0d bytes, %0d with spacing other than %0d cycles", link_bytes, link_bad, BYTE_CYCLES));
    check(n_irq > 0,   "no frame interrupt");
    check(n_skip > 0,  "no skipped frame");
    check(n_stall > 0, "no DMA stall on an empty FIFO");
    check(n_rst >= N_FRAMES, "fewer FIFO resets than frames");
    check(n_over > 0,  "no DMA block end");
    check(n_part == N_FRAMES, $sformatf("%0d short last blocks for %0d frames", n_part, N_FRAMES));
    check(packets_rx > 0, "no reference packet received");
    check(n_cap >= N_FRAMES && n_cap <= N_FRAMES + 1, $sformatf("%0d captures for %0d frames", n_cap, N_FRAMES));
    foreach (all_states[i])
      check(seen_state[all_states[i]], $sformatf("state %s never entered", all_states[i].name()));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
