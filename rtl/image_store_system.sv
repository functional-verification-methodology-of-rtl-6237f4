// image_store_system: single-channel high-speed image real-time storage
// system, camera to disk.
//
// Blocks and data flow: the CCD simulator (ccd_sim) streams pixels into the
// memory card's FPGA logic (pld_syn), which merges them into the FIFO buffer
// (fifo_sim, bytes paired into 16-bit words). The camera controller
// (cc_sim) sends reference packets over the parallel RS-422 stand-in to the
// microprocessor (mcu_sim). On each frame interrupt from the FPGA the
// microprocessor resets the FIFO, writes the reference record into it and
// arms the capture of the next whole frame; it then moves the frame in DMA
// blocks through the protocol chip (fas_sim) to the disk (hd_sim), and
// reports each stored frame to the camera controller. On the disk every
// stored frame is one record: the reference packet (padded to an even
// number of bytes, two bytes per word, first byte in the low half) followed
// by the frame's pixels, two per word, first pixel in the low half.
//
// Ports: the clock and reset, a read port into the disk store, and status
// counters and event pulses for observing the system. All blocks run on the
// one clock `clk`; the interface "clocks" of the original devices (pixel
// strobe, link clock, DMA clock, microprocessor FIFO write clock) are
// one-cycle strobes or sampled levels in this clock domain. The FIFO has
// separate write and read clocks; here both are driven by `clk`.
//
// The split into these blocks and the signals between them follow the
// specification's system diagram and module port lists; the single clock,
// the status ports and the extra fiforst_n and DMA count connections are
// this design's choices.
module image_store_system
  import memcard_pkg::*;
#(
  parameter int unsigned PIXELS        = 512,
  parameter int unsigned LINES         = 512,
  parameter int unsigned PIX_DIV       = 4,
  parameter int unsigned HBLANK        = 32,
  parameter int unsigned VBLANK        = 4096,
  parameter int unsigned VBLANK_DETECT = 1024,
  parameter int unsigned BYTE_CYCLES   = 3200,
  parameter int unsigned PKT_BYTES     = 7,
  parameter int unsigned CC_INIT_CYCLES = 1000,
  parameter int unsigned BLOCK_WORDS   = 256,
  parameter int unsigned DMA_DIV       = 4,
  parameter int unsigned FIFO_DEPTH    = 262144,
  parameter int unsigned DISK_WORDS    = 1048576
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [$clog2(DISK_WORDS)-1:0] disk_rd_addr,
  output logic [15:0] disk_rd_data,
  output logic [31:0] disk_words,
  output logic [31:0] disk_cmds,
  output logic [15:0] frames_stored,
  output logic [15:0] packets_rx,
  output logic [7:0]  packets_tx,
  output logic        status_err,
  output logic        fifo_overflow,
  output logic        fifo_full,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_level,
  output logic        capturing,      // FPGA is writing a frame into the FIFO
  output logic        disk_busy,      // disk port enable (scsien)
  output mcu_state_t  mcu_state,
  output logic        ev_frame_irq,   // frame interrupt
  output logic        ev_skip,        // frame skipped, capture not armed
  output logic        ev_dma_stall,   // DMA request met an empty FIFO
  output logic        ev_fifo_rst,    // FIFO reset by the microprocessor
  output logic        ev_dma_over     // end of a DMA block
);
  // CCD
  logic       strobe, lval;
  logic [7:0] cdat;
  // link
  logic       txen, txclk, ccdok_n, huafu_n;
  logic [7:0] txdat;
  // microprocessor <-> FPGA
  logic       frame, fifoen, fifowrclk, fiforst_n_mcu;
  logic [7:0] fifodat;
  // FPGA <-> FIFO
  logic        fiforst_n, wen_n, ren_n, fifo_empty;
  logic [7:0]  wdat;
  logic [15:0] rdat;
  // DMA
  logic        dreq, dack_n, dwr_n, dmaclk, dmawr_begin, dmawr_over;
  logic [15:0] dmadb, dma_count, xfer_words;
  // disk port
  logic [15:0] scsidb;
  logic        scsiwr;

  ccd_sim #(.PIXELS(PIXELS), .LINES(LINES), .PIX_DIV(PIX_DIV),
            .HBLANK(HBLANK), .VBLANK(VBLANK)) u_ccd_sim (
    .clk, .rst_n, .strobe, .lval, .cdat);

  cc_sim #(.BYTE_CYCLES(BYTE_CYCLES), .PKT_BYTES(PKT_BYTES),
           .INIT_CYCLES(CC_INIT_CYCLES)) u_cc_sim (
    .clk, .rst_n, .txen, .txdat, .txclk, .ccdok_n, .huafu_n,
    .pkt_count(packets_tx));

  mcu_sim #(.PIXELS(PIXELS), .LINES(LINES), .PKT_BYTES(PKT_BYTES),
            .BLOCK_WORDS(BLOCK_WORDS)) u_mcu_sim (
    .clk, .rst_n,
    .rxen(txen), .rxdat(txdat), .rxclk(txclk), .ccdok_n, .huafu_n,
    .dmawr_begin, .dmawr_over, .dma_count, .xfer_words,
    .frame, .fifoen, .fifowrclk, .fifodat, .fiforst_n(fiforst_n_mcu),
    .state(mcu_state), .frames_stored, .packets_rx, .status_err);

  pld_syn #(.LINES(LINES), .VBLANK_DETECT(VBLANK_DETECT)) u_pld_syn (
    .clk, .rst_n,
    .lval, .strobe, .cdat,
    .frame, .fifoen, .fifowrclk, .fifodat, .fiforst_n_in(fiforst_n_mcu),
    .fiforst_n, .wen_n, .wdat, .ren_n, .rdat, .fifo_empty,
    .dreq, .dwr_n, .dmaclk, .dack_n, .dmadb,
    .capturing, .skip(ev_skip), .dma_stall(ev_dma_stall));

  // both FIFO clocks run from the system clock
  fifo_sim #(.DEPTH(FIFO_DEPTH)) u_fifo_sim (
    .rst_n, .fiforst_n,
    .wclk(clk), .wen_n, .wdat, .full(fifo_full), .wlevel(fifo_level),
    .overflow(fifo_overflow),
    .rclk(clk), .ren_n, .rdat, .empty(fifo_empty));

  fas_sim #(.DMA_DIV(DMA_DIV)) u_fas_sim (
    .clk, .rst_n, .dmawr_begin, .dma_count, .dreq, .dack_n, .dwr_n,
    .dmawr_over, .dmaclk, .dmdb(dmadb), .scsidb, .scsiwr, .scsien(disk_busy),
    .xfer_words);

  hd_sim #(.DISK_WORDS(DISK_WORDS)) u_hd_sim (
    .clk, .rst_n, .dmawr_begin, .scsidb, .scsiwr,
    .rd_addr(disk_rd_addr), .rd_data(disk_rd_data),
    .wr_words(disk_words), .cmd_count(disk_cmds));

  assign ev_frame_irq = frame;
  assign ev_fifo_rst  = !fiforst_n;
  assign ev_dma_over  = dmawr_over;
endmodule
