// pld_syn: the memory card's FPGA logic, between camera, FIFO,
// microprocessor and protocol chip.
//
// Three jobs:
//  * FIFO write control. Bytes reach the FIFO from two sources: the
//    microprocessor's reference record (fifoen high, one byte per fifowrclk
//    pulse) and the CCD pixels (cdat taken when strobe && lval). CCD data is
//    written only while a frame is being captured. The microprocessor's
//    fiforst_n is passed on to the FIFO.
//  * Frame interrupt. The camera has no frame-valid output, so a gap of
//    VBLANK_DETECT cycles with lval low is taken as the frame boundary and
//    gives a one-cycle `frame` pulse. The end of a reference-record write
//    (fifoen falling) arms the capture; the first line after the next frame
//    boundary then starts it, and LINES lines end it. A frame that starts
//    while the capture is not armed is skipped (`skip` pulse), so a frame is
//    always stored whole and right after its reference record.
//  * DMA data path. While the protocol chip requests data (dreq high, dwr_n
//    low) each dmaclk pulse reads one word from the FIFO; in the next cycle
//    the word is on dmadb with dack_n low. When the FIFO is empty the request
//    waits and a `dma_stall` pulse is given.
//
// From the specification: the module's role (DMA, interrupt generation,
// FIFO signal handling) and its signal names. Everything about how it does
// them (gap detection, arming, the handshake timing) is this design's
// choice. The module runs on the system clock; the FIFO's write and read
// clocks are driven from the same clock at the top level, so the FIFO
// enables here are single-cycle strobes in that clock.
module pld_syn #(
  parameter int unsigned LINES         = 512,   // lines captured per frame
  parameter int unsigned VBLANK_DETECT = 1024   // lval-low cycles that mark a frame gap
) (
  input  logic        clk,
  input  logic        rst_n,
  // CCD
  input  logic        lval,
  input  logic        strobe,
  input  logic [7:0]  cdat,
  // microprocessor
  output logic        frame,        // frame interrupt, one-cycle pulse
  input  logic        fifoen,
  input  logic        fifowrclk,
  input  logic [7:0]  fifodat,
  input  logic        fiforst_n_in,
  // FIFO
  output logic        fiforst_n,
  output logic        wen_n,
  output logic [7:0]  wdat,
  output logic        ren_n,
  input  logic [15:0] rdat,
  input  logic        fifo_empty,
  // protocol chip DMA port
  input  logic        dreq,
  input  logic        dwr_n,
  input  logic        dmaclk,
  output logic        dack_n,
  output logic [15:0] dmadb,
  // status
  output logic        capturing,
  output logic        skip,
  output logic        dma_stall
);
  logic [$clog2(VBLANK_DETECT+1)-1:0] low_q;
  logic [$clog2(LINES+1)-1:0] lines_q;
  logic lval_q, fifoen_q, armed_q, at_start_q, cap_q;
  logic lval_rise, lval_fall, start_cap, cap_now;

  assign lval_rise = lval && !lval_q;
  assign lval_fall = !lval && lval_q;
  assign start_cap = lval_rise && at_start_q && armed_q;
  assign cap_now   = cap_q || start_cap;
  assign capturing = cap_q;
  assign fiforst_n = fiforst_n_in;

  // FIFO write mux: the reference record has priority; it never overlaps a
  // capture because the capture is armed only once the record is written.
  always_comb begin
    if (fifoen) begin
      wen_n = !fifowrclk;
      wdat  = fifodat;
    end else begin
      wen_n = !(cap_now && lval && strobe);
      wdat  = cdat;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      low_q      <= '0;
      lines_q    <= '0;
      lval_q     <= 1'b0;
      fifoen_q   <= 1'b0;
      armed_q    <= 1'b0;
      at_start_q <= 1'b0;
      cap_q      <= 1'b0;
      frame      <= 1'b0;
      skip       <= 1'b0;
    end else begin
      lval_q   <= lval;
      fifoen_q <= fifoen;
      frame    <= 1'b0;
      skip     <= 1'b0;

      // frame gap detection
      if (lval) begin
        low_q <= '0;
      end else if (32'(low_q) != VBLANK_DETECT) begin
        low_q <= low_q + 1'b1;
        if (32'(low_q) == VBLANK_DETECT - 1) begin
          frame      <= 1'b1;
          at_start_q <= 1'b1;
        end
      end

      // capture control
      if (!fiforst_n_in) begin
        armed_q <= 1'b0;
        cap_q   <= 1'b0;
      end else begin
        if (fifoen_q && !fifoen) armed_q <= 1'b1;
        if (lval_rise && at_start_q) begin
          at_start_q <= 1'b0;
          if (armed_q) begin
            armed_q <= 1'b0;
            cap_q   <= 1'b1;
            lines_q <= '0;
          end else begin
            skip <= 1'b1;
          end
        end
        if (cap_q && lval_fall) begin
          lines_q <= lines_q + 1'b1;
          if (32'(lines_q) == LINES - 1) cap_q <= 1'b0;
        end
      end
    end
  end

  // DMA: one FIFO read per dmaclk pulse while data is requested
  logic dma_go;
  assign dma_go    = dmaclk && dreq && !dwr_n;
  assign ren_n     = !(dma_go && !fifo_empty);
  assign dma_stall = dma_go && fifo_empty;
  assign dmadb     = rdat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dack_n <= 1'b1;
    else        dack_n <= ren_n;
  end

  initial begin
    assert (LINES >= 1 && VBLANK_DETECT >= 2) else $error("pld_syn: bad parameters");
  end
endmodule
