// mcu_sim: the memory card's microprocessor firmware as a state machine.
//
// Start-up: reset -> init -> wait1 (until the camera pulls ccdok_n low) ->
// fswr -> fsrd (file system set-up, modelled as fixed delays) -> idle.
//
// Frame cycle: the FPGA's frame interrupt is latched. In idle, once the
// previous frame is fully stored and at least one reference packet has
// arrived, the firmware takes it (exint), then in
// fifowr resets the FIFO with a fiforst_n pulse and writes the reference
// record, the last reference packet received from the camera padded with
// zero bytes to an even length, byte by byte with fifoen/fifowrclk/fifodat.
// The end of that write arms the FPGA to capture the next whole frame. The
// frame, FRAME_WORDS words with the record, is then moved to the disk in
// DMA blocks of at most BLOCK_WORDS words: faswr sets the block length in
// the protocol chip, dmawr gives dmawr_begin and waits for dmawr_over,
// fasrd reads back the word count (a mismatch sets `status_err`). When the
// last block is done, tx422 sends the status reply to the camera, a
// one-cycle low pulse on huafu_n.
//
// Receive interrupt: a rising rxen in any state but reset and init saves
// the state and enters rx422. There a byte is taken from rxdat on each
// rising edge of rxclk while rxen is high (counter rx_cntb); when rxen falls
// a complete packet becomes the new reference packet and the saved state
// resumes where it stopped. dmawr_over and the frame interrupt are latched,
// so neither is lost meanwhile.
//
// From the specification: the state list and its 4-bit codes, the
// receive-interrupt and frame-interrupt handling, FIFO reset followed by the
// reference write, dmawr_begin/dmawr_over, and the register accesses
// simulated as delays. This design's choices: the idle state (code
// 4'b0100), the block size, the delays, the padding, the status reply and
// the transfer-count port to the protocol chip.
module mcu_sim
  import memcard_pkg::*;
#(
  parameter int unsigned PIXELS      = 512,
  parameter int unsigned LINES       = 512,
  parameter int unsigned PKT_BYTES   = 7,    // reference packet length
  parameter int unsigned BLOCK_WORDS = 256,  // DMA block (one 512-byte sector)
  parameter int unsigned INIT_CYCLES = 16,
  parameter int unsigned FS_CYCLES   = 32,   // file system access delay
  parameter int unsigned FAS_CYCLES  = 8,    // protocol chip register access delay
  parameter int unsigned RST_CYCLES  = 4,    // fiforst_n pulse length
  parameter int unsigned CNT_W       = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // camera controller link
  input  logic             rxen,
  input  logic [7:0]       rxdat,
  input  logic             rxclk,
  input  logic             ccdok_n,
  output logic             huafu_n,
  // protocol chip
  output logic             dmawr_begin,
  input  logic             dmawr_over,
  output logic [CNT_W-1:0] dma_count,
  input  logic [CNT_W-1:0] xfer_words,
  // FPGA
  input  logic             frame,
  output logic             fifoen,
  output logic             fifowrclk,
  output logic [7:0]       fifodat,
  output logic             fiforst_n,
  // status
  output mcu_state_t       state,
  output logic [15:0]      frames_stored,
  output logic [15:0]      packets_rx,
  output logic             status_err
);
  localparam int unsigned REF_BYTES   = PKT_BYTES + (PKT_BYTES % 2);
  localparam int unsigned FRAME_WORDS = (REF_BYTES + PIXELS * LINES) / 2;

  mcu_state_t cs, ret_q;
  logic [31:0] tmr_q;
  logic [31:0] remaining_q;
  logic [CNT_W-1:0] blk_q;
  logic [7:0] rx_buf [16];
  logic [7:0] ref_q  [16];
  logic [7:0] snap_q [16];
  logic [4:0] rx_cntb;
  logic [4:0] bidx_q;
  logic [1:0] step_q;
  logic rxen_q, rxclk_q, frame_pend_q, over_q, begun_q;

  assign state = cs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs            <= ST_RESET;
      ret_q         <= ST_IDLE;
      tmr_q         <= '0;
      remaining_q   <= '0;
      blk_q         <= '0;
      rx_cntb       <= '0;
      bidx_q        <= '0;
      step_q        <= '0;
      rxen_q        <= 1'b0;
      rxclk_q       <= 1'b0;
      frame_pend_q  <= 1'b0;
      over_q        <= 1'b0;
      begun_q       <= 1'b0;
      huafu_n       <= 1'b1;
      dmawr_begin   <= 1'b0;
      dma_count     <= '0;
      fifoen        <= 1'b0;
      fifowrclk     <= 1'b0;
      fifodat       <= '0;
      fiforst_n     <= 1'b1;
      frames_stored <= '0;
      packets_rx    <= '0;
      status_err    <= 1'b0;
      for (int i = 0; i < 16; i++) begin
        rx_buf[i] <= '0;
        ref_q[i]  <= '0;
        snap_q[i] <= '0;
      end
    end else begin
      rxen_q      <= rxen;
      rxclk_q     <= rxclk;
      huafu_n     <= 1'b1;
      dmawr_begin <= 1'b0;
      fifowrclk   <= 1'b0;
      if (frame)      frame_pend_q <= 1'b1;
      if (dmawr_over) over_q       <= 1'b1;

      if (rxen && !rxen_q && cs != ST_RESET && cs != ST_INIT && cs != ST_RX422) begin
        // receive interrupt
        ret_q   <= cs;
        rx_cntb <= '0;
        cs      <= ST_RX422;
      end else begin
        unique case (cs)
          ST_RESET: begin
            tmr_q <= '0;
            cs    <= ST_INIT;
          end
          ST_INIT: begin
            if (tmr_q == INIT_CYCLES) begin
              tmr_q <= '0;
              cs    <= ST_WAIT1;
            end else tmr_q <= tmr_q + 1;
          end
          ST_WAIT1: if (!ccdok_n) begin
            tmr_q <= '0;
            cs    <= ST_FSWR;
          end
          ST_FSWR: begin
            if (tmr_q == FS_CYCLES) begin
              tmr_q <= '0;
              cs    <= ST_FSRD;
            end else tmr_q <= tmr_q + 1;
          end
          ST_FSRD: begin
            if (tmr_q == FS_CYCLES) begin
              tmr_q <= '0;
              cs    <= ST_IDLE;
            end else tmr_q <= tmr_q + 1;
          end
          ST_IDLE: begin
            tmr_q <= '0;
            if (remaining_q != 0) cs <= ST_FASWR;
            else if (frame_pend_q && packets_rx != 0) cs <= ST_EXINT;
          end
          ST_EXINT: begin
            frame_pend_q <= 1'b0;
            for (int i = 0; i < 16; i++) snap_q[i] <= ref_q[i];
            tmr_q  <= '0;
            bidx_q <= '0;
            step_q <= '0;
            cs     <= ST_FIFOWR;
          end
          ST_FIFOWR: begin
            if (tmr_q < RST_CYCLES) begin
              fiforst_n <= 1'b0;
              tmr_q     <= tmr_q + 1;
            end else begin
              fiforst_n <= 1'b1;
              if (bidx_q == 5'(REF_BYTES)) begin
                fifoen      <= 1'b0;
                remaining_q <= FRAME_WORDS;
                cs          <= ST_IDLE;
              end else begin
                unique case (step_q)
                  2'd0: begin
                    fifoen  <= 1'b1;
                    fifodat <= (bidx_q < 5'(PKT_BYTES)) ? snap_q[bidx_q[3:0]] : 8'h00;
                    step_q  <= 2'd1;
                  end
                  2'd1: begin
                    fifowrclk <= 1'b1;
                    step_q    <= 2'd2;
                  end
                  default: begin
                    bidx_q <= bidx_q + 1'b1;
                    step_q <= 2'd0;
                  end
                endcase
              end
            end
          end
          ST_FASWR: begin
            if (tmr_q == 0) begin
              blk_q     <= (remaining_q > BLOCK_WORDS) ? CNT_W'(BLOCK_WORDS) : CNT_W'(remaining_q);
              dma_count <= (remaining_q > BLOCK_WORDS) ? CNT_W'(BLOCK_WORDS) : CNT_W'(remaining_q);
            end
            if (tmr_q == FAS_CYCLES) begin
              tmr_q   <= '0;
              begun_q <= 1'b0;
              cs      <= ST_DMAWR;
            end else tmr_q <= tmr_q + 1;
          end
          ST_DMAWR: begin
            if (!begun_q) begin
              dmawr_begin <= 1'b1;
              begun_q     <= 1'b1;
              over_q      <= 1'b0;
            end else if (over_q) begin
              over_q <= 1'b0;
              tmr_q  <= '0;
              cs     <= ST_FASRD;
            end
          end
          ST_FASRD: begin
            if (tmr_q == FAS_CYCLES) begin
              tmr_q <= '0;
              if (xfer_words != blk_q) status_err <= 1'b1;
              remaining_q <= remaining_q - 32'(blk_q);
              cs <= (remaining_q == 32'(blk_q)) ? ST_TX422 : ST_IDLE;
            end else tmr_q <= tmr_q + 1;
          end
          ST_TX422: begin
            huafu_n       <= 1'b0;
            frames_stored <= frames_stored + 1'b1;
            cs            <= ST_IDLE;
          end
          ST_RX422: begin
            if (rxen) begin
              if (rxclk && !rxclk_q && rx_cntb < 5'd16) begin
                rx_buf[rx_cntb[3:0]] <= rxdat;
                rx_cntb <= rx_cntb + 1'b1;
              end
            end else begin
              if (rx_cntb == 5'(PKT_BYTES)) begin
                for (int i = 0; i < 16; i++) ref_q[i] <= rx_buf[i];
                packets_rx <= packets_rx + 1'b1;
              end
              rx_cntb <= '0;
              cs      <= ret_q;
            end
          end
          default: cs <= ST_RESET;
        endcase
      end
    end
  end

  initial begin
    assert (PKT_BYTES >= 1 && PKT_BYTES <= 15) else $error("mcu_sim: PKT_BYTES out of range");
    assert ((PIXELS * LINES) % 2 == 0) else $error("mcu_sim: odd frame size");
    assert (BLOCK_WORDS >= 1 && BLOCK_WORDS < (1 << CNT_W)) else $error("mcu_sim: bad BLOCK_WORDS");
  end
endmodule
