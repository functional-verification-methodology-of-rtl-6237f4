// fas_sim: SCSI protocol chip, reduced to its DMA engine and disk port.
//
// A one-cycle `dmawr_begin` pulse starts a DMA write of `dma_count` words
// from the memory card to the disk. During the transfer the chip drives
// `dwr_n` low (direction: card to disk), holds `dreq` high and gives a
// one-cycle `dmaclk` pulse every DMA_DIV cycles. Every cycle with `dack_n`
// low delivers one word on `dmdb`; the chip passes it on at once to the
// disk's parallel port (`scsidb` with a one-cycle `scsiwr` pulse, `scsien`
// high for the whole transfer). After the last word dreq falls and a
// one-cycle `dmawr_over` pulse ends the DMA. `xfer_words` holds the number
// of words moved by the last DMA, read back by the microprocessor as the
// DMA status.
//
// Peak rate: one word per DMA_DIV cycles. DMA_DIV must be at least 2 so that
// dreq has fallen before the dmaclk pulse that follows the last word.
//
// From the specification: dmawr_begin/dmawr_over as start and end of the
// DMA, the chip driving dmaclk, dreq and dwr_n, and the scsiwr/scsien/scsidb
// disk port. This design's choices: the transfer count input (the
// register write that the firmware does before a DMA), the timing above, and
// the status count.
//
// Lint note: rst_n is both the asynchronous reset of the flip-flops and the
// disable condition of the handshake assertion, which Verilator reports as
// a signal used both synchronously and asynchronously; this is intended.
module fas_sim #(
  parameter int unsigned DMA_DIV = 4,    // clock cycles per dmaclk pulse
  parameter int unsigned CNT_W   = 16    // width of the transfer count
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             dmawr_begin,
  input  logic [CNT_W-1:0] dma_count,
  output logic             dreq,
  input  logic             dack_n,
  output logic             dwr_n,
  output logic             dmawr_over,
  output logic             dmaclk,
  input  logic [15:0]      dmdb,
  output logic [15:0]      scsidb,
  output logic             scsiwr,
  output logic             scsien,
  output logic [CNT_W-1:0] xfer_words
);
  logic [CNT_W-1:0] remain_q;
  logic [$clog2(DMA_DIV+1)-1:0] div_q;
  logic busy_q;

  assign dreq = busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q     <= 1'b0;
      remain_q   <= '0;
      div_q      <= '0;
      dwr_n      <= 1'b1;
      dmawr_over <= 1'b0;
      dmaclk     <= 1'b0;
      scsidb     <= '0;
      scsiwr     <= 1'b0;
      scsien     <= 1'b0;
      xfer_words <= '0;
    end else begin
      dmawr_over <= 1'b0;
      scsiwr     <= 1'b0;
      dmaclk     <= 1'b0;
      if (!busy_q) begin
        scsien <= 1'b0;
        if (dmawr_begin) begin
          xfer_words <= '0;
          div_q      <= '0;
          if (dma_count == '0) begin
            dmawr_over <= 1'b1;
          end else begin
            busy_q   <= 1'b1;
            remain_q <= dma_count;
            dwr_n    <= 1'b0;
            scsien   <= 1'b1;
          end
        end
      end else begin
        div_q  <= (32'(div_q) == DMA_DIV - 1) ? '0 : div_q + 1'b1;
        dmaclk <= (div_q == '0) && !(!dack_n && remain_q == 1);
        if (!dack_n) begin
          scsidb     <= dmdb;
          scsiwr     <= 1'b1;
          xfer_words <= xfer_words + 1'b1;
          remain_q   <= remain_q - 1'b1;
          if (remain_q == 1) begin
            busy_q     <= 1'b0;
            dwr_n      <= 1'b1;
            dmawr_over <= 1'b1;
          end
        end
      end
    end
  end

  // every acknowledge must fall inside a requested transfer
  a_ack_in_xfer: assert property (@(posedge clk) disable iff (!rst_n) !dack_n |-> busy_q)
    else $error("fas_sim: dack_n outside a DMA transfer");

  initial begin
    assert (DMA_DIV >= 2) else $error("fas_sim: DMA_DIV must be at least 2");
  end
endmodule
