// hd_sim: SCSI hard disk seen through its parallel write port.
//
// Stores every word presented on `scsidb` with a `scsiwr` pulse at the next
// free word of a DISK_WORDS-word store, in arrival order, wrapping at the
// end. `wr_words` counts the words written since reset and `cmd_count` the
// DMA commands (dmawr_begin pulses) the disk has been addressed with. The
// store can be read back through `rd_addr`/`rd_data` (one cycle latency),
// which takes the place of reading the file the disk content was dumped to.
//
// From the specification: the port names and the role of the disk as the
// storage medium written by the protocol chip. This design's choices: the
// capacity, the sequential placement and the read-back port.
module hd_sim #(
  parameter int unsigned DISK_WORDS = 262144
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dmawr_begin,
  input  logic [15:0] scsidb,
  input  logic        scsiwr,
  input  logic [$clog2(DISK_WORDS)-1:0] rd_addr,
  output logic [15:0] rd_data,
  output logic [31:0] wr_words,
  output logic [31:0] cmd_count
);
  localparam int unsigned AW = $clog2(DISK_WORDS);

  logic [15:0] store [DISK_WORDS];
  logic [AW-1:0] wa_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa_q      <= '0;
      wr_words  <= '0;
      cmd_count <= '0;
    end else begin
      if (dmawr_begin) cmd_count <= cmd_count + 1;
      if (scsiwr) begin
        wa_q     <= (wa_q == AW'(DISK_WORDS - 1)) ? '0 : wa_q + 1'b1;
        wr_words <= wr_words + 1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (scsiwr) store[wa_q] <= scsidb;
    rd_data <= store[rd_addr];
  end

  initial begin
    assert (DISK_WORDS >= 2) else $error("hd_sim: DISK_WORDS must be at least 2");
  end
endmodule
