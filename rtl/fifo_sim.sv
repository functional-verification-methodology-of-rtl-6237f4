// fifo_sim: image FIFO buffer, 8-bit write side and 16-bit read side, with
// independent write and read clocks.
//
// Models a 256K x 16 FIFO memory chip. Bytes written on `wdat` are paired
// into words: the byte written while the byte-phase bit (the lowest bit of
// the write byte counter) is 0 is held, and the next byte completes the word
// {second byte, first byte}, which is then stored. Reads return one 16-bit
// word per `ren_n` low cycle of `rclk`, first in first out.
//
// Write side (wclk): a byte is taken on every rising wclk edge with wen_n
// low. `full` and `wlevel` are computed from the write pointer and the read
// pointer brought over from the read side; a word that would overflow is
// dropped and sets the sticky `overflow` flag.
// Read side (rclk): a rising edge with ren_n low and the FIFO not empty puts
// the next word on `rdat` after that edge. `empty` is computed from the read
// pointer and the write pointer brought over from the write side.
// The pointers cross between the clocks as Gray codes through two-stage
// synchronisers, so `empty` and `full` are released two edges of the other
// clock late and are never wrong in the unsafe direction. The two clocks may
// also be the same clock.
//
// Reset: `rst_n` and `fiforst_n` both clear the pointers, the byte phase and
// the flags asynchronously, in both clock domains. fiforst_n must be low long
// enough for each clock to see it (it has no synchroniser of its own).
//
// From the specification: the depth (256K words of 16 bits), separate write
// and read clocks with enables, counter-based pointers with an asynchronous
// reset by rst_n and the FIFO reset signal, and byte-to-word merging by the
// lowest bit of the write counter. This design's choices: the flags, the
// Gray-code pointer crossing and dropping words on overflow.
module fifo_sim #(
  parameter int unsigned DEPTH = 262144   // words, a power of two
) (
  input  logic        rst_n,
  input  logic        fiforst_n,
  // write side
  input  logic        wclk,
  input  logic        wen_n,
  input  logic [7:0]  wdat,
  output logic        full,
  output logic [$clog2(DEPTH+1)-1:0] wlevel,
  output logic        overflow,
  // read side
  input  logic        rclk,
  input  logic        ren_n,
  output logic [15:0] rdat,
  output logic        empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [15:0] mem [DEPTH];
  logic        arst_n;
  assign arst_n = rst_n && fiforst_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i + 1] ^ g[i];
    return b;
  endfunction

  logic [AW:0] rptr_q, rgray_q, wgray_r1, wgray_r2;   // read side
  logic        do_rd;

  // ---------------- write side ----------------
  logic [AW:0] wptr_q, wgray_q, rgray_w1, rgray_w2, rptr_w;
  logic        phase_q;
  logic [7:0]  wbuf0_q;
  logic        do_wr;

  assign rptr_w = gray2bin(rgray_w2);
  assign wlevel = wptr_q - rptr_w;
  assign full   = (wptr_q[AW] != rptr_w[AW]) && (wptr_q[AW-1:0] == rptr_w[AW-1:0]);
  assign do_wr  = !wen_n && phase_q && !full;

  always_ff @(posedge wclk or negedge arst_n) begin
    if (!arst_n) begin
      wptr_q   <= '0;
      wgray_q  <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      phase_q  <= 1'b0;
      wbuf0_q  <= '0;
      overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray_q;
      rgray_w2 <= rgray_w1;
      if (!wen_n) begin
        phase_q <= !phase_q;
        if (!phase_q) wbuf0_q <= wdat;
        if (phase_q && full) overflow <= 1'b1;
      end
      if (do_wr) begin
        wptr_q  <= wptr_q + 1'b1;
        wgray_q <= bin2gray(wptr_q + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wptr_q[AW-1:0]] <= {wdat, wbuf0_q};
  end

  // ---------------- read side ----------------

  assign empty = (rgray_q == wgray_r2);
  assign do_rd = !ren_n && !empty;

  always_ff @(posedge rclk or negedge arst_n) begin
    if (!arst_n) begin
      rptr_q   <= '0;
      rgray_q  <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray_q;
      wgray_r2 <= wgray_r1;
      if (do_rd) begin
        rptr_q  <= rptr_q + 1'b1;
        rgray_q <= bin2gray(rptr_q + 1'b1);
      end
    end
  end

  always_ff @(posedge rclk) begin
    if (do_rd) rdat <= mem[rptr_q[AW-1:0]];
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("fifo_sim: DEPTH must be a power of two");
  end
endmodule
