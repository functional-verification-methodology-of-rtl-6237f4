// ccd_sim: CCD camera output generator (data source of the storage system).
//
// Produces the three signals of the camera's digital output: a pixel strobe,
// a line-valid flag `lval` and 8-bit pixel data `cdat`. A frame is LINES lines
// of PIXELS pixels; each line is followed by HBLANK pixel periods with lval
// low, and each frame by VBLANK pixel periods with lval low. The camera has
// no frame-valid output, so the long vertical gap is what marks a frame.
//
// Timing: one pixel period is PIX_DIV clock cycles. `strobe` is a one-cycle
// pulse at the start of each pixel period, in the same cycle as the new
// `lval`/`cdat` values, so a receiver takes cdat when strobe && lval. The
// strobe runs continuously, also in blanking. After reset the generator
// starts in vertical blanking.
//
// The signal names follow the specification. Frame size, blanking and pixel
// rate are not specified and are this design's choices. The pixel value is
// a test pattern, memcard_pkg::ccd_pixel(pixel, line).
module ccd_sim
  import memcard_pkg::*;
#(
  parameter int unsigned PIXELS  = 512,   // pixels per line
  parameter int unsigned LINES   = 512,   // lines per frame
  parameter int unsigned PIX_DIV = 4,     // clock cycles per pixel
  parameter int unsigned HBLANK  = 32,    // pixel periods between lines
  parameter int unsigned VBLANK  = 4096   // pixel periods between frames
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       strobe,
  output logic       lval,
  output logic [7:0] cdat
);
  localparam int unsigned HTOT = PIXELS + HBLANK;

  logic [$clog2(PIX_DIV+1)-1:0] div_q;
  logic [31:0] h_q;     // position in the line (or in vertical blanking)
  logic [31:0] v_q;     // line number; LINES means vertical blanking
  logic        tick;

  assign tick = (div_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q  <= '0;
      h_q    <= '0;
      v_q    <= LINES;
      strobe <= 1'b0;
      lval   <= 1'b0;
      cdat   <= '0;
    end else begin
      div_q  <= (32'(div_q) == PIX_DIV - 1) ? '0 : div_q + 1'b1;
      strobe <= tick;
      if (tick) begin
        if (v_q < LINES && h_q < PIXELS) begin
          lval <= 1'b1;
          cdat <= ccd_pixel(h_q, v_q);
        end else begin
          lval <= 1'b0;
          cdat <= '0;
        end
        if (v_q < LINES) begin
          if (h_q == HTOT - 1) begin
            h_q <= '0;
            v_q <= v_q + 1;
          end else begin
            h_q <= h_q + 1;
          end
        end else begin
          if (h_q == VBLANK - 1) begin
            h_q <= '0;
            v_q <= '0;
          end else begin
            h_q <= h_q + 1;
          end
        end
      end
    end
  end

  initial begin
    assert (PIX_DIV >= 1 && PIXELS >= 1 && LINES >= 1 && VBLANK >= 1)
      else $error("ccd_sim: bad parameters");
  end
endmodule
