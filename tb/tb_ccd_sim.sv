// tb_ccd_sim: checks the CCD generator against an independent model of the
// line/frame timing: pixel strobe every PIX_DIV cycles, LINES lines of
// PIXELS valid pixels, HBLANK blank pixel periods after each line, VBLANK
// blank pixel periods between frames (starting with one), pixel value
// (pixel + 3*line) mod 256. Two whole frames are checked strobe by strobe.
`timescale 1ns/1ps
module tb_ccd_sim;
  localparam int unsigned PIXELS = 5, LINES = 3, PIX_DIV = 3, HBLANK = 2, VBLANK = 7;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  initial #1 rst_n = 1'b0;
  logic strobe, lval;
  logic [7:0] cdat;

  ccd_sim #(.PIXELS(PIXELS), .LINES(LINES), .PIX_DIV(PIX_DIV), .HBLANK(HBLANK),
            .VBLANK(VBLANK)) dut (.*);

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

  initial begin
    int last_strobe;
    int cyc;
    int n_valid;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    cyc = 0;
    last_strobe = -1;
    n_valid = 0;
    for (int f = 0; f < 2; f++) begin
      // vertical blank, then lines each followed by horizontal blank
      for (int seg = -1; seg < int'(LINES); seg++) begin
        int len_hi, len_lo;
        len_hi = (seg < 0) ? 0 : PIXELS;
        len_lo = (seg < 0) ? VBLANK : HBLANK;
        for (int t = 0; t < len_hi + len_lo; t++) begin
          // wait for the next strobe
          do begin @(posedge clk); #1; cyc++; end while (!strobe);
          if (last_strobe >= 0)
            check(cyc - last_strobe == PIX_DIV, $sformatf("strobe spacing %0d", cyc - last_strobe));
          last_strobe = cyc;
          if (t < len_hi) begin
            check(lval == 1'b1, $sformatf("frame %0d line %0d pixel %0d: lval low", f, seg, t));
            check(cdat == 8'((t + 3 * seg) % 256),
                  $sformatf("frame %0d line %0d pixel %0d: cdat %0d", f, seg, t, cdat));
            n_valid++;
          end else begin
            check(lval == 1'b0, $sformatf("frame %0d seg %0d blank %0d: lval high", f, seg, t));
          end
        end
      end
    end
    check(n_valid == 2 * PIXELS * LINES, "valid pixel count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
