// tb_pld_syn: checks the FPGA logic on its own.
// Frame interrupt: one pulse after VBLANK_DETECT cycles of lval low, none
// for short line gaps. Capture: nothing written while not armed (the frame
// is reported as skipped), the microprocessor's bytes written on its
// fifowrclk pulses, then after arming exactly LINES lines of pixels from the
// next frame start, none from a line in the middle of a frame or after the
// LINES-th line. DMA: a FIFO read on each dmaclk pulse while dreq is high,
// dwr_n low and the FIFO not empty, the word on dmadb with dack_n low in
// the next cycle, a stall pulse instead when the FIFO is empty.
`timescale 1ns/1ps
module tb_pld_syn;
  localparam int unsigned LINES = 2, VBLANK_DETECT = 20, PIX = 4;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  initial #1 rst_n = 1'b0;

  logic lval = 1'b0, strobe = 1'b0;
  logic [7:0] cdat = '0;
  logic frame, fifoen = 1'b0, fifowrclk = 1'b0, fiforst_n_in = 1'b1;
  logic [7:0] fifodat = '0;
  logic fiforst_n, wen_n, ren_n;
  logic [7:0] wdat;
  logic [15:0] rdat = '0, dmadb;
  logic fifo_empty = 1'b1;
  logic dreq = 1'b0, dwr_n = 1'b1, dmaclk = 1'b0, dack_n;
  logic capturing, skip, dma_stall;

  pld_syn #(.LINES(LINES), .VBLANK_DETECT(VBLANK_DETECT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] written [$];
  int n_frame = 0, n_skip = 0, n_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (!wen_n) written.push_back(wdat);
    if (frame) n_frame++;
    if (skip) n_skip++;
    if (dma_stall) n_stall++;
  end

  // one line of PIX pixels, a strobe every second cycle, pixel value base+i
  task automatic send_line(input logic [7:0] base);
    for (int i = 0; i < PIX; i++) begin
      @(negedge clk) begin lval = 1'b1; strobe = 1'b1; cdat = base + 8'(i); end
      @(negedge clk) strobe = 1'b0;
    end
    @(negedge clk) begin lval = 1'b0; cdat = 8'h00; end
    repeat (3) @(negedge clk);   // short line gap
  endtask
  task automatic vgap();
    @(negedge clk) lval = 1'b0;
    repeat (VBLANK_DETECT + 5) @(negedge clk);
  endtask

  initial begin
    int f0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // 1: frame gap, not armed: interrupt and skip, nothing written
    vgap();
    check(n_frame == 1, $sformatf("%0d frame pulses after the first gap", n_frame));
    send_line(8'h10);
    send_line(8'h20);
    check(n_frame == 1, "frame pulse for a short line gap");
    check(n_skip == 1, "unarmed frame not reported as skipped");
    check(written.size() == 0, "pixels written while not armed");
    // 2: reference bytes from the microprocessor
    for (int i = 0; i < 3; i++) begin
      @(negedge clk) begin fifoen = 1'b1; fifodat = 8'hA0 + 8'(i); end
      @(negedge clk) fifowrclk = 1'b1;
      @(negedge clk) fifowrclk = 1'b0;
    end
    @(negedge clk) fifoen = 1'b0;
    check(written.size() == 3, $sformatf("%0d reference bytes written", written.size()));
    for (int i = 0; i < written.size(); i++) check(written[i] == 8'hA0 + 8'(i), "reference byte value");
    written.delete();
    // 3: armed, but mid-frame: no capture
    send_line(8'h30);
    check(written.size() == 0, "capture started in the middle of a frame");
    // 4: next frame start: LINES lines captured, the next one not
    f0 = n_frame;
    vgap();
    check(n_frame == f0 + 1, "no frame pulse");
    send_line(8'h40);
    check(capturing, "not capturing");
    send_line(8'h50);
    send_line(8'h60);
    check(!capturing, "capture did not end after LINES lines");
    check(written.size() == LINES * PIX, $sformatf("%0d pixels captured", written.size()));
    for (int l = 0; l < LINES; l++)
      for (int i = 0; i < PIX; i++)
        if (l * PIX + i < written.size())
          check(written[l * PIX + i] == 8'h40 + 8'(16 * l + i), "captured pixel value");
    written.delete();
    // 5: reset passes through and clears the arming
    @(negedge clk) fiforst_n_in = 1'b0;
    #1 check(fiforst_n == 1'b0, "fiforst_n not passed on");
    @(negedge clk) fiforst_n_in = 1'b1;
    // 6: DMA
    @(negedge clk) begin dreq = 1'b1; dwr_n = 1'b0; fifo_empty = 1'b0; rdat = 16'hBEEF; dmaclk = 1'b1; end
    #1 check(ren_n == 1'b0, "no FIFO read on dmaclk");
    @(negedge clk) dmaclk = 1'b0;
    check(dack_n == 1'b0 && dmadb == 16'hBEEF, "word not acknowledged in the next cycle");
    #1 check(ren_n == 1'b1, "read without dmaclk");
    @(negedge clk);
    check(dack_n == 1'b1, "dack_n longer than one cycle");
    @(negedge clk) begin fifo_empty = 1'b1; dmaclk = 1'b1; end
    #1 check(ren_n == 1'b1 && dma_stall, "read of an empty FIFO / no stall");
    @(negedge clk) begin dmaclk = 1'b0; end
    check(dack_n == 1'b1, "ack for an empty FIFO");
    @(negedge clk) begin fifo_empty = 1'b0; dwr_n = 1'b1; dmaclk = 1'b1; end
    #1 check(ren_n == 1'b1, "read while dwr_n high");
    @(negedge clk) dmaclk = 1'b0;
    check(n_stall == 1, "stall count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
