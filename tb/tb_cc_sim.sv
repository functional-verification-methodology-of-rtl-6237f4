// tb_cc_sim: checks the camera controller's link timing and protocol.
// ccdok_n must fall INIT_CYCLES after reset; txclk must be a square wave of
// BYTE_CYCLES cycles; txdat may change only while txclk is low; each packet
// is PKT_BYTES bytes, taken on txclk rising edges while txen is high, with
// byte i of packet p equal to {p, i+1} (nibbles), one byte per BYTE_CYCLES;
// a new packet starts only after a status pulse on huafu_n.
`timescale 1ns/1ps
module tb_cc_sim;
  localparam int unsigned BYTE_CYCLES = 20, PKT_BYTES = 7, INIT_CYCLES = 50;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  initial #1 rst_n = 1'b0;
  logic txen, txclk, ccdok_n, huafu_n = 1'b1;
  logic [7:0] txdat, pkt_count;

  cc_sim #(.BYTE_CYCLES(BYTE_CYCLES), .PKT_BYTES(PKT_BYTES), .INIT_CYCLES(INIT_CYCLES)) dut (.*);

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

  // continuous monitors
  int cyc = 0, last_rise = -1, last_fall = -1, ok_cyc = -1;
  logic txclk_q = 1'b0, ccdok_q = 1'b1;
  logic [7:0] txdat_q = '0;
  logic [7:0] got [$];
  int rise_times [$];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (txclk && !txclk_q) begin
      if (last_rise >= 0) check(cyc - last_rise == BYTE_CYCLES, $sformatf("txclk period %0d", cyc - last_rise));
      last_rise = cyc;
      if (txen) begin got.push_back(txdat); rise_times.push_back(cyc); end
    end
    if (!txclk && txclk_q) begin
      if (last_rise >= 0) check(cyc - last_rise == BYTE_CYCLES / 2, "txclk high time");
      last_fall = cyc;
    end
    if (txdat != txdat_q && txclk) check(0, "txdat changed while txclk high");
    if (!ccdok_n && ccdok_q) ok_cyc = cyc;
    txclk_q <= txclk;
    txdat_q <= txdat;
    ccdok_q <= ccdok_n;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (!ccdok_n);
    repeat (2) @(posedge clk);
    check(ok_cyc >= INIT_CYCLES && ok_cyc <= INIT_CYCLES + 3, $sformatf("ccdok_n fell at cycle %0d", ok_cyc));
    for (int p = 0; p < 3; p++) begin
      wait (txen);
      wait (!txen);
      repeat (2 * BYTE_CYCLES) @(posedge clk);
      check(got.size() == PKT_BYTES, $sformatf("packet %0d has %0d bytes", p, got.size()));
      for (int i = 0; i < got.size(); i++)
        check(got[i] == {4'(p), 4'(i + 1)}, $sformatf("packet %0d byte %0d = %02h", p, i, got[i]));
      for (int i = 1; i < rise_times.size(); i++)
        check(rise_times[i] - rise_times[i-1] == BYTE_CYCLES, "byte spacing");
      check(pkt_count == 8'(p + 1), "pkt_count");
      check(!txen, "second packet without a status pulse");
      got.delete();
      rise_times.delete();
      @(negedge clk) huafu_n = 1'b0;
      @(negedge clk) huafu_n = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
