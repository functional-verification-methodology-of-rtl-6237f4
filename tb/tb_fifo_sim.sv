// tb_fifo_sim: runs the FIFO with unrelated write and read clocks (10 ns and
// 14 ns) against a queue model of byte pairing (first byte of a pair in the
// low half). Random writes and reads check order and contents; filling with
// reads stopped checks `full`, the dropped words and the sticky `overflow`
// flag; draining checks `empty`; `fiforst_n` must clear the FIFO and
// realign the byte pairing. A word written must become readable within a
// few read clock edges.
`timescale 1ns/1ps
module tb_fifo_sim;
  localparam int unsigned DEPTH = 16;
  logic wclk = 1'b0, rclk = 1'b0, rst_n = 1'b1;
  always #5 wclk = !wclk;
  always #7 rclk = !rclk;
  initial #1 rst_n = 1'b0;
  logic fiforst_n = 1'b1, wen_n = 1'b1, ren_n = 1'b1;
  logic [7:0] wdat = '0;
  logic [15:0] rdat;
  logic empty, full, overflow;
  logic [4:0] wlevel;

  fifo_sim #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  logic [15:0] q [$];
  logic [7:0] lowbyte = '0;
  bit half = 1'b0;
  int dropped = 0, n_read = 0;
  bit wr_rand = 1'b0, rd_rand = 1'b0;
  int wr_prob = 50, rd_prob = 50;

  always @(posedge wclk) if (rst_n && fiforst_n && !wen_n) begin
    if (!half) lowbyte = wdat;
    else if (!full) q.push_back({wdat, lowbyte});
    else dropped++;
    half = !half;
  end
  always @(negedge wclk) begin
    if (wr_rand) begin
      wen_n = !($urandom_range(0, 99) < wr_prob);
      wdat  = 8'($urandom);
    end
  end

  bit pend = 1'b0;
  logic [15:0] exp_w;
  always @(posedge rclk) if (rst_n && fiforst_n) begin
    if (!ren_n && !empty) begin
      if (q.size() == 0) check(0, "read while the model is empty");
      else begin exp_w = q.pop_front(); pend = 1'b1; end
    end
  end
  always @(negedge rclk) begin
    if (pend) begin
      check(rdat == exp_w, $sformatf("read %04h expected %04h", rdat, exp_w));
      n_read++;
      pend = 1'b0;
    end
    if (rd_rand) ren_n = !($urandom_range(0, 99) < rd_prob);
  end

  task automatic write_bytes(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge wclk) begin wen_n = 1'b0; wdat = 8'($urandom); end
    end
    @(negedge wclk) wen_n = 1'b1;
  endtask

  initial begin
    int t;
    repeat (3) @(posedge wclk);
    @(negedge wclk) rst_n = 1'b1;
    repeat (3) @(posedge rclk);
    check(empty && !full && wlevel == 0, "flags after reset");
    // latency of a first word
    write_bytes(2);
    t = 0;
    while (empty && t < 10) begin @(posedge rclk); t++; end
    check(t <= 4, $sformatf("word visible after %0d read clocks", t));
    // random traffic, several balances of write and read rate
    wr_rand = 1'b1; rd_rand = 1'b1;
    for (int ph = 0; ph < 3; ph++) begin
      wr_prob = (ph == 0) ? 30 : (ph == 1) ? 60 : 90;
      rd_prob = (ph == 2) ? 40 : 70;
      repeat (1500) @(posedge wclk);
    end
    wr_rand = 1'b0;
    @(negedge wclk) wen_n = 1'b1;
    rd_prob = 100;
    repeat (4 * DEPTH) @(posedge rclk);
    rd_rand = 1'b0;
    @(negedge rclk) ren_n = 1'b1;
    repeat (4) @(posedge rclk);
    check(empty && q.size() == 0, $sformatf("not drained: model holds %0d", q.size()));
    check(n_read > 500, $sformatf("only %0d words read", n_read));
    // fill with reads stopped
    @(negedge wclk) fiforst_n = 1'b0;
    repeat (3) @(negedge rclk);
    fiforst_n = 1'b1;
    q.delete(); half = 1'b0; dropped = 0;
    write_bytes(2 * DEPTH + 6);
    repeat (4) @(posedge wclk);
    check(full && overflow && wlevel == DEPTH, "full/overflow after overfilling");
    check(dropped == 3 && q.size() == DEPTH, $sformatf("dropped %0d words", dropped));
    @(negedge rclk) ren_n = 1'b0;
    repeat (DEPTH + 4) @(negedge rclk);
    ren_n = 1'b1;
    repeat (4) @(posedge wclk);
    check(empty && !full && overflow, "after drain: empty, overflow still set");
    // fiforst_n clears everything and realigns the pairing
    write_bytes(3);
    @(negedge wclk) fiforst_n = 1'b0;
    repeat (3) @(negedge rclk);
    fiforst_n = 1'b1;
    q.delete(); half = 1'b0;
    repeat (2) @(posedge rclk);
    check(empty && !overflow && wlevel == 0, "fiforst_n did not clear the FIFO");
    write_bytes(4);
    repeat (6) @(posedge rclk);
    @(negedge rclk) ren_n = 1'b0;
    repeat (4) @(negedge rclk);
    ren_n = 1'b1;
    repeat (3) @(posedge rclk);
    check(q.size() == 0 && empty, "pairing after fiforst_n");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
