// cc_sim: camera controller, the master of the storage system.
//
// After reset it waits INIT_CYCLES clock cycles (state init), then pulls
// `ccdok_n` low to tell the memory card that the camera is ready. It then
// sends a reference packet of PKT_BYTES bytes (state tx) and waits (state rx)
// for the memory card's status reply, a low pulse on `huafu_n` that means a
// frame has been stored. Each reply starts the next packet.
//
// Link: the RS-422 serial line is replaced by a parallel port: 8-bit data
// `txdat`, a transmit clock `txclk` and an enable `txen` that stays high for
// the whole packet. txclk is free-running with a period of BYTE_CYCLES clock
// cycles: it falls when a new byte is put on txdat and rises in the middle of
// the byte, so the receiver takes txdat on the rising edge of txclk while
// txen is high. With a 50 MHz clock the default period gives the 15.625 k
// bytes/s rate of the specification.
//
// From the specification: the four states, the parallel port and its
// timing, the byte rate. This design's choices: the 7-byte packet length
// (taken from the received-byte counter of the link waveform), the packet
// contents memcard_pkg::ref_byte(packet, byte), the init delay, and the use
// of huafu_n as the status reply.
module cc_sim
  import memcard_pkg::*;
#(
  parameter int unsigned BYTE_CYCLES = 3200,  // clock cycles per byte
  parameter int unsigned PKT_BYTES   = 7,     // bytes per reference packet
  parameter int unsigned INIT_CYCLES = 1000   // delay before ccdok_n
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       txen,
  output logic [7:0] txdat,
  output logic       txclk,
  output logic       ccdok_n,
  input  logic       huafu_n,
  output logic [7:0] pkt_count   // packets sent
);
  cc_state_t state_q;
  logic [$clog2(BYTE_CYCLES+1)-1:0] phase_q;
  logic [31:0] init_q;
  logic [$clog2(PKT_BYTES+1)-1:0] idx_q;
  logic byte_start;

  assign byte_start = (phase_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= '0;
      txclk   <= 1'b0;
    end else begin
      phase_q <= (32'(phase_q) == BYTE_CYCLES - 1) ? '0 : phase_q + 1'b1;
      // low in the first half of a byte period, high in the second
      txclk   <= (32'(phase_q) == BYTE_CYCLES / 2 - 1) ? 1'b1 :
                 (32'(phase_q) == BYTE_CYCLES - 1)     ? 1'b0 : txclk;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= CC_RESET;
      init_q    <= '0;
      idx_q     <= '0;
      txen      <= 1'b0;
      txdat     <= '0;
      ccdok_n   <= 1'b1;
      pkt_count <= '0;
    end else begin
      unique case (state_q)
        CC_RESET: begin
          init_q  <= '0;
          state_q <= CC_INIT;
        end
        CC_INIT: begin
          if (init_q == INIT_CYCLES) begin
            ccdok_n <= 1'b0;
            idx_q   <= '0;
            state_q <= CC_TX;
          end else begin
            init_q <= init_q + 1;
          end
        end
        CC_TX: if (byte_start) begin
          if (32'(idx_q) < PKT_BYTES) begin
            txen  <= 1'b1;
            txdat <= ref_byte(pkt_count[3:0], 4'(idx_q));
            idx_q <= idx_q + 1'b1;
          end else begin
            txen      <= 1'b0;
            pkt_count <= pkt_count + 1'b1;
            state_q   <= CC_RX;
          end
        end
        CC_RX: if (!huafu_n) begin
          idx_q   <= '0;
          state_q <= CC_TX;
        end
        default: state_q <= CC_RESET;
      endcase
    end
  end

  initial begin
    assert (BYTE_CYCLES >= 4 && PKT_BYTES >= 1 && PKT_BYTES <= 15)
      else $error("cc_sim: bad parameters");
  end
endmodule
