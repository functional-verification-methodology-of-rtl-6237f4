// memcard_pkg: types and constants shared by the image storage memory card.
//
// It holds the state encodings of the two firmware-like controllers: the
// microprocessor state machine (mcu_sim) and the camera controller
// (cc_sim). The 4-bit codes of the microprocessor states are the ones the
// design specification lists; ST_IDLE is an extra code chosen here for the
// point where the firmware waits for the next event. The helper functions
// give the test pattern of the CCD simulator and of the reference packets so
// that every module that produces them uses one definition.
package memcard_pkg;

  // Microprocessor states. Codes follow the firmware state list; ST_IDLE
  // (4'b0100) is an unused code taken for the wait point.
  typedef enum logic [3:0] {
    ST_RESET  = 4'b0000,  // reset
    ST_INIT   = 4'b0001,  // initialise the system
    ST_WAIT1  = 4'b0011,  // wait for the camera's CCD-ready signal
    ST_FASWR  = 4'b0010,  // write the DMA command to the protocol chip
    ST_FSWR   = 4'b0110,  // file system write
    ST_FSRD   = 4'b0111,  // file system read
    ST_DMAWR  = 4'b1000,  // DMA write in progress
    ST_FASRD  = 4'b1101,  // read the DMA status from the protocol chip
    ST_RX422  = 4'b1001,  // RS-422 receive interrupt
    ST_TX422  = 4'b1010,  // RS-422 status reply
    ST_FIFOWR = 4'b1011,  // write the reference record into the FIFO
    ST_EXINT  = 4'b1100,  // frame interrupt
    ST_IDLE   = 4'b0100   // wait for the next event
  } mcu_state_t;

  // Camera controller states.
  typedef enum logic [1:0] {
    CC_RESET = 2'd0,
    CC_INIT  = 2'd1,
    CC_TX    = 2'd2,
    CC_RX    = 2'd3
  } cc_state_t;

  // CCD test pattern: value of pixel `pix` of line `line`.
  function automatic logic [7:0] ccd_pixel(input int unsigned pix, input int unsigned line);
    return 8'(pix + 3 * line);
  endfunction

  // Reference packet byte `idx` (0-based) of packet number `pkt`:
  // packet number in the high nibble, byte number from 1 in the low nibble.
  function automatic logic [7:0] ref_byte(input logic [3:0] pkt, input logic [3:0] idx);
    return {pkt, idx + 4'd1};
  endfunction

endpackage
