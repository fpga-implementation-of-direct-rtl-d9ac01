// dsss_pkg: constants and types shared by the DS-SS transmitter.
//
// The transmitter spreads each bit of an 8-bit data word with 32 chips of a
// pseudo-chaotic sequence (PCS), so one word becomes 256 transmitted chips.
// The generator is a cascade of four cells, each holding two 8-bit
// registers, so eight registers (R1..R8) are programmable through a 3-bit
// select. These numbers are the design's defaults; every module also takes
// them as parameters.
package dsss_pkg;

  localparam int unsigned DEF_REG_W         = 8;   // width of every PCS register
  localparam int unsigned DEF_NUM_CELLS     = 4;   // basic cells in the cascade
  localparam int unsigned DEF_DATA_W        = 8;   // data word width
  localparam int unsigned DEF_CHIPS_PER_BIT = 32;  // PCS chips per data bit

  // States of the input buffer.
  typedef enum logic [1:0] {
    BUF_EMPTY = 2'd0,  // accepts a word from the message source
    BUF_FULL  = 2'd1,  // word held, reload asserted to the control circuit
    BUF_SENT  = 2'd2   // word taken by the control circuit, waiting for done
  } buf_state_e;

  // States of the transmit control circuit.
  typedef enum logic [1:0] {
    CTRL_IDLE   = 2'd0,  // waiting for ready and a buffered word
    CTRL_SPREAD = 2'd1,  // PCS running, multiplier enabled, busy
    CTRL_DONE   = 2'd2   // one-cycle done indication, busy low
  } ctrl_state_e;

endpackage
