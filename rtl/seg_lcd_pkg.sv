// seg_lcd_pkg: types and constants shared by the Segment_LCD peripheral.
//
// The peripheral sits on the AHB master port that the Excalibur stripe offers to
// the PLD. This package holds the AHB transfer-type and response encodings (fixed
// by the AMBA AHB specification), the four phases of the slave state machine
// (named after the parameter table on the slave block of the schematic; their
// binary values here are this design's choice), the two phases of the text LCD
// controller, and the local register map, which is this design's choice except
// for the seven-segment register: the seven-segment listing stores the bus word
// when address[9:3] == 1.
package seg_lcd_pkg;

  // AHB HTRANS encodings (AMBA AHB).
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_t;

  // AHB HRESP encodings (AMBA AHB).
  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_t;

  // HSIZE of a 32-bit word transfer; the only size the slave accepts.
  localparam logic [1:0] HSIZE_WORD = 2'b10;

  // States of the AHB slave state machine.
  typedef enum logic [1:0] {
    ADDRESS_PHASE   = 2'b00,  // idle: waiting for a transfer, HREADY high
    DATA_PHASE      = 2'b01,  // data phase of an accepted transfer, HREADY high
    READ_WAIT_PHASE = 2'b10,  // one wait state so the read data can be registered
    ERROR_PHASE     = 2'b11   // first cycle of the two-cycle ERROR response
  } ahb_state_t;

  // Phases of the text LCD controller.
  typedef enum logic {
    INIT_PHASE = 1'b0,        // power-up wait and initialisation commands
    LCD_DATA_PHASE = 1'b1     // endless refresh of the display from the buffer
  } lcd_phase_t;

  // Local register map, in word addresses (HADDR[9:2]).
  // Seven-segment data register: address[9:3] == 1, i.e. word addresses 2 and 3.
  localparam logic [6:0] SEG_REG_SEL = 7'd1;
  // Text LCD character buffer: address[9:7] == 1, i.e. word addresses 32..63,
  // one character (bits [7:0] of the word) per word address.
  localparam logic [2:0] LCD_BUF_SEL = 3'd1;

  // Local bus from the AHB slave to the display controllers.
  typedef struct packed {
    logic [9:2]  addr;   // word address of the access
    logic        write;  // one-cycle write strobe
    logic [31:0] wdata;  // write data, valid with write
  } lbus_t;

endpackage
