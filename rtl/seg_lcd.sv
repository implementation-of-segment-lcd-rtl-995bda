// seg_lcd: the Segment_LCD peripheral, an AHB slave that drives a six-digit
// seven-segment display and a 2x16 text LCD.
//
// The ARM922T in the Excalibur stripe writes the display registers through the
// stripe's AHB master port to the PLD. This module takes that port (the stripe
// itself is a hard block and stays outside) and contains:
//   ahb_slave  converts AHB transfers into local-bus reads and writes;
//   seven_seg  data register at word addresses 2..3 (byte offset 0x08), six
//              scanned digits;
//   text_lcd   character buffer at word addresses 32..63 (byte offsets
//              0x80..0xFC, one character per word) and the LCD controller.
// Reads return the seven-segment register, a buffer character in bits [7:0], or
// zero elsewhere. Only HADDR[9:2] is decoded; HSEL selects the peripheral (the
// top-level schematic ties it high).
//
// The block split and the AHB signal names follow the original design's
// top-level schematic; the address map of the text buffer, the read multiplexer
// and the LCD pins are this design's choices. Writes complete with no wait
// state, reads with one, and illegal transfers get a two-cycle ERROR response.
module seg_lcd
  import seg_lcd_pkg::*;
#(
  parameter int unsigned SCAN_DIV    = 50_000,
  parameter int unsigned POWERUP_CYC = 750_000,
  parameter int unsigned E_CYC       = 13,
  parameter int unsigned CMD_CYC     = 2_000,
  parameter int unsigned CLEAR_CYC   = 82_000
) (
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        HSEL,
  input  logic [31:0] HADDR,
  input  logic        HWRITE,
  input  logic [1:0]  HTRANS,
  input  logic [1:0]  HSIZE,
  input  logic [2:0]  HBURST,
  input  logic [31:0] HWDATA,
  output logic [31:0] HRDATA,
  output logic        HREADY,
  output logic [1:0]  HRESP,
  // seven-segment display
  output logic [31:0] seg_data,
  output logic [7:0]  seg_out1,
  output logic [7:0]  seg_out2,
  output logic [2:0]  seg_gnd1,
  output logic [2:0]  seg_gnd2,
  output logic [1:0]  cnt3,
  // text LCD
  output logic [7:0]  lcd_data,
  output logic        lcd_rs,
  output logic        lcd_rw,
  output logic        lcd_en,
  output logic        lcd_phase,      // 0 = initialising, 1 = refreshing
  output logic [1:0]  ahb_phase       // state of the AHB slave
);

  logic [9:2]  slave_address;
  logic        write;
  logic [31:0] wdata, rdata;
  logic [7:0]  lcd_rdata;
  ahb_state_t  state;
  lcd_phase_t  phase;

  ahb_slave u_ahb_slave (
    .HCLK, .HRESETn, .HSEL, .HADDR, .HWRITE, .HTRANS, .HSIZE, .HBURST, .HWDATA,
    .HRDATA, .HREADY, .HRESP,
    .slave_address, .write, .wdata, .rdata, .state
  );

  seven_seg #(.SCAN_DIV(SCAN_DIV)) u_seven_seg (
    .clk(HCLK), .reset_n(HRESETn), .enable_n(!write), .address(slave_address),
    .data(wdata), .seg_data, .seg_out1, .seg_out2, .seg_gnd1, .seg_gnd2, .cnt3
  );

  text_lcd #(
    .POWERUP_CYC(POWERUP_CYC), .E_CYC(E_CYC), .CMD_CYC(CMD_CYC), .CLEAR_CYC(CLEAR_CYC)
  ) u_text_lcd (
    .clk(HCLK), .reset_n(HRESETn), .write, .address(slave_address), .data(wdata),
    .rdata(lcd_rdata), .lcd_data, .lcd_rs, .lcd_rw, .lcd_en, .phase
  );

  always_comb begin
    if (slave_address[9:3] == SEG_REG_SEL)      rdata = seg_data;
    else if (slave_address[9:7] == LCD_BUF_SEL) rdata = {24'h0, lcd_rdata};
    else                                        rdata = '0;
  end

  assign lcd_phase = phase;
  assign ahb_phase = state;

endmodule
