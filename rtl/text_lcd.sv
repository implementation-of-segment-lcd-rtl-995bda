// text_lcd: memory-mapped controller for a 2-line by 16-character text LCD.
//
// Software writes characters into a 32-byte buffer over the local bus: a write
// to a word address with address[9:7] == 1 stores data[7:0] as character
// address[6:2] (0..15 the first line, 16..31 the second); rdata reads the
// character at the current address back. The buffer resets to spaces.
//
// The controller drives an LCD with the common HD44780-style 8-bit parallel
// write interface (lcd_data, lcd_rs, lcd_en; lcd_rw held low). It runs in two
// phases, reported on `phase`:
//   INIT_PHASE      wait POWERUP_CYC clocks after reset, then send the commands
//                   0x38 (8-bit bus, two lines), 0x0C (display on, no cursor),
//                   0x06 (increment, no shift) and 0x01 (clear);
//   LCD_DATA_PHASE  forever: command 0x80 (line 1 start), characters 0..15,
//                   command 0xC0 (line 2 start), characters 16..31;
// so a buffer write appears on the glass within one refresh pass.
// Each byte is sent as: lcd_rs/lcd_data set up one clock, lcd_en high for
// E_CYC clocks, lcd_en low, then a pause of CMD_CYC clocks (CLEAR_CYC after the
// clear command) before the next byte; data is held during the pause.
//
// The original design names this controller and its two phases, INIT PHASE and
// DATA PHASE; everything else here (buffer size and address map, command list,
// timing constants, which follow usual HD44780 data-sheet figures for a 50 MHz
// clock) is this design's choice.
module text_lcd
  import seg_lcd_pkg::*;
#(
  parameter int unsigned POWERUP_CYC = 750_000, // 15 ms at 50 MHz
  parameter int unsigned E_CYC       = 13,      // enable pulse, 260 ns
  parameter int unsigned CMD_CYC     = 2_000,   // 40 us between bytes
  parameter int unsigned CLEAR_CYC   = 82_000   // 1.64 ms after clear
) (
  input  logic        clk,
  input  logic        reset_n,    // asynchronous, active low
  input  logic        write,      // one-cycle write strobe
  input  logic [9:2]  address,    // word address
  input  logic [31:0] data,       // write data, character in [7:0]
  output logic [7:0]  rdata,      // buffer read-back at address
  output logic [7:0]  lcd_data,
  output logic        lcd_rs,     // 0 = command, 1 = character
  output logic        lcd_rw,     // always write
  output logic        lcd_en,
  output lcd_phase_t  phase
);

  localparam int unsigned N_INIT  = 4;
  localparam int unsigned N_STEPS = 34;   // 2 x (address command + 16 characters)

  typedef enum logic [1:0] {W_SETUP, W_PULSE, W_WAIT} wstate_t;

  logic [7:0]  char_buf [32];
  logic [5:0]  step;
  logic [31:0] tmr;
  wstate_t     wst;
  logic [7:0]  next_byte;
  logic        next_rs;

  // Character buffer.
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      for (int i = 0; i < 32; i++) char_buf[i] <= 8'h20;
    end else if (write && address[9:7] == LCD_BUF_SEL) begin
      char_buf[address[6:2]] <= data[7:0];
    end
  end

  assign rdata = char_buf[address[6:2]];

  // Byte to send at the current step of the current phase.
  always_comb begin
    next_byte = 8'h00;
    next_rs   = 1'b0;
    if (phase == INIT_PHASE) begin
      unique case (step[1:0])
        2'd0: next_byte = 8'h38;
        2'd1: next_byte = 8'h0C;
        2'd2: next_byte = 8'h06;
        2'd3: next_byte = 8'h01;
      endcase
    end else if (step == 6'd0) begin
      next_byte = 8'h80;
    end else if (step == 6'd17) begin
      next_byte = 8'hC0;
    end else if (step < 6'd17) begin
      next_byte = char_buf[5'(step - 6'd1)];
      next_rs   = 1'b1;
    end else begin
      next_byte = char_buf[5'(step - 6'd2)];
      next_rs   = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      phase    <= INIT_PHASE;
      step     <= '0;
      wst      <= W_WAIT;
      tmr      <= POWERUP_CYC;
      lcd_data <= '0;
      lcd_rs   <= 1'b0;
      lcd_en   <= 1'b0;
    end else begin
      unique case (wst)
        W_WAIT: begin
          if (tmr != 0) begin
            tmr <= tmr - 1;
          end else begin
            lcd_data <= next_byte;
            lcd_rs   <= next_rs;
            wst      <= W_SETUP;
          end
        end
        W_SETUP: begin
          lcd_en <= 1'b1;
          tmr    <= E_CYC - 1;
          wst    <= W_PULSE;
        end
        W_PULSE: begin
          if (tmr != 0) begin
            tmr <= tmr - 1;
          end else begin
            lcd_en <= 1'b0;
            wst    <= W_WAIT;
            if (phase == INIT_PHASE) begin
              tmr <= (step == 6'(N_INIT - 1)) ? CLEAR_CYC : CMD_CYC;
              if (step == 6'(N_INIT - 1)) begin
                phase <= LCD_DATA_PHASE;
                step  <= '0;
              end else begin
                step <= step + 1'b1;
              end
            end else begin
              tmr  <= CMD_CYC;
              step <= (step == 6'(N_STEPS - 1)) ? '0 : step + 1'b1;
            end
          end
        end
        default: wst <= W_WAIT;
      endcase
    end
  end

  assign lcd_rw = 1'b0;

endmodule
