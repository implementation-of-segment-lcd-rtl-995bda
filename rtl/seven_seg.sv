// seven_seg: memory-mapped seven-segment display controller.
//
// A 32-bit data register is written from the local bus when enable_n is low and
// the word address has address[9:3] == 1 (word addresses 2 and 3), and reads
// back on seg_data. Its six low nibbles are the six digits of the display:
// digit k shows D_Reg[4k+3:4k], digit 0 being the rightmost. Each digit has its
// own registered bin2seg decoder. The digits are driven as two groups of three
// that share segment lines: group 1 (digits 0..2) on seg_out1/seg_gnd1 and
// group 2 (digits 3..5) on seg_out2/seg_gnd2. A scan counter cnt3 steps 0, 1, 2
// every SCAN_DIV clocks; while cnt3 == k, seg_gndN is low on bit k only (the
// common of that digit is pulled to ground) and seg_outN carries that digit's
// pattern, active high. All outputs are registered.
//
// From the original design: the register, its reset to zero, its write
// condition address[9:3] == 1, the port names and widths (clk, data[31:0],
// reset_n, enable_n, address[9:2], seg_data[31:0], seg_out1/2[7:0],
// seg_gnd1/2[2:0], cnt3[1:0]) and the per-digit bin2seg decoders. This design's
// choices: nibble-per-digit mapping, two groups of three digits, active-low
// digit selects, scan period and reset of the scan counter.
//
// Timing: a write is visible on seg_data the clock after the strobe and on the
// segment outputs two clocks later, at the next slot of that digit.
module seven_seg
  import seg_lcd_pkg::*;
#(
  parameter int unsigned SCAN_DIV = 50_000   // clocks per digit slot (1 ms at 50 MHz)
) (
  input  logic        clk,
  input  logic        reset_n,     // asynchronous, active low
  input  logic        enable_n,    // active-low write strobe
  input  logic [9:2]  address,     // word address
  input  logic [31:0] data,        // write data
  output logic [31:0] seg_data,    // register read-back
  output logic [7:0]  seg_out1,    // segments of group 1 {dp,g,f,e,d,c,b,a}
  output logic [7:0]  seg_out2,    // segments of group 2
  output logic [2:0]  seg_gnd1,    // digit selects of group 1, active low
  output logic [2:0]  seg_gnd2,    // digit selects of group 2, active low
  output logic [1:0]  cnt3         // scan position 0..2
);

  localparam int unsigned DIV_W = (SCAN_DIV > 1) ? $clog2(SCAN_DIV) : 1;

  logic [31:0]      D_Reg;
  logic [7:0]       seg [6];
  logic [DIV_W-1:0] div_cnt;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      D_Reg <= '0;
    end else if (!enable_n && address[9:3] == SEG_REG_SEL) begin
      D_Reg <= data;
    end
  end

  assign seg_data = D_Reg;

  for (genvar k = 0; k < 6; k++) begin : g_dec
    bin2seg u_bin2seg (.clk(clk), .bin(D_Reg[4*k +: 4]), .seg(seg[k]));
  end

  // Scan: cnt3 advances every SCAN_DIV clocks and wraps after 2.
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      div_cnt <= '0;
      cnt3    <= 2'd0;
    end else if (div_cnt == DIV_W'(SCAN_DIV - 1)) begin
      div_cnt <= '0;
      cnt3    <= (cnt3 == 2'd2) ? 2'd0 : cnt3 + 2'd1;
    end else begin
      div_cnt <= div_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      seg_out1 <= '0;
      seg_out2 <= '0;
      seg_gnd1 <= 3'b111;
      seg_gnd2 <= 3'b111;
    end else begin
      seg_out1 <= seg[3'(cnt3)];
      seg_out2 <= seg[3'(cnt3) + 3'd3];
      seg_gnd1 <= ~(3'b001 << cnt3);
      seg_gnd2 <= ~(3'b001 << cnt3);
    end
  end

endmodule
