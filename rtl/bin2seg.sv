// bin2seg: registered decoder from a 4-bit digit value to a seven-segment pattern.
//
// The seven-segment controller instantiates one of these per display digit. The
// input value 0..15 is shown as the hexadecimal glyph 0-9, A, b, C, d, E, F, so
// software that wants decimal output writes BCD digits. The output is
// seg = {dp, g, f, e, d, c, b, a}, active high (a lit segment is 1); the decimal
// point is never lit. The output is registered: it follows the input one clock
// later. The original design takes this decoder from a library and gives only
// its instance name and its clock, value and pattern ports; the 4-bit value
// width, the hexadecimal glyph set and the bit order are this design's choices.
module bin2seg (
  input  logic       clk,
  input  logic [3:0] bin,   // digit value
  output logic [7:0] seg    // {dp, g, f, e, d, c, b, a}, 1 = segment lit
);

  logic [6:0] pattern;  // {g, f, e, d, c, b, a}

  always_comb begin
    unique case (bin)
      4'h0: pattern = 7'b011_1111;
      4'h1: pattern = 7'b000_0110;
      4'h2: pattern = 7'b101_1011;
      4'h3: pattern = 7'b100_1111;
      4'h4: pattern = 7'b110_0110;
      4'h5: pattern = 7'b110_1101;
      4'h6: pattern = 7'b111_1101;
      4'h7: pattern = 7'b000_0111;
      4'h8: pattern = 7'b111_1111;
      4'h9: pattern = 7'b110_1111;
      4'hA: pattern = 7'b111_0111;
      4'hB: pattern = 7'b111_1100;
      4'hC: pattern = 7'b011_1001;
      4'hD: pattern = 7'b101_1110;
      4'hE: pattern = 7'b111_1001;
      4'hF: pattern = 7'b111_0001;
    endcase
  end

  always_ff @(posedge clk) seg <= {1'b0, pattern};

endmodule
