// tb_seg_lcd_full: one complete operation of the Segment_LCD peripheral at its
// default (50 MHz) timing. After reset the text LCD controller waits out its
// power-up time and initialises the display; meanwhile the bus functional model
// writes a six-digit BCD value to the seven-segment register and a message into
// the LCD buffer. The test then watches two full scan frames of the
// seven-segment display and a complete LCD refresh pass, and checks the digits
// and text shown as well as the default timing: 50,000 clocks per digit slot,
// at least 750,000 clocks before the first LCD byte, at least 82,000 clocks
// after the clear command and 2,000 between other bytes.
module tb_seg_lcd_full;
  import seg_lcd_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  ahb_if bus (.HCLK(clk));

  logic [31:0] seg_data;
  logic [7:0]  seg_out1, seg_out2, lcd_data;
  logic [2:0]  seg_gnd1, seg_gnd2;
  logic [1:0]  cnt3, ahb_phase;
  logic        lcd_rs, lcd_rw, lcd_en, lcd_phase;
  int checks = 0, failures = 0;

  seg_lcd dut (
    .HCLK(clk), .HRESETn(rst_n), .HSEL(bus.HSEL), .HADDR(bus.HADDR), .HWRITE(bus.HWRITE),
    .HTRANS(bus.HTRANS), .HSIZE(bus.HSIZE), .HBURST(bus.HBURST), .HWDATA(bus.HWDATA),
    .HRDATA(bus.HRDATA), .HREADY(bus.HREADY), .HRESP(bus.HRESP),
    .seg_data, .seg_out1, .seg_out2, .seg_gnd1, .seg_gnd2, .cnt3,
    .lcd_data, .lcd_rs, .lcd_rw, .lcd_en, .lcd_phase, .ahb_phase
  );

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Seven-segment model: digit values and slot lengths seen.
  function automatic int unglyph(input logic [7:0] p);
    for (int v = 0; v < 16; v++) if (glyph(v) == p) return v;
    return -1;
  endfunction
  int shown [6];
  int unsigned slot_len = 0, n_slots = 0, bad_slots = 0;
  logic [2:0] gnd_q = 3'b111;
  always @(negedge clk) begin
    for (int k = 0; k < 3; k++) if (seg_gnd1 == ~(3'b001 << k)) begin
      shown[k]     = unglyph(seg_out1);
      shown[k + 3] = unglyph(seg_out2);
    end
    if (seg_gnd1 != gnd_q) begin
      if (gnd_q != 3'b111) begin
        n_slots++;
        if (slot_len != 50_000) bad_slots++;
      end
      slot_len = 0;
    end
    slot_len++;
    gnd_q = seg_gnd1;
  end

  // LCD model with timing measurement.
  logic [7:0] ddram [128];
  logic [6:0] ac = 0;
  logic en_q = 0;
  int unsigned cyc = 0, last_fall = 0, n_bytes = 0, n_pass = 0, short_gaps = 0;
  logic last_clear = 0;
  always @(posedge clk) begin
    cyc++;
    en_q <= lcd_en;
    if (rst_n && lcd_en && !en_q) begin
      if (n_bytes == 0) check(cyc >= 750_000, $sformatf("power-up wait %0d clocks", cyc));
      else if (cyc - last_fall < (last_clear ? 82_000 : 2_000)) short_gaps++;
    end
    if (rst_n && !lcd_en && en_q) begin
      n_bytes++;
      last_fall = cyc;
      last_clear = !lcd_rs && lcd_data == 8'h01;
      if (!lcd_rs) begin
        if (lcd_data == 8'h01) begin
          for (int i = 0; i < 128; i++) ddram[i] = 8'h20;
          ac = 0;
        end else if (lcd_data[7]) begin
          ac = lcd_data[6:0];
          if (lcd_data == 8'h80) n_pass++;
        end
      end else begin
        ddram[ac] = lcd_data;
        ac = ac + 1;
      end
    end
  end

  initial begin
    string l1, l2;
    logic [1:0] resp;
    int waits;
    logic [31:0] d;
    l1 = "Segment_LCD";
    l2 = "123456789";
    bus.idle();
    repeat (3) @(negedge clk);
    rst_n = 1;

    bus.write(32'h8, 32'h0012_3456, HSIZE_WORD, resp, waits);
    check(resp == HRESP_OKAY && waits == 0, "seven-segment write");
    for (int i = 0; i < 16; i++) begin
      bus.write(32'h80 + 4 * i, (i < l1.len()) ? 32'(l1[i]) : 32'h20, HSIZE_WORD, resp, waits);
      bus.write(32'hC0 + 4 * i, (i < l2.len()) ? 32'(l2[i]) : 32'h20, HSIZE_WORD, resp, waits);
    end
    bus.read(32'h8, d, resp, waits);
    check(d == 32'h0012_3456 && waits == 1, "seven-segment read-back");
    check(lcd_phase == 1'b0, "LCD still initialising");

    // Two full scan frames.
    for (int k = 0; k < 6; k++) shown[k] = -1;
    repeat (2 * 3 * 50_000 + 10) @(negedge clk);
    for (int k = 0; k < 6; k++)
      check(shown[k] == 6 - k,
            $sformatf("digit %0d shows %0d", k, shown[k]));
    check(n_slots >= 6 && bad_slots == 0, $sformatf("%0d slots, %0d not 50000 clocks", n_slots, bad_slots));

    // A complete LCD refresh pass.
    while (n_pass < 2) @(negedge clk);
    check(lcd_phase == 1'b1, "LCD refreshing");
    for (int i = 0; i < 16; i++) begin
      check(ddram[i] == ((i < l1.len()) ? l1[i] : 8'h20), $sformatf("line 1 char %0d", i));
      check(ddram[64 + i] == ((i < l2.len()) ? l2[i] : 8'h20), $sformatf("line 2 char %0d", i));
    end
    check(short_gaps == 0, $sformatf("%0d LCD bytes sent too early", short_gaps));
    $display("full size: %0d clocks, %0d LCD bytes, %0d digit slots", cyc, n_bytes, n_slots);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
