// tb_seg_lcd: end-to-end test of the Segment_LCD peripheral with short display
// timing. The bus functional model plays the part of the ARM922T program: it
// writes a decimal counter, digit by digit in BCD, into the seven-segment
// register and a two-line message into the text LCD buffer, reads both back,
// and issues a pipelined burst, a read directly followed by a write, reads of
// unmapped addresses and illegal (byte-size) transfers. A display model rebuilds
// the six digits from the scanned segment and select lines, and an LCD model
// rebuilds the two text lines from the bytes strobed into the LCD. Every
// mechanism of the design is counted and must have happened at least once.
module tb_seg_lcd;
  import seg_lcd_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned DIV = 4, PU = 30, EC = 2, CC = 4, CL = 12;

  logic clk = 0, rst_n = 0;
  ahb_if bus (.HCLK(clk));

  logic [31:0] seg_data;
  logic [7:0]  seg_out1, seg_out2, lcd_data;
  logic [2:0]  seg_gnd1, seg_gnd2;
  logic [1:0]  cnt3, ahb_phase;
  logic        lcd_rs, lcd_rw, lcd_en, lcd_phase;
  int checks = 0, failures = 0;

  seg_lcd #(.SCAN_DIV(DIV), .POWERUP_CYC(PU), .E_CYC(EC), .CMD_CYC(CC), .CLEAR_CYC(CL)) dut (
    .HCLK(clk), .HRESETn(rst_n), .HSEL(bus.HSEL), .HADDR(bus.HADDR), .HWRITE(bus.HWRITE),
    .HTRANS(bus.HTRANS), .HSIZE(bus.HSIZE), .HBURST(bus.HBURST), .HWDATA(bus.HWDATA),
    .HRDATA(bus.HRDATA), .HREADY(bus.HREADY), .HRESP(bus.HRESP),
    .seg_data, .seg_out1, .seg_out2, .seg_gnd1, .seg_gnd2, .cnt3,
    .lcd_data, .lcd_rs, .lcd_rw, .lcd_en, .lcd_phase, .ahb_phase
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // ---------------- mechanism counters ----------------
  int n_write = 0, n_read_wait = 0, n_error = 0, n_pipelined = 0, n_unmapped = 0;
  int n_scan_wrap = 0, n_lcd_init = 0, n_lcd_pass = 0, n_seg_shown = 0, n_lcd_shown = 0;

  // ---------------- seven-segment display model ----------------
  function automatic int unglyph(input logic [7:0] p);
    for (int v = 0; v < 16; v++) if (glyph(v) == p) return v;
    return -1;
  endfunction

  int shown [6];
  logic [2:0] gnd_q = 3'b111;
  always @(negedge clk) begin
    for (int k = 0; k < 3; k++) if (seg_gnd1 == ~(3'b001 << k)) begin
      shown[k]     = unglyph(seg_out1);
      shown[k + 3] = unglyph(seg_out2);
    end
    if (gnd_q == 3'b011 && seg_gnd1 == 3'b110) n_scan_wrap++;
    gnd_q = seg_gnd1;
  end

  // Wait for two whole scan frames and compare the digits seen with `bcd`.
  task automatic check_display(input logic [23:0] bcd);
    for (int k = 0; k < 6; k++) shown[k] = -1;
    repeat (2 * 3 * DIV + 4) @(negedge clk);
    for (int k = 0; k < 6; k++)
      check(shown[k] == int'(bcd[4*k +: 4]), $sformatf("digit %0d shows %0d, expected %0d",
            k, shown[k], bcd[4*k +: 4]));
    n_seg_shown++;
  endtask

  // ---------------- text LCD model ----------------
  logic [7:0] ddram [128];
  logic [6:0] ac = 0;
  logic en_q = 0;
  int n_lcd_bytes = 0;
  always @(posedge clk) begin
    en_q <= lcd_en;
    if (rst_n && !lcd_en && en_q) begin
      n_lcd_bytes++;
      if (!lcd_rs) begin
        if (lcd_data == 8'h01) begin
          for (int i = 0; i < 128; i++) ddram[i] = 8'h20;
          ac = 0;
          n_lcd_init++;
        end else if (lcd_data[7]) begin
          ac = lcd_data[6:0];
          if (lcd_data == 8'h80) n_lcd_pass++;
        end
      end else begin
        ddram[ac] = lcd_data;
        ac = ac + 1;
      end
    end
  end

  task automatic check_lcd(input string l1, input string l2);
    int p = n_lcd_pass;
    while (n_lcd_pass < p + 2) @(negedge clk);   // one full pass after the writes
    for (int i = 0; i < 16; i++) begin
      check(ddram[i] == ((i < l1.len()) ? l1[i] : 8'h20), $sformatf("line 1 char %0d", i));
      check(ddram[64 + i] == ((i < l2.len()) ? l2[i] : 8'h20), $sformatf("line 2 char %0d", i));
    end
    n_lcd_shown++;
  endtask

  // ---------------- bus helpers ----------------
  localparam logic [31:0] SEG_ADDR = 32'h0000_0008;
  localparam logic [31:0] LCD_ADDR = 32'h0000_0080;

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [1:0] resp;
    int waits;
    bus.write(a, d, HSIZE_WORD, resp, waits);
    check(resp == HRESP_OKAY && waits == 0, "write: OKAY, no wait state");
    n_write++;
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    logic [1:0] resp;
    int waits;
    bus.read(a, d, resp, waits);
    check(resp == HRESP_OKAY && waits == 1, "read: OKAY, one wait state");
    if (waits == 1) n_read_wait++;
  endtask

  task automatic write_text(input string l1, input string l2);
    for (int i = 0; i < 16; i++) begin
      wr(LCD_ADDR + 4 * i,        (i < l1.len()) ? 32'(l1[i]) : 32'h20);
      wr(LCD_ADDR + 4 * (16 + i), (i < l2.len()) ? 32'(l2[i]) : 32'h20);
    end
  endtask

  function automatic logic [23:0] to_bcd(input int unsigned v);
    logic [23:0] b;
    for (int k = 0; k < 6; k++) begin
      b[4*k +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return b;
  endfunction

  initial begin
    logic [31:0] d;
    logic [1:0] resp;
    int waits;
    bus.idle();
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(lcd_phase == 1'b0, "LCD starts initialising");

    // A counter on the seven-segment display.
    for (int unsigned v = 123456; v < 123461; v++) begin
      wr(SEG_ADDR, {8'h0, to_bcd(v)});
      rd(SEG_ADDR, d);
      check(d == {8'h0, to_bcd(v)}, "seven-segment register read-back");
      check(seg_data == {8'h0, to_bcd(v)}, "seg_data output");
      check_display(to_bcd(v));
    end

    // Text on the LCD, then read back.
    write_text("Segment_LCD", "SoC on Excalibur");
    for (int i = 0; i < 11; i++) begin
      rd(LCD_ADDR + 4 * i, d);
      check(d == 32'("Segment_LCD" >> (8 * (10 - i)) & 8'hFF), $sformatf("LCD char %0d read-back", i));
    end
    check_lcd("Segment_LCD", "SoC on Excalibur");
    check(lcd_phase == 1'b1, "LCD in refresh phase");

    // Pipelined burst into the seven-segment register (both words hit it).
    bus.write_burst2(SEG_ADDR, 32'h0011_1111, 32'h0098_7654, waits);
    check(waits == 0, "burst without wait states");
    @(negedge clk);
    check(seg_data == 32'h0098_7654, "burst: last beat wins");
    n_pipelined++;
    check_display(24'h98_7654);

    // Read immediately followed by a write into the LCD buffer.
    bus.read_then_write(SEG_ADDR, d, LCD_ADDR + 4 * 15, 32'h21, waits);
    check(d == 32'h0098_7654 && waits == 1, "read then write, pipelined");
    n_pipelined++;
    check_lcd("Segment_LCD    !", "SoC on Excalibur");

    // Unmapped addresses read as zero and ignore writes.
    wr(32'h0000_0040, 32'hFFFF_FFFF);
    rd(32'h0000_0040, d);
    check(d == 0, "unmapped read gives zero");
    rd(32'h0000_0000, d);
    check(d == 0, "unmapped read at 0 gives zero");
    n_unmapped++;
    check(seg_data == 32'h0098_7654, "unmapped write leaves registers alone");

    // Illegal transfer: byte write to the seven-segment register.
    bus.write(SEG_ADDR, 32'h0, 2'b00, resp, waits);
    check(resp == HRESP_ERROR && waits == 1, "byte write gets the two-cycle ERROR");
    if (resp == HRESP_ERROR) n_error++;
    @(negedge clk);
    check(seg_data == 32'h0098_7654, "errored write changes nothing");
    check_display(24'h98_7654);

    // Every mechanism must have happened.
    check(n_write > 0,      $sformatf("zero-wait writes: %0d", n_write));
    check(n_read_wait > 0,  $sformatf("reads with a wait state: %0d", n_read_wait));
    check(n_error > 0,      $sformatf("ERROR responses: %0d", n_error));
    check(n_pipelined > 0,  $sformatf("pipelined transfers: %0d", n_pipelined));
    check(n_unmapped > 0,   $sformatf("unmapped accesses: %0d", n_unmapped));
    check(n_scan_wrap > 0,  $sformatf("scan wraps: %0d", n_scan_wrap));
    check(n_lcd_init == 1,  $sformatf("LCD initialisations: %0d", n_lcd_init));
    check(n_lcd_pass > 0,   $sformatf("LCD refresh passes: %0d", n_lcd_pass));
    check(n_seg_shown > 0,  $sformatf("seven-segment values shown: %0d", n_seg_shown));
    check(n_lcd_shown > 0,  $sformatf("LCD texts shown: %0d", n_lcd_shown));
    $display("mechanisms: writes=%0d read_waits=%0d errors=%0d pipelined=%0d unmapped=%0d scan_wraps=%0d lcd_init=%0d lcd_passes=%0d",
             n_write, n_read_wait, n_error, n_pipelined, n_unmapped, n_scan_wrap, n_lcd_init, n_lcd_pass);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
