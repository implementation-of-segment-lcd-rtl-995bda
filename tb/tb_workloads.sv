// tb_workloads: the two uses of the seven-segment display that the design is
// meant for, played through the AHB port with the processor's part done by the
// testbench, and the LCD showing a caption for each.
//   1. A watch: the time HH MM SS in BCD, advanced one second per step from
//      23:59:55 across midnight; after each step the six digits rebuilt from the
//      scanned outputs must read the new time.
//   2. A counter: the number 1, 12, 123, ... 123456789 built one decimal digit
//      at a time; the display shows its low six decimal digits.
// Short display timing is used so the test runs in well under a second.
module tb_workloads;
  import seg_lcd_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned DIV = 3;

  logic clk = 0, rst_n = 0;
  ahb_if bus (.HCLK(clk));

  logic [31:0] seg_data;
  logic [7:0]  seg_out1, seg_out2, lcd_data;
  logic [2:0]  seg_gnd1, seg_gnd2;
  logic [1:0]  cnt3, ahb_phase;
  logic        lcd_rs, lcd_rw, lcd_en, lcd_phase;
  int checks = 0, failures = 0;

  seg_lcd #(.SCAN_DIV(DIV), .POWERUP_CYC(20), .E_CYC(2), .CMD_CYC(3), .CLEAR_CYC(8)) dut (
    .HCLK(clk), .HRESETn(rst_n), .HSEL(bus.HSEL), .HADDR(bus.HADDR), .HWRITE(bus.HWRITE),
    .HTRANS(bus.HTRANS), .HSIZE(bus.HSIZE), .HBURST(bus.HBURST), .HWDATA(bus.HWDATA),
    .HRDATA(bus.HRDATA), .HREADY(bus.HREADY), .HRESP(bus.HRESP),
    .seg_data, .seg_out1, .seg_out2, .seg_gnd1, .seg_gnd2, .cnt3,
    .lcd_data, .lcd_rs, .lcd_rw, .lcd_en, .lcd_phase, .ahb_phase
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // Display model: the digit value last seen in each position.
  function automatic int unglyph(input logic [7:0] p);
    for (int v = 0; v < 16; v++) if (glyph(v) == p) return v;
    return -1;
  endfunction
  int shown [6];
  always @(negedge clk)
    for (int k = 0; k < 3; k++) if (seg_gnd1 == ~(3'b001 << k)) begin
      shown[k]     = unglyph(seg_out1);
      shown[k + 3] = unglyph(seg_out2);
    end

  // LCD model: first line only.
  logic [7:0] line1 [16];
  logic [6:0] ac = 0;
  logic en_q = 0;
  int n_pass = 0;
  always @(posedge clk) begin
    en_q <= lcd_en;
    if (rst_n && !lcd_en && en_q) begin
      if (!lcd_rs) begin
        if (lcd_data[7]) ac = lcd_data[6:0];
        if (lcd_data == 8'h80) n_pass++;
      end else begin
        if (ac < 16) line1[ac[3:0]] = lcd_data;
        ac = ac + 1;
      end
    end
  end

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [1:0] resp;
    int waits;
    bus.write(a, d, HSIZE_WORD, resp, waits);
    check(resp == HRESP_OKAY, "write OKAY");
  endtask

  task automatic caption(input string s);
    int p;
    for (int i = 0; i < 16; i++) wr(32'h80 + 4 * i, (i < s.len()) ? 32'(s[i]) : 32'h20);
    p = n_pass;
    while (n_pass < p + 2) @(negedge clk);
    for (int i = 0; i < 16; i++)
      check(line1[i] == ((i < s.len()) ? s[i] : 8'h20), $sformatf("caption char %0d", i));
  endtask

  task automatic show(input logic [23:0] bcd, input string what);
    wr(32'h8, {8'h0, bcd});
    for (int k = 0; k < 6; k++) shown[k] = -1;
    repeat (2 * 3 * DIV + 4) @(negedge clk);
    for (int k = 0; k < 6; k++)
      check(shown[k] == int'(bcd[4*k +: 4]), $sformatf("%s: digit %0d shows %0d, expected %0d",
            what, k, shown[k], bcd[4*k +: 4]));
  endtask

  function automatic logic [23:0] to_bcd(input longint unsigned v);
    logic [23:0] b;
    for (int k = 0; k < 6; k++) begin
      b[4*k +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return b;
  endfunction

  initial begin
    int h, m, s;
    longint unsigned top;
    bus.idle();
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. Watch across midnight.
    caption("Watch");
    h = 23; m = 59; s = 55;
    for (int step = 0; step < 8; step++) begin
      show({4'(h / 10), 4'(h % 10), 4'(m / 10), 4'(m % 10), 4'(s / 10), 4'(s % 10)},
           $sformatf("time %02d:%02d:%02d", h, m, s));
      s++;
      if (s == 60) begin s = 0; m++; end
      if (m == 60) begin m = 0; h++; end
      if (h == 24) h = 0;
    end

    // 2. Counter: top = top * 10 + k + 1 for k = 0..8.
    caption("Counter");
    top = 0;
    for (int k = 0; k < 9; k++) begin
      top = top * 10 + longint'(k + 1);
      show(to_bcd(top), $sformatf("count %0d", top));
    end
    check(seg_data == {8'h0, 24'h456789}, "counter ends showing 456789");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
