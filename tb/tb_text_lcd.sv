// tb_text_lcd: runs the text LCD controller with short timing constants. A
// monitor records every byte the controller strobes into the LCD (on the falling
// edge of lcd_en) and measures the enable pulse width and the pauses. The
// byte stream must be the four initialisation commands followed by endless
// refresh passes of the buffer; characters written through the local bus must
// appear in the next pass and read back unchanged.
module tb_text_lcd;
  import seg_lcd_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned PU = 40, EC = 3, CC = 6, CL = 25;

  logic clk = 0, reset_n = 0, write = 0;
  logic [9:2]  address = '0;
  logic [31:0] data = '0;
  logic [7:0]  rdata, lcd_data;
  logic        lcd_rs, lcd_rw, lcd_en;
  lcd_phase_t  phase;
  int checks = 0, failures = 0;

  text_lcd #(.POWERUP_CYC(PU), .E_CYC(EC), .CMD_CYC(CC), .CLEAR_CYC(CL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
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

  // Reference copy of the buffer and the monitor's record of LCD bytes.
  logic [7:0] text [32];
  logic [8:0] seen [$];
  int unsigned cyc = 0, en_rise = 0, last_fall = 0, n_bytes = 0;
  int unsigned init_bytes_in_init = 0;
  logic en_q = 0;
  logic [8:0] held;

  always @(posedge clk) begin
    cyc++;
    en_q <= lcd_en;
    if (reset_n) begin
      if (lcd_en && !en_q) begin
        en_rise = cyc;
        held = {lcd_rs, lcd_data};
        if (n_bytes < 4) check(phase == INIT_PHASE, "init phase during init commands");
        else check(phase == LCD_DATA_PHASE, "data phase during refresh");
        if (n_bytes == 0) check(cyc >= PU, "power-up wait before the first byte");
        else if (n_bytes == 4) check(cyc - last_fall >= CL, "pause after clear");
        else check(cyc - last_fall >= CC, "pause between bytes");
      end
      if (lcd_en) check({lcd_rs, lcd_data} == held, "rs/data stable while enable high");
      if (!lcd_en && en_q) begin
        check(cyc - en_rise == EC, $sformatf("enable pulse %0d clocks", cyc - en_rise));
        check(lcd_rw == 1'b0, "rw low");
        seen.push_back({lcd_rs, lcd_data});
        last_fall = cyc;
        n_bytes++;
      end
    end
  end

  task automatic bus_write(input logic [9:2] a, input logic [7:0] c);
    @(negedge clk);
    address = a; data = {24'hABCDEF, c}; write = 1;
    @(negedge clk);
    write = 0; address = 8'd0;
  endtask

  // Wait until the controller has just started a fresh pass and return its index.
  task automatic wait_pass_start(output int unsigned start);
    while (n_bytes < 4 || (n_bytes - 4) % 34 != 0) @(negedge clk);
    start = n_bytes;
  endtask

  task automatic check_pass(input int unsigned start);
    while (n_bytes < start + 34) @(negedge clk);
    for (int unsigned n = start; n < start + 34; n++)
      check(seen[n] == lcd_expect(n, text), $sformatf("byte %0d: got %h expected %h",
            n, seen[n], lcd_expect(n, text)));
  endtask

  initial begin
    int unsigned p;
    for (int i = 0; i < 32; i++) text[i] = 8'h20;
    repeat (3) @(negedge clk);
    reset_n = 1;
    check(phase == INIT_PHASE, "starts in init phase");
    while (n_bytes < 4) @(negedge clk);
    for (int unsigned n = 0; n < 4; n++)
      check(seen[n] == lcd_expect(n, text), $sformatf("init command %0d = %h", n, seen[n]));
    repeat (CL) @(negedge clk);
    check(phase == LCD_DATA_PHASE, "data phase after init");
    // First pass shows the reset contents (spaces).
    check_pass(4);

    // Write two lines of text, in scrambled order, and read them back.
    for (int i = 0; i < 32; i++) text[i] = 8'h41 + 8'(i);
    for (int i = 31; i >= 0; i--) bus_write(8'd32 + 8'(i), text[i]);
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); address = 8'd32 + 8'(i); #1;
      check(rdata == text[i], $sformatf("read back char %0d", i));
    end
    // A write outside the buffer window changes nothing.
    bus_write(8'd2, 8'h7E);
    bus_write(8'd64, 8'h7E);
    wait_pass_start(p);
    check_pass(p);

    // Random characters, written while the controller is busy; check the pass after.
    for (int i = 0; i < 8; i++) begin
      automatic int k = $urandom_range(31);
      text[k] = 8'($urandom_range(8'h7E, 8'h21));
      bus_write(8'd32 + 8'(k), text[k]);
    end
    wait_pass_start(p);
    check_pass(p);
    check(phase == LCD_DATA_PHASE, "stays in data phase");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
