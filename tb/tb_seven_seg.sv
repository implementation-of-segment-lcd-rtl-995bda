// tb_seven_seg: writes the seven-segment data register directly through its
// local-bus pins and checks the read-back, the address decode, the reset value
// and the scanned outputs: every digit slot lasts SCAN_DIV clocks, the slots
// come in the order 0, 1, 2, exactly one digit of each group is selected (low),
// and each group carries the glyph of the selected digit's nibble.
module tb_seven_seg;
  import tb_ref_pkg::*;

  localparam int unsigned DIV = 5;

  logic clk = 0, reset_n = 0, enable_n = 1;
  logic [9:2]  address = '0;
  logic [31:0] data = '0;
  logic [31:0] seg_data;
  logic [7:0]  seg_out1, seg_out2;
  logic [2:0]  seg_gnd1, seg_gnd2;
  logic [1:0]  cnt3;
  int checks = 0, failures = 0;

  seven_seg #(.SCAN_DIV(DIV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic bus_write(input logic [9:2] a, input logic [31:0] d);
    @(negedge clk);
    address = a; data = d; enable_n = 0;
    @(negedge clk);
    enable_n = 1; data = $urandom;
  endtask

  function automatic int sel_index(input logic [2:0] gnd);
    case (gnd)
      3'b110: return 0;
      3'b101: return 1;
      3'b011: return 2;
      default: return -1;
    endcase
  endfunction

  // Watch the scan for a number of slots and check it against `value`.
  task automatic check_scan(input logic [31:0] value, input int slots);
    int idx, prev_idx, len;
    // align to the start of a slot
    @(negedge clk);
    prev_idx = sel_index(seg_gnd1);
    while (sel_index(seg_gnd1) == prev_idx) @(negedge clk);
    for (int s = 0; s < slots; s++) begin
      idx = sel_index(seg_gnd1);
      check(idx >= 0, "group 1 selects exactly one digit");
      check(seg_gnd2 == seg_gnd1, "group 2 select follows group 1");
      if (s > 0) check(idx == (prev_idx + 1) % 3, "slots in order 0,1,2");
      check(seg_out1 == glyph(value[4*idx +: 4]), $sformatf("group 1 digit %0d glyph", idx));
      check(seg_out2 == glyph(value[4*(idx+3) +: 4]), $sformatf("group 2 digit %0d glyph", idx + 3));
      len = 0;
      while (sel_index(seg_gnd1) == idx) begin
        len++;
        @(negedge clk);
      end
      check(len == DIV, $sformatf("slot length %0d, expected %0d", len, DIV));
      prev_idx = idx;
    end
  endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(negedge clk);
    check(seg_data == 32'h0, "register resets to zero");
    check(seg_gnd1 == 3'b111 && seg_gnd2 == 3'b111, "no digit selected in reset");
    reset_n = 1;
    check_scan(32'h0, 6);

    bus_write(8'd2, 32'h0065_4321);   // address[9:3] == 1
    check(seg_data == 32'h0065_4321, "write at word address 2");
    check_scan(32'h0065_4321, 7);

    bus_write(8'd3, 32'hFEDC_BA98);   // address[9:3] == 1 as well
    check(seg_data == 32'hFEDC_BA98, "write at word address 3");
    check_scan(32'hFEDC_BA98, 7);

    // Writes elsewhere are ignored.
    bus_write(8'd0, 32'h1111_1111);
    bus_write(8'd4, 32'h2222_2222);
    bus_write(8'd34, 32'h3333_3333);
    check(seg_data == 32'hFEDC_BA98, "writes outside address[9:3]==1 ignored");

    // An address match without the enable writes nothing.
    @(negedge clk); address = 8'd2; data = 32'h5555_5555;
    repeat (3) @(negedge clk);
    check(seg_data == 32'hFEDC_BA98, "no write without enable_n");

    for (int i = 0; i < 4; i++) begin
      v = $urandom;
      bus_write(8'd2 + 8'(i & 1), v);
      check(seg_data == v, "random write read-back");
      check_scan(v, 4);
    end

    // Asynchronous reset clears the register.
    #2 reset_n = 0; #1;
    check(seg_data == 0, "asynchronous reset");
    @(negedge clk); reset_n = 1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
