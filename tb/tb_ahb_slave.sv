// tb_ahb_slave: drives the AHB slave state machine from the bus functional model
// in ahb_if, with a 256-word register file behind its local bus. It checks that
// writes reach the local bus once, with the right address and data; that reads
// return what was written, after exactly one wait state, while writes take none;
// that pipelined bursts and a read followed at once by a write work; that a
// non-word or unaligned transfer gets the two-cycle ERROR response and no write;
// and that IDLE transfers and transfers without HSEL do nothing.
module tb_ahb_slave;
  import seg_lcd_pkg::*;

  logic clk = 0, rst_n = 0;
  ahb_if bus (.HCLK(clk));

  logic [9:2]  slave_address;
  logic        write;
  logic [31:0] wdata, rdata;
  ahb_state_t  state;
  int checks = 0, failures = 0;

  ahb_slave dut (
    .HCLK(clk), .HRESETn(rst_n), .HSEL(bus.HSEL), .HADDR(bus.HADDR), .HWRITE(bus.HWRITE),
    .HTRANS(bus.HTRANS), .HSIZE(bus.HSIZE), .HBURST(bus.HBURST), .HWDATA(bus.HWDATA),
    .HRDATA(bus.HRDATA), .HREADY(bus.HREADY), .HRESP(bus.HRESP),
    .slave_address, .write, .wdata, .rdata, .state
  );

  always #5 clk = ~clk;

  // Register file on the local bus and a log of the writes it received.
  logic [31:0] regs [256];
  int n_writes = 0;
  logic [9:2] last_waddr;
  logic [31:0] last_wdata;
  assign rdata = regs[slave_address];
  always @(posedge clk) if (write) begin
    regs[slave_address] <= wdata;
    n_writes++;
    last_waddr = slave_address;
    last_wdata = wdata;
  end

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

  logic [31:0] model [256];

  initial begin
    logic [1:0] resp;
    logic [31:0] d;
    int waits, nw;
    logic [9:2] a;
    for (int i = 0; i < 256; i++) begin regs[i] = 0; model[i] = 0; end
    bus.idle();
    repeat (3) @(negedge clk);
    check(bus.HREADY == 1'b1 && bus.HRESP == HRESP_OKAY, "idle: HREADY high, OKAY");
    rst_n = 1;

    // Single writes and reads.
    for (int i = 0; i < 40; i++) begin
      a = 8'($urandom);
      d = $urandom;
      nw = n_writes;
      bus.write({22'($urandom), a, 2'b00}, d, HSIZE_WORD, resp, waits);
      @(negedge clk);
      model[a] = d;
      check(resp == HRESP_OKAY, "write OKAY");
      check(waits == 0, $sformatf("write took %0d wait states, expected 0", waits));
      check(n_writes == nw + 1, "exactly one local write per AHB write");
      check(last_waddr == a && last_wdata == d, "local write address and data");
    end
    for (int i = 0; i < 256; i++) if (model[i] != 0) begin
      bus.read({22'h0, 8'(i), 2'b00}, d, resp, waits);
      check(resp == HRESP_OKAY, "read OKAY");
      check(waits == 1, $sformatf("read took %0d wait states, expected 1", waits));
      check(d == model[i], $sformatf("read word %0d: %h expected %h", i, d, model[i]));
    end

    // Pipelined burst of two writes.
    nw = n_writes;
    bus.write_burst2(32'h0000_0100, 32'hCAFE_0001, 32'hCAFE_0002, waits);
    @(negedge clk);
    model[64] = 32'hCAFE_0001; model[65] = 32'hCAFE_0002;
    check(waits == 0, "burst writes without wait states");
    check(n_writes == nw + 2, "burst gives two local writes");
    check(regs[64] == 32'hCAFE_0001 && regs[65] == 32'hCAFE_0002, "burst data in place");

    // Read followed at once by a write.
    bus.read_then_write(32'h0000_0100, d, 32'h0000_0108, 32'h1234_5678, waits);
    @(negedge clk);
    model[66] = 32'h1234_5678;
    check(d == 32'hCAFE_0001, "pipelined read data");
    check(waits == 1, "pipelined read/write: one wait state in total");
    check(regs[66] == 32'h1234_5678, "pipelined write after read");

    // ERROR response: byte and half-word transfers, unaligned word.
    for (int k = 0; k < 3; k++) begin
      automatic logic [1:0] sz = (k == 0) ? 2'b00 : (k == 1) ? 2'b01 : HSIZE_WORD;
      automatic logic [31:0] ad = (k == 2) ? 32'h0000_0012 : 32'h0000_0010;
      nw = n_writes;
      @(negedge clk);
      bus.addr_phase(ad, 1'b1, sz, 2'b10);
      bus.HTRANS = 2'b00; bus.HWDATA = 32'hDEAD_BEEF;
      check(bus.HREADY == 1'b0 && bus.HRESP == HRESP_ERROR, "ERROR first cycle: HREADY low");
      @(negedge clk);
      check(bus.HREADY == 1'b1 && bus.HRESP == HRESP_ERROR, "ERROR second cycle: HREADY high");
      @(negedge clk);
      check(bus.HREADY == 1'b1 && bus.HRESP == HRESP_OKAY, "back to OKAY");
      check(n_writes == nw, "no local write on ERROR");
    end

    // IDLE and BUSY transfers, and HSEL low: no action, zero-wait OKAY.
    nw = n_writes;
    @(negedge clk);
    bus.HADDR = 32'h0000_0020; bus.HWRITE = 1'b1; bus.HTRANS = 2'b00;
    @(negedge clk);
    check(bus.HREADY && bus.HRESP == HRESP_OKAY, "IDLE gets OKAY");
    bus.HTRANS = 2'b01;
    @(negedge clk);
    check(bus.HREADY && bus.HRESP == HRESP_OKAY, "BUSY gets OKAY");
    bus.HSEL = 1'b0; bus.HTRANS = 2'b10;
    @(negedge clk);
    bus.HWDATA = 32'h0BAD_0BAD;
    check(bus.HREADY && bus.HRESP == HRESP_OKAY, "unselected gets OKAY");
    @(negedge clk);
    bus.idle();
    @(negedge clk);
    check(n_writes == nw, "no local write for IDLE, BUSY or HSEL low");

    // Everything written is still there.
    for (int i = 0; i < 256; i++) check(regs[i] == model[i], $sformatf("word %0d intact", i));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
