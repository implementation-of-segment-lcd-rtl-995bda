// ahb_if: AHB signal bundle with a simple single-master bus functional model for
// the testbenches. The master drives on the falling clock edge and looks at the
// slave's HREADY/HRESP/HRDATA just before each rising edge, so an address phase
// completes at the first rising edge with HREADY high and its data phase at the
// next. Each task reports the response and the number of wait states (data-phase
// cycles with HREADY low).
interface ahb_if (input logic HCLK);
  logic        HSEL;
  logic [31:0] HADDR;
  logic        HWRITE;
  logic [1:0]  HTRANS;
  logic [1:0]  HSIZE;
  logic [2:0]  HBURST;
  logic [31:0] HWDATA;
  logic [31:0] HRDATA;
  logic        HREADY;
  logic [1:0]  HRESP;

  task automatic idle();
    HSEL = 1'b1; HADDR = '0; HWRITE = 1'b0; HTRANS = 2'b00;
    HSIZE = 2'b10; HBURST = 3'b000; HWDATA = '0;
  endtask

  task automatic addr_phase(input logic [31:0] a, input logic wr, input logic [1:0] size,
                            input logic [1:0] trans);
    HADDR = a; HWRITE = wr; HSIZE = size; HTRANS = trans;
    while (!HREADY) @(negedge HCLK);
    @(negedge HCLK);
  endtask

  // Completes the current data phase; returns waits and response seen.
  task automatic data_phase(output int waits, output logic [1:0] resp, output logic [31:0] rd);
    waits = 0;
    while (!HREADY) begin
      waits++;
      @(negedge HCLK);
    end
    resp = HRESP;
    rd   = HRDATA;
  endtask

  task automatic write(input logic [31:0] a, input logic [31:0] d, input logic [1:0] size,
                       output logic [1:0] resp, output int waits);
    logic [31:0] rd;
    @(negedge HCLK);
    addr_phase(a, 1'b1, size, 2'b10);
    HTRANS = 2'b00; HWDATA = d;
    data_phase(waits, resp, rd);
  endtask

  task automatic read(input logic [31:0] a, output logic [31:0] d,
                      output logic [1:0] resp, output int waits);
    @(negedge HCLK);
    addr_phase(a, 1'b0, 2'b10, 2'b10);
    HTRANS = 2'b00;
    data_phase(waits, resp, d);
  endtask

  // Two-beat incrementing burst of writes (NONSEQ then SEQ), address and data
  // phases overlapped.
  task automatic write_burst2(input logic [31:0] a, input logic [31:0] d0, input logic [31:0] d1,
                              output int waits);
    int w0, w1;
    logic [1:0] r;
    logic [31:0] rd;
    @(negedge HCLK);
    HBURST = 3'b001;  // INCR, two beats
    addr_phase(a, 1'b1, 2'b10, 2'b10);
    HWDATA = d0;
    HADDR = a + 4; HTRANS = 2'b11;
    data_phase(w0, r, rd);
    @(negedge HCLK);
    HTRANS = 2'b00; HWDATA = d1; HBURST = 3'b000;
    data_phase(w1, r, rd);
    waits = w0 + w1;
  endtask

  // A read immediately followed by a write in the read's data phase.
  task automatic read_then_write(input logic [31:0] ra, output logic [31:0] d,
                                 input logic [31:0] wa, input logic [31:0] wd,
                                 output int waits);
    int w0, w1;
    logic [1:0] r;
    logic [31:0] rd;
    @(negedge HCLK);
    addr_phase(ra, 1'b0, 2'b10, 2'b10);
    HADDR = wa; HWRITE = 1'b1; HTRANS = 2'b10;
    // the write's address phase waits for the read's data phase to end
    data_phase(w0, r, d);
    @(negedge HCLK);
    HTRANS = 2'b00; HWDATA = wd;
    data_phase(w1, r, rd);
    waits = w0 + w1;
  endtask
endinterface
