// ahb_slave: AHB slave state machine in front of the display registers.
//
// The Excalibur stripe reaches logic in the PLD through its AHB master port; this
// block is the slave on that port. It samples each transfer in its address phase
// and turns it into an access on a simple local bus: a word address
// slave_address[9:2], a one-cycle write strobe with write data, and read data
// returned combinationally by the peripherals for the current slave_address.
//
// The four states carry the names of the schematic's parameter table:
//   ADDRESS_PHASE    idle, HREADY high, HRESP OKAY; samples a new transfer.
//   DATA_PHASE       data phase of an accepted transfer, HREADY high. A write
//                    pulses `write` with wdata = HWDATA in this cycle, so the
//                    peripheral register loads on the clock edge that ends it.
//                    A new transfer can be sampled in the same cycle (pipelining).
//   READ_WAIT_PHASE  one wait state of a read (HREADY low): rdata for the latched
//                    address is registered into HRDATA, which is then valid in
//                    the following DATA_PHASE.
//   ERROR_PHASE      first cycle of the two-cycle AHB ERROR response (HREADY low,
//                    HRESP ERROR); the second cycle is a DATA_PHASE with HRESP
//                    ERROR and HREADY high. A transfer gets an ERROR response when
//                    it is not a 32-bit word (HSIZE) or its address is not word
//                    aligned.
// A transfer is accepted when HSEL is high, HTRANS is NONSEQ or SEQ and the slave
// is in ADDRESS_PHASE or DATA_PHASE (HREADY high). IDLE and BUSY transfers get a
// zero-wait OKAY. HBURST is accepted and ignored: each beat is handled on its own.
// Writes take no wait state, reads one. HRESP[1] is always 0 (no RETRY or
// SPLIT), and wdata is HWDATA itself, since the write strobe falls in the data
// phase where HWDATA is valid.
//
// The original design gives this block's ports (HSEL, HADDR, HWDATA, HWRITE,
// HTRANS, HSIZE, HBURST, HRESETn, HCLK in; HRDATA, HREADY, HRESP and the local
// address, write, data and clock out) and the four state names; the transitions,
// the state encoding and the error conditions are this design's choices, made to
// follow the AMBA AHB rules.
module ahb_slave
  import seg_lcd_pkg::*;
(
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        HSEL,
  input  logic [31:0] HADDR,
  input  logic        HWRITE,
  input  logic [1:0]  HTRANS,
  input  logic [1:0]  HSIZE,
  input  logic [2:0]  HBURST,
  input  logic [31:0] HWDATA,
  output logic [31:0] HRDATA,
  output logic        HREADY,
  output logic [1:0]  HRESP,
  // local bus
  output logic [9:2]  slave_address,
  output logic        write,
  output logic [31:0] wdata,
  input  logic [31:0] rdata,
  output ahb_state_t  state
);

  logic accept, bad, wr_pending, err_resp;

  assign HREADY = (state == ADDRESS_PHASE) || (state == DATA_PHASE);
  assign accept = HREADY && HSEL && HTRANS[1];
  assign bad    = (HSIZE != HSIZE_WORD) || (HADDR[1:0] != 2'b00);

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      state         <= ADDRESS_PHASE;
      slave_address <= '0;
      wr_pending    <= 1'b0;
      err_resp      <= 1'b0;
      HRDATA        <= '0;
    end else begin
      unique case (state)
        ADDRESS_PHASE, DATA_PHASE: begin
          err_resp   <= 1'b0;
          wr_pending <= 1'b0;
          if (accept) begin
            slave_address <= HADDR[9:2];
            if (bad) begin
              state <= ERROR_PHASE;
            end else if (HWRITE) begin
              wr_pending <= 1'b1;
              state      <= DATA_PHASE;
            end else begin
              state <= READ_WAIT_PHASE;
            end
          end else begin
            state <= ADDRESS_PHASE;
          end
        end
        READ_WAIT_PHASE: begin
          HRDATA <= rdata;
          state  <= DATA_PHASE;
        end
        ERROR_PHASE: begin
          err_resp <= 1'b1;
          state    <= DATA_PHASE;
        end
      endcase
    end
  end

  assign HRESP = (state == ERROR_PHASE || err_resp) ? HRESP_ERROR : HRESP_OKAY;
  assign write = (state == DATA_PHASE) && wr_pending;
  assign wdata = HWDATA;

  // AHB rules for the response.
  a_error_two_cycles: assert property (@(posedge HCLK) disable iff (!HRESETn)
    state == ERROR_PHASE |=> HREADY && HRESP == HRESP_ERROR);
  a_wait_is_okay_or_error: assert property (@(posedge HCLK) disable iff (!HRESETn)
    !HREADY |-> (HRESP == HRESP_OKAY || HRESP == HRESP_ERROR));
  a_write_only_in_data_phase: assert property (@(posedge HCLK) disable iff (!HRESETn)
    write |-> state == DATA_PHASE && HREADY);

endmodule
