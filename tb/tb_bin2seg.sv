// tb_bin2seg: applies every digit value to bin2seg and checks the registered
// segment pattern, one clock later, against the glyph table of tb_ref_pkg.
module tb_bin2seg;
  import tb_ref_pkg::*;

  logic clk = 0;
  logic [3:0] bin;
  logic [7:0] seg;
  int checks = 0, failures = 0;

  bin2seg dut (.clk, .bin, .seg);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bin = 4'd0;
    @(negedge clk);
    for (int r = 0; r < 2; r++) begin
      for (int v = 0; v < 16; v++) begin
        bin = 4'(v);
        @(posedge clk); #1;
        checks++;
        if (seg !== glyph(v)) begin
          failures++;
          $display("FAIL value %0d: seg=%b expected %b", v, seg, glyph(v));
        end
        // Registered: the pattern must not follow a change before the next edge.
        @(negedge clk);
        bin = 4'(v + 1);
        #1;
        checks++;
        if (seg !== glyph(v)) begin
          failures++;
          $display("FAIL value %0d: output changed before the clock", v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
