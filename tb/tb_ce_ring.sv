// tb_ce_ring - checks the 2-bit circular buffer: after reset ce0 = 1 and ce180 = 0,
// then both toggle on every CLK_IN edge and always stay complementary; a second
// reset restores the 1/0 contents.
`timescale 1ps / 1fs
module tb_ce_ring;
  localparam real HALF = 833.333;
  logic clk_in = 1'b0, rst = 1'b1;
  logic ce0, ce180;
  int checks = 0, failures = 0;
  logic exp0;

  ce_ring dut (.clk_in(clk_in), .rst(rst), .ce0(ce0), .ce180(ce180));

  always #(HALF) clk_in = ~clk_in;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: ce0=%b ce180=%b", what, $time, ce0, ce180);
    end
  endtask

  initial begin
    #(100_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk_in);
    check(ce0 == 1'b1 && ce180 == 1'b0, "reset value");
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk_in) rst = 1'b0;
      exp0 = 1'b1;
      for (int i = 0; i < 40; i++) begin
        @(negedge clk_in);
        exp0 = ~exp0;
        check(ce0 == exp0, "ce0 toggles each period");
        check(ce180 == ~exp0, "ce180 is the complement");
      end
      rst = 1'b1;
      #1;
      check(ce0 == 1'b1 && ce180 == 1'b0, "async reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
