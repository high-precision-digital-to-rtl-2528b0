// tb_idelayctrl_model - checks that RDY is low during RST and for exactly
// LOCK_CYCLES (16) REFCLK periods afterwards, then stays high until the next RST.
`timescale 1ps / 1fs
module tb_idelayctrl_model;
  logic REFCLK = 1'b0, RST = 1'b1, RDY;
  int checks = 0, failures = 0;

  idelayctrl_model dut (.REFCLK(REFCLK), .RST(RST), .RDY(RDY));

  always #1666.667 REFCLK = ~REFCLK;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: RDY=%b", what, $time, RDY);
    end
  endtask

  initial begin
    #(10_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 3; pass++) begin
      RST = 1'b1;
      repeat (3) @(negedge REFCLK) check(RDY == 1'b0, "low in reset");
      RST = 1'b0;
      for (int i = 1; i <= 16; i++) begin
        @(negedge REFCLK);
        check(RDY == (i == 16), "lock after 16 periods");
      end
      repeat (20) @(negedge REFCLK) check(RDY == 1'b1, "stays ready");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
