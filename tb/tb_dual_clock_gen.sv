// tb_dual_clock_gen - checks the divider: clk0 and clk180 each rise every second
// CLK_IN period, stay high for half a CLK_IN period (25% duty), and clk180 rises
// exactly one CLK_IN period after clk0 (180 degrees of the divided clock).
`timescale 1ps / 1fs
module tb_dual_clock_gen;
  localparam real HALF = 833.333;
  localparam real TIN  = 2.0 * HALF;
  localparam real TOL  = 0.01;
  logic clk_in = 1'b0, rst = 1'b1;
  logic clk0, clk180;
  int checks = 0, failures = 0;
  realtime r0 = -1.0, r180 = -1.0, f0 = -1.0;
  int n0 = 0, n180 = 0;

  dual_clock_gen dut (.clk_in(clk_in), .rst(rst), .clk0(clk0), .clk180(clk180));

  always #(HALF) clk_in = ~clk_in;

  function automatic logic near(input realtime a, input realtime b);
    return (a - b < TOL) && (b - a < TOL);
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  initial begin
    #(100_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk0) if (!rst) begin
    if (r0 >= 0.0) check(near($realtime - r0, 2.0 * TIN), "clk0 period = 2 T_in");
    if (r180 >= 0.0) check(near($realtime - r180, TIN), "clk0 one T_in after clk180");
    r0 = $realtime;
    n0++;
  end
  always @(negedge clk0) if (!rst && r0 >= 0.0) check(near($realtime - r0, HALF), "clk0 high T_in/2");
  always @(posedge clk180) if (!rst) begin
    if (r180 >= 0.0) check(near($realtime - r180, 2.0 * TIN), "clk180 period = 2 T_in");
    check(r0 >= 0.0 && near($realtime - r0, TIN), "clk180 one T_in after clk0");
    r180 = $realtime;
    n180++;
  end
  always @(negedge clk180) if (!rst && r180 >= 0.0) check(near($realtime - r180, HALF), "clk180 high T_in/2");

  initial begin
    repeat (4) @(negedge clk_in);
    rst = 1'b0;
    repeat (200) @(posedge clk_in);
    #1 check(n0 == 100 && n180 == 100, "100 edges of each clock in 200 CLK_IN periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
