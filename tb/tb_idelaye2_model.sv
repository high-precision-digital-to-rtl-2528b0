// tb_idelaye2_model - checks the delay-line model at a 300 MHz reference (tap
// 52.083 ps) and a 200 MHz one (tap 78.125 ps): the delay of every tap code loaded
// with LD, that short pulses pass unchanged, CE/INC stepping with 32-tap
// wraparound, REGRST, and CNTVALUEOUT.
`timescale 1ps / 1fs
module tb_idelaye2_model;
  localparam real TOL = 0.01;
  logic C = 1'b0, CE = 1'b0, INC = 1'b0, LD = 1'b0, REGRST = 1'b0;
  logic [4:0] cin = '0;
  logic din = 1'b0;
  logic [4:0] cout300, cout200;
  logic dout300, dout200;
  int checks = 0, failures = 0;
  realtime t_in, t300, t200, f300;

  idelaye2_model #(.REFCLK_FREQUENCY(300.0), .IDELAY_VALUE(3)) dut300 (
    .C(C), .CE(CE), .INC(INC), .LD(LD), .LDPIPEEN(1'b0), .REGRST(REGRST), .CINVCTRL(1'b0),
    .CNTVALUEIN(cin), .DATAIN(din), .IDATAIN(1'b0), .CNTVALUEOUT(cout300), .DATAOUT(dout300));
  idelaye2_model #(.REFCLK_FREQUENCY(200.0), .DELAY_SRC("IDATAIN")) dut200 (
    .C(C), .CE(CE), .INC(INC), .LD(LD), .LDPIPEEN(1'b0), .REGRST(REGRST), .CINVCTRL(1'b0),
    .CNTVALUEIN(cin), .DATAIN(1'b0), .IDATAIN(din), .CNTVALUEOUT(cout200), .DATAOUT(dout200));

  always #1666.667 C = ~C;
  always @(posedge dout300) t300 = $realtime;
  always @(negedge dout300) f300 = $realtime;
  always @(posedge dout200) t200 = $realtime;

  function automatic logic near(input realtime a, input realtime b);
    return (a - b < TOL) && (b - a < TOL);
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: cout300=%0d cout200=%0d", what, $realtime, cout300, cout200);
    end
  endtask

  task automatic pulse_and_measure(input int tap);
    #3000;
    t_in = $realtime;
    din = 1'b1;
    #300 din = 1'b0;
    #3000;
    check(near(t300 - t_in, real'(tap) * 1.0e6 / 19200.0), "300 MHz tap delay");
    check(near(t200 - t_in, real'(tap) * 78.125), "200 MHz tap delay");
    check(near(f300 - t300, 300.0), "pulse width kept");
  endtask

  initial begin
    #(50_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(cout300 == 5'd3 && cout200 == 5'd0, "IDELAY_VALUE after configuration");
    for (int t = 0; t < 32; t++) begin
      @(negedge C) begin cin = 5'(t); LD = 1'b1; end
      @(negedge C) LD = 1'b0;
      check(cout300 == 5'(t) && cout200 == 5'(t), "LD loads CNTVALUEIN");
      pulse_and_measure(t);
    end
    // Increment from 31 wraps to 0; decrement from 0 wraps to 31.
    @(negedge C) begin CE = 1'b1; INC = 1'b1; end
    @(negedge C) CE = 1'b0;
    check(cout300 == 5'd0, "increment wraps 31 -> 0");
    pulse_and_measure(0);
    @(negedge C) begin CE = 1'b1; INC = 1'b0; end
    @(negedge C) CE = 1'b0;
    check(cout300 == 5'd31, "decrement wraps 0 -> 31");
    pulse_and_measure(31);
    @(negedge C) begin CE = 1'b1; INC = 1'b0; end
    repeat (4) @(negedge C);
    CE = 1'b0;
    check(cout300 == 5'd27, "CE steps once per edge");
    @(negedge C) REGRST = 1'b1;
    @(negedge C) REGRST = 1'b0;
    check(cout300 == 5'd3 && cout200 == 5'd0, "REGRST reloads IDELAY_VALUE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
