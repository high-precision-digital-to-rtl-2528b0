// tb_bufgce_model - checks the clock buffer with enable: O follows I in the periods
// whose enable was high before the rising edge, stays low otherwise, and a CE change
// in the middle of a high phase never cuts that pulse short.
`timescale 1ps / 1fs
module tb_bufgce_model;
  localparam real HALF = 1000.0;
  logic I = 1'b0, CE = 1'b0, O;
  int checks = 0, failures = 0;
  int pulses = 0;

  bufgce_model dut (.I(I), .CE(CE), .O(O));

  always #(HALF) I = ~I;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: I=%b CE=%b O=%b", what, $time, I, CE, O);
    end
  endtask

  initial begin
    #(10_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge O) pulses++;

  initial begin
    logic en, nxt;
    en = 1'b0;
    // Random enable pattern, changed just after each rising edge of I.
    for (int i = 0; i < 200; i++) begin
      @(posedge I);
      #100;
      // The enable seen by this high phase was set in the previous period.
      check(O == en, "O during high phase");
      nxt = 1'($urandom_range(0, 1));
      CE = nxt;
      #200;
      check(O == en, "CE change inside high phase has no effect yet");
      en = nxt;
      @(negedge I);
      #100;
      check(O == 1'b0, "O low while I low");
    end
    // A CE drop in the middle of a high phase must not shorten the pulse.
    CE = 1'b1;
    @(posedge I); @(posedge I);
    #500 CE = 1'b0;
    #400 check(O == 1'b1, "pulse kept after CE drop");
    @(posedge I) #100 check(O == 1'b0, "gated off next period");
    check(pulses > 50, "some pulses passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
