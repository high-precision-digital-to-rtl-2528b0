// tb_dtc_control - checks the control logic at n = 8, cycle by cycle on clk0.
//
// Checked: requests are ignored while `ready` is low; `start` is held high while idle
// and after reset; a request taken at edge k sets th = {c[n-1:1], c[1]^c[0]} and
// cntvalue = fine at edge k, pulses `ld` for the period after edge k, drops `start`
// at edge k+1 and raises start_out at edge k+2 for one period; a request taken on the
// edge after another keeps `start` high one more period and delays start_out.
`timescale 1ps / 1fs
module tb_dtc_control;
  localparam int N = 8;
  logic clk0 = 1'b0, rst = 1'b1, ready = 1'b0, load = 1'b0;
  logic [N-1:0] coarse = '0;
  logic [4:0]   fine = '0;
  logic [N-1:0] th;
  logic [4:0]   cntvalue;
  logic ld, start, start_out, accepted;
  int checks = 0, failures = 0;
  int n_abort = 0, n_reject = 0;

  dtc_control #(.N(N)) dut (
    .clk0(clk0), .rst(rst), .ready(ready), .load(load), .coarse(coarse), .fine(fine),
    .th(th), .cntvalue(cntvalue), .ld(ld), .start(start), .start_out(start_out),
    .accepted(accepted));

  always #1000 clk0 = ~clk0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: th=%h cnt=%0d ld=%b start=%b start_out=%b", what, $time,
               th, cntvalue, ld, start, start_out);
    end
  endtask

  initial begin
    #(50_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sample just after the edge (outputs of edge k), drive for edge k+1.
  task automatic tick;
    @(posedge clk0);
    #10;
  endtask

  initial begin
    logic [N-1:0] c, exp_th;
    logic [4:0] f;
    repeat (2) tick();
    rst = 1'b0;
    // Not ready: request ignored.
    load = 1'b1; coarse = 8'h55; fine = 5'd9;
    tick();
    check(th == '0 && ld == 1'b0 && start == 1'b1 && start_out == 1'b0, "request ignored while not ready");
    n_reject++;
    load = 1'b0; ready = 1'b1;
    tick();
    check(start == 1'b1, "start held while idle");
    for (int i = 0; i < 200; i++) begin
      c = N'($urandom);
      f = 5'($urandom);
      exp_th = {c[N-1:1], c[1] ^ c[0]};
      load = 1'b1; coarse = c; fine = f;
      tick();                                    // edge k
      load = 1'b0; coarse = N'($urandom); fine = 5'($urandom);
      check(th == exp_th, "threshold encoding");
      check(cntvalue == f, "fine code registered");
      check(ld == 1'b1 && start == 1'b1 && start_out == 1'b0, "edge k: ld and start");
      if (i % 10 == 5) begin                     // second request on edge k+1
        c = N'($urandom);
        exp_th = {c[N-1:1], c[1] ^ c[0]};
        load = 1'b1; coarse = c;
        tick();
        load = 1'b0;
        check(th == exp_th && start == 1'b1 && start_out == 1'b0, "abort: new threshold, start kept");
        n_abort++;
      end
      tick();                                    // edge k+1
      check(ld == 1'b0 && start == 1'b0 && start_out == 1'b0, "edge k+1: start falls");
      tick();                                    // edge k+2
      check(start_out == 1'b1 && start == 1'b0, "edge k+2: start_out");
      check(th == exp_th, "threshold held");
      tick();                                    // edge k+3
      check(start_out == 1'b0, "start_out one period");
      repeat ($urandom_range(0, 3)) begin
        tick();
        check(start == 1'b0 && start_out == 1'b0 && ld == 1'b0, "quiet while delay runs");
      end
    end
    check(n_abort > 0 && n_reject > 0, "abort and reject exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
