// tb_nutt_dtc_full - the converter at its default size (25 coarse bits, 5 fine bits,
// 600 MHz CLK_IN, 300 MHz calibration clock, LSB = T_in / 32 = 52.083 ps).
//
// It runs the characterisation sweep d = 0 .. 1023 LSB, one request per code, and
// then the top of the range, d = 2^30 - 1 (coarse 2^25 - 1, fine 31: 55.9 ms), and
// checks every start_out -> asynchronous_out interval against d * T_in / 32 and the
// sweep's differential step against one LSB. The model is ideal, so the step error
// (the DNL of an ideal channel) must be zero to within the 1 fs time precision.
`timescale 1ps / 1fs
module tb_nutt_dtc_full;
  localparam real HALF = 833.333;
  localparam real TIN  = 2.0 * HALF;
  localparam real LSB  = TIN / 32.0;
  localparam real TOL  = 0.01;

  logic clk_in = 1'b0, rst = 1'b1, load = 1'b0;
  logic [24:0] coarse = '0;
  logic [4:0]  fine = '0;
  logic ready, accepted, clk0, start_out, sync_out, async_out;
  logic [4:0] tap;
  int checks = 0, failures = 0;
  realtime t_start, t_async, prev;
  int n_async = 0;
  real max_dnl = 0.0;

  nutt_dtc_top dut (
    .clk_in(clk_in), .rst(rst), .load(load), .coarse(coarse), .fine(fine),
    .ready(ready), .accepted(accepted), .clk0(clk0), .start_out(start_out),
    .synchronous_out(sync_out), .asynchronous_out(async_out), .tap(tap));

  always #(HALF) clk_in = ~clk_in;
  always @(posedge start_out) t_start = $realtime;
  always @(posedge async_out) begin t_async = $realtime; n_async++; end

  function automatic logic near(input realtime a, input realtime b);
    return (a - b < TOL) && (b - a < TOL);
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: coarse=%0d fine=%0d", what, $realtime, coarse, fine);
    end
  endtask

  initial begin
    #(64.0e9);   // 64 ms of simulated time
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input logic [29:0] d, output realtime meas);
    int a0;
    a0 = n_async;
    @(posedge clk0);
    #10;
    load = 1'b1; {coarse, fine} = d;
    @(posedge clk0);
    #10 load = 1'b0;
    wait (n_async == a0 + 1);
    meas = t_async - t_start;
    check(near(meas, real'(d) * LSB), "delay = d * LSB");
  endtask

  initial begin
    realtime m;
    repeat (4) @(posedge clk_in);
    #10 rst = 1'b0;
    wait (ready);
    for (int d = 0; d < 1024; d++) begin
      run_one(30'(d), m);
      if (d > 0) begin
        real dnl;
        dnl = (m - prev - LSB) / LSB;
        if (dnl < 0.0) dnl = -dnl;
        if (dnl > max_dnl) max_dnl = dnl;
        check(dnl < 1.0e-3, "step = 1 LSB");
      end
      prev = m;
    end
    $display("sweep 0..1023 LSB: max |DNL| = %f LSB", max_dnl);
    run_one('1, m);
    $display("full scale: d = 2^30-1 -> %0.3f ns", m / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
