// tb_nutt_dtc_top - end-to-end test of one converter channel at n = 8 coarse bits
// (600 MHz CLK_IN, 300 MHz calibration clock, 52.083 ps LSB).
//
// For each request d = {coarse, fine} it measures the time from the rising edge of
// start_out to the rising edge of asynchronous_out and checks it against
// d * T_in / 32, and the coarse and fine parts separately (start_out ->
// synchronous_out = coarse * T_in, synchronous_out -> asynchronous_out =
// fine * tap). It also checks the latency from the accepting clk0 edge to start_out
// (two clk0 periods) and that exactly one output pulse comes per request.
// Mechanisms forced and counted: requests refused until the IDELAYCTRL is ready,
// odd and even coarse values (the LSB lives in the clk180 domain), zero and full
// scale coarse and fine codes, a request that aborts a pending one, and the
// counter wrap that repeats the pulse 2^n T_in later.
`timescale 1ps / 1fs
module tb_nutt_dtc_top;
  localparam int  N    = 8;
  localparam real HALF = 833.333;
  localparam real TIN  = 2.0 * HALF;
  localparam real TAP  = 1.0e6 / (64.0 * 300.0);
  localparam real TOL  = 0.01;

  logic clk_in = 1'b0, rst = 1'b1, load = 1'b0;
  logic [N-1:0] coarse = '0;
  logic [4:0]   fine = '0;
  logic ready, accepted, clk0, start_out, sync_out, async_out;
  logic [4:0] tap;
  int checks = 0, failures = 0;
  realtime t_acc, t_start, t_sync, t_async;
  int n_start = 0, n_sync = 0, n_async = 0;
  int m_refused = 0, m_odd = 0, m_even = 0, m_c0 = 0, m_cmax = 0, m_f0 = 0, m_fmax = 0;
  int m_abort = 0, m_wrap = 0;

  nutt_dtc_top #(.N(N)) dut (
    .clk_in(clk_in), .rst(rst), .load(load), .coarse(coarse), .fine(fine),
    .ready(ready), .accepted(accepted), .clk0(clk0), .start_out(start_out),
    .synchronous_out(sync_out), .asynchronous_out(async_out), .tap(tap));

  always #(HALF) clk_in = ~clk_in;

  always @(posedge clk0) if (accepted) t_acc = $realtime;
  always @(posedge start_out) begin t_start = $realtime; n_start++; end
  always @(posedge sync_out)  begin t_sync  = $realtime; n_sync++;  end
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
    #(400_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Present a request for one clk0 edge.
  task automatic request(input logic [N-1:0] c, input logic [4:0] f);
    @(posedge clk0);
    #10;
    load = 1'b1; coarse = c; fine = f;
    @(posedge clk0);
    #10;
    load = 1'b0;
  endtask

  task automatic run_one(input logic [N-1:0] c, input logic [4:0] f, input bit wrap);
    int s0, y0, a0;
    s0 = n_start; y0 = n_sync; a0 = n_async;
    request(c, f);
    #(real'(c + 6) * TIN + 2500.0);
    check(n_start == s0 + 1 && n_sync == y0 + 1 && n_async == a0 + 1, "one pulse per request");
    check(near(t_start - t_acc, 2.0 * 2.0 * TIN), "start_out two clk0 periods after request");
    check(near(t_sync - t_start, real'(c) * TIN), "coarse delay c * T_in");
    check(near(t_async - t_sync, real'(f) * TAP), "fine delay f * tap");
    check(near(t_async - t_start, real'({c, f}) * TIN / 32.0), "total delay d * T_in / 32");
    if (c[0]) m_odd++; else m_even++;
    if (c == '0) m_c0++;
    if (c == '1) m_cmax++;
    if (f == '0) m_f0++;
    if (f == '1) m_fmax++;
    if (wrap) begin
      #(real'(1 << N) * TIN);
      check(n_async == a0 + 2 && near(t_async - t_start, real'(1 << N) * TIN + real'({c, f}) * TIN / 32.0),
            "pulse repeats after 2^n T_in");
      m_wrap++;
    end
  endtask

  initial begin
    int s0, a0;
    repeat (4) @(posedge clk_in);
    #10 rst = 1'b0;
    // Requests while the IDELAYCTRL is still locking are refused.
    @(posedge clk0) #10;
    load = 1'b1; coarse = N'(5); fine = 5'd3;
    while (!ready) begin
      @(posedge clk0);
      check(!accepted && n_start == 0, "refused while not ready");
      m_refused++;
      #10;
    end
    load = 1'b0;
    repeat (4) @(posedge clk0);
    check(n_start == 0 && n_async == 0, "no output before the first request");

    // Corners, then random codes.
    run_one('0, 5'd0, 1'b0);
    run_one('0, 5'd31, 1'b0);
    run_one('1, 5'd0, 1'b0);
    run_one('1, 5'd31, 1'b1);
    run_one(N'(1), 5'd1, 1'b0);
    run_one(N'(2), 5'd17, 1'b1);
    for (int i = 0; i < 150; i++)
      run_one(N'($urandom), 5'($urandom), (i % 40) == 7);

    // Abort: a second request before the first one's output arrives replaces it.
    s0 = n_start; a0 = n_async;
    request(N'(200), 5'd9);
    #(20.0 * TIN);
    check(n_async == a0, "first output still pending");
    run_one(N'(30), 5'd4, 1'b0);
    #(real'(200) * TIN);
    check(n_async == a0 + 1, "aborted request gives no output");
    m_abort++;

    check(m_refused > 0, "mechanism: refused while not ready");
    check(m_odd > 0 && m_even > 0, "mechanism: odd and even coarse");
    check(m_c0 > 0 && m_cmax > 0 && m_f0 > 0 && m_fmax > 0, "mechanism: code corners");
    check(m_abort > 0, "mechanism: abort");
    check(m_wrap > 0, "mechanism: counter wrap");
    $display("mechanisms: refused=%0d odd=%0d even=%0d c0=%0d cmax=%0d f0=%0d fmax=%0d abort=%0d wrap=%0d",
             m_refused, m_odd, m_even, m_c0, m_cmax, m_f0, m_fmax, m_abort, m_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
