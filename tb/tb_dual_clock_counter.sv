// tb_dual_clock_counter - checks the dual-clock coarse counter at n = 6.
//
// The testbench makes the two f_in/2 clocks itself (clk0 rising at odd, clk180 at
// even multiples of T_in). For every threshold th it restarts the counter with a
// one-clk0-period `start` pulse and measures when synchronous_out rises, counted from
// the last clk0 edge that saw `start`. The expected slot comes from a reference walk
// over the clock edges: count_l toggles on clk180, count_h increments on clk0, and
// the output follows the slot in which (count_h, count_l) equals th by 2 T_in. It also
// checks the pulse width (one T_in), that all 2^n thresholds give distinct delays,
// that no pulse comes between restart and the expected time, that the pulse repeats
// 2^n T_in later (counter wrap), and that a restart cuts a pending delay.
`timescale 1ps / 1fs
module tb_dual_clock_counter;
  localparam int N = 6;
  localparam real TIN = 1000.0;
  localparam real TOL = 0.01;
  logic clk0 = 1'b0, clk180 = 1'b0, rst = 1'b1, start = 1'b0;
  logic [N-1:0] th = '0;
  logic sync_out;
  int checks = 0, failures = 0;
  realtime t0, t_rise, t_fall;
  int n_rise = 0;
  bit seen [int];
  int wraps = 0;

  dual_clock_counter #(.N(N)) dut (
    .clk0(clk0), .clk180(clk180), .rst(rst), .start(start), .th(th),
    .synchronous_out(sync_out));

  // clk0 rises at (2k+1)*TIN, clk180 at 2k*TIN, both high for TIN/2.
  initial begin
    #(TIN);
    forever begin
      clk0 = 1'b1; #(TIN / 2.0); clk0 = 1'b0; #(TIN / 2.0);
      #(TIN);
    end
  end
  initial begin
    #(2.0 * TIN);
    forever begin
      clk180 = 1'b1; #(TIN / 2.0); clk180 = 1'b0; #(TIN / 2.0);
      #(TIN);
    end
  end

  always @(posedge sync_out) begin t_rise = $realtime; n_rise++; end
  always @(negedge sync_out) t_fall = $realtime;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (th=%0d)", what, $realtime, th);
    end
  endtask

  // Reference: slot index at which (h, l) == th after a restart. Slot 0 starts at
  // the restarting clk0 edge with h = 0, l = 0; even slots end with a clk180 edge
  // (l toggles), odd slots with a clk0 edge (h increments).
  function automatic int ref_slot(input logic [N-1:0] t);
    int h = 0;
    int l = 0;
    for (int s = 0; s < (1 << N); s++) begin
      if (h == int'(t[N-1:1]) && l == int'(t[0])) return s;
      if (s % 2 == 0) l = 1 - l;
      else h = (h + 1) % (1 << (N - 1));
    end
    return -1;
  endfunction

  function automatic logic near(input realtime a, input realtime b);
    return (a - b < TOL) && (b - a < TOL);
  endfunction

  initial begin
    #(2_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic restart(input logic [N-1:0] new_th);
    @(posedge clk0);
    #1;
    th = new_th;
    start = 1'b1;
    @(posedge clk0);
    t0 = $realtime;        // last clk0 edge that sees start
    #1 start = 1'b0;
  endtask

  initial begin
    int slot, r0;
    repeat (3) @(posedge clk0);
    #1 rst = 1'b0;
    for (int t = 0; t < (1 << N); t++) begin
      restart(N'(t));
      slot = ref_slot(N'(t));
      r0 = n_rise;
      #(real'(slot + 2) * TIN + TIN / 4.0);
      check(n_rise == r0 + 1, "exactly one pulse by the expected time");
      check(near(t_rise - t0, real'(slot + 2) * TIN), "delay = (slot+2) T_in");
      #(TIN);
      check(near(t_fall - t_rise, TIN), "pulse one T_in wide");
      check(!seen.exists(slot), "distinct delay per threshold");
      seen[slot] = 1'b1;
      // Every 8th threshold: let the counter wrap and see the pulse again.
      if (t % 8 == 3) begin
        #(real'(1 << N) * TIN - TIN);
        check(n_rise == r0 + 2 && near(t_rise - t0, real'(slot + 2 + (1 << N)) * TIN),
              "pulse repeats after 2^n T_in");
        wraps++;
      end
    end
    // A restart before the pending pulse cancels it.
    restart(N'(40));
    slot = ref_slot(N'(40));
    #(5.0 * TIN);
    restart(N'(2));
    r0 = n_rise;
    #(real'(ref_slot(N'(2)) + 2) * TIN + TIN / 4.0);
    check(n_rise == r0 + 1 && near(t_rise - t0, real'(ref_slot(N'(2)) + 2) * TIN), "restart takes new threshold");
    #(real'(slot + 2) * TIN);
    check(n_rise == r0 + 1, "old pulse cancelled");
    check(seen.num() == (1 << N), "all delays covered");
    check(wraps > 0, "wrap exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
