// tb_nutt_dtc_refclk - the channel at several IDELAYCTRL reference clocks: the
// three of the IDELAYE2 tap table (200, 300 and 400 MHz, taps of 78.125, 52.083 and
// 39.0625 ps) and the ends of a +-10 MHz variation around 300 MHz (290 and 310 MHz,
// taps of 53.879 and 50.403 ps, i.e. the LSB moves by about +-1.8 ps).
//
// The reference is CLK_OUT0 = f_in / 2, so the channels run from CLK_IN of 400, 580,
// 600, 620 and 800 MHz; in each the LSB is T_in / 32 = one tap. With n = 8 coarse
// bits, random codes d are requested on all channels at once and each start_out ->
// asynchronous_out interval is checked against d * T_in / 32; the LSB of each
// channel is checked against the tap formula 1 / (64 * f_ref).
`timescale 1ps / 1fs
module tb_nutt_dtc_refclk;
  localparam int  N   = 8;
  localparam int  NC  = 5;
  localparam real TOL = 0.01;
  localparam real REF  [NC] = '{200.0, 290.0, 300.0, 310.0, 400.0};
  // CLK_IN half period in ps, 1 / (4 f_ref), rounded to the 1 fs precision.
  localparam real HALF [NC] = '{1250.0, 862.069, 833.333, 806.452, 625.0};

  logic [NC-1:0] clk_in = '0;
  logic rst = 1'b1;
  logic [NC-1:0] load = '0;
  logic [N-1:0] coarse [NC];
  logic [4:0]   fine [NC];
  logic [NC-1:0] ready, accepted, clk0, start_out, sync_out, async_out;
  logic [4:0] tap [NC];
  int checks = 0, failures = 0;
  realtime t_start [NC], t_async [NC];
  int n_async [NC] = '{default: 0};

  task automatic check_delay(input realtime meas, input realtime exp_t, input int k);
    checks++;
    if (meas - exp_t >= TOL || exp_t - meas >= TOL) begin
      failures++;
      $display("FAIL channel %0d (ref %0.0f MHz): delay %0.3f ps, expected %0.3f ps",
               k, REF[k], meas, exp_t);
    end
  endtask

  for (genvar k = 0; k < NC; k++) begin : g_ch
    nutt_dtc_top #(.N(N), .REFCLK_MHZ(REF[k])) dut (
      .clk_in(clk_in[k]), .rst(rst), .load(load[k]), .coarse(coarse[k]), .fine(fine[k]),
      .ready(ready[k]), .accepted(accepted[k]), .clk0(clk0[k]), .start_out(start_out[k]),
      .synchronous_out(sync_out[k]), .asynchronous_out(async_out[k]), .tap(tap[k]));
    always #(HALF[k]) clk_in[k] = ~clk_in[k];
    always @(posedge start_out[k]) t_start[k] = $realtime;
    always @(posedge async_out[k]) begin t_async[k] = $realtime; n_async[k]++; end

    // One request on this channel, checked when its output arrives.
    task automatic run(input logic [N-1:0] c, input logic [4:0] f);
      int a0;
      real lsb;
      lsb = 2.0 * HALF[k] / 32.0;
      a0 = n_async[k];
      @(posedge clk0[k]);
      #10;
      load[k] = 1'b1; coarse[k] = c; fine[k] = f;
      @(posedge clk0[k]);
      #10 load[k] = 1'b0;
      wait (n_async[k] == a0 + 1);
      check_delay(t_async[k] - t_start[k], real'({c, f}) * lsb, k);
    endtask
  end

  initial begin
    #(100_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NC; k++) begin coarse[k] = '0; fine[k] = '0; end
    // LSB of each channel against the tap formula (to within the 1 fs rounding).
    for (int k = 0; k < NC; k++) begin
      checks++;
      if (2.0 * HALF[k] / 32.0 - 1.0e6 / (64.0 * REF[k]) > 0.001 ||
          1.0e6 / (64.0 * REF[k]) - 2.0 * HALF[k] / 32.0 > 0.001) begin
        failures++;
        $display("FAIL channel %0d: LSB does not match the tap", k);
      end
    end
    #5000 rst = 1'b0;
    wait (&ready);
    fork
      for (int i = 0; i < 100; i++) g_ch[0].run(N'($urandom), 5'($urandom));
      for (int i = 0; i < 100; i++) g_ch[1].run(N'($urandom), 5'($urandom));
      for (int i = 0; i < 100; i++) g_ch[2].run(N'($urandom), 5'($urandom));
      for (int i = 0; i < 100; i++) g_ch[3].run(N'($urandom), 5'($urandom));
      for (int i = 0; i < 100; i++) g_ch[4].run(N'($urandom), 5'($urandom));
    join
    // End with the longest code on all channels.
    fork
      g_ch[0].run('1, 5'd31);
      g_ch[1].run('1, 5'd31);
      g_ch[2].run('1, 5'd31);
      g_ch[3].run('1, 5'd31);
      g_ch[4].run('1, 5'd31);
    join
    $display("LSB at 290 / 300 / 310 MHz reference: %0.3f / %0.3f / %0.3f ps",
             2.0 * HALF[1] / 32.0, 2.0 * HALF[2] / 32.0, 2.0 * HALF[3] / 32.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
