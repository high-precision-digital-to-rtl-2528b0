// dtc_control - control logic of the DTC, clocked by clk0 (f_in / 2).
//
// The published architecture names this block and its ports (Fine, Coarse in;
// th and the 5-bit fine code out) but not its insides, so what follows is the simplest logic that
// does the job, and all of its timing is this design's choice:
//  * A request is taken when `load` is high at a clk0 edge and `ready` (the
//    IDELAYCTRL's RDY) is high. A new request aborts one still in progress.
//  * The coarse delay c (in CLK_IN periods) becomes the counter threshold
//    th = {c[n-1:1], c[1] ^ c[0]}, matching the order in which the dual-clock
//    counter visits its (count_h, count_l) pairs (see dual_clock_counter).
//  * The fine code is registered onto cntvalue with a one-cycle `ld` pulse for
//    the IDELAYE2 (VAR_LOAD mode), which loads it at the next clk0 edge.
//  * `start` restarts the counter. It is held high while idle, which keeps the
//    counter cleared so that no output pulse appears before the first request,
//    and falls one clk0 period after a request is taken.
//  * `start_out` is the start marker of the converter: it rises exactly two
//    CLK_IN periods after the counter restart, i.e. exactly when
//    synchronous_out would rise for c = 0, and stays high for one clk0 period.
//    The output edge then follows it by c * T_in + fine * T_in / 32.
// Latency: request taken at clk0 edge k; start_out rises at clk0 edge k + 2;
// synchronous_out rises c CLK_IN periods after that.
`timescale 1ps / 1fs
module dtc_control #(
  parameter int unsigned N         = dtc_pkg::COARSE_BITS,
  parameter int unsigned FINE_BITS = dtc_pkg::FINE_BITS
) (
  input  logic                 clk0,
  input  logic                 rst,
  input  logic                 ready,       // IDELAYCTRL RDY
  input  logic                 load,
  input  logic [N-1:0]         coarse,
  input  logic [FINE_BITS-1:0] fine,
  output logic [N-1:0]         th,
  output logic [FINE_BITS-1:0] cntvalue,
  output logic                 ld,
  output logic                 start,
  output logic                 start_out,
  output logic                 accepted      // request taken at this clk0 edge
);
  logic start_d;   // start delayed by one clk0 period
  logic active;    // a request has been taken since reset

  assign accepted = load & ready;

  always_ff @(posedge clk0 or posedge rst) begin
    if (rst) begin
      th        <= '0;
      cntvalue  <= '0;
      ld        <= 1'b0;
      start     <= 1'b1;
      start_d   <= 1'b1;
      start_out <= 1'b0;
      active    <= 1'b0;
    end else begin
      ld        <= accepted;
      start     <= accepted | ~active;
      start_d   <= start;
      // start_out rises one clk0 period after the last clk0 edge that cleared
      // the counter (start_d marks that edge once start has fallen).
      start_out <= active & start_d & ~start;
      if (accepted) begin
        th       <= {coarse[N-1:1], coarse[1] ^ coarse[0]};
        cntvalue <= fine;
        active   <= 1'b1;
      end
    end
  end
endmodule
