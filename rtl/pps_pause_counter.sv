// pps_pause_counter: the dead-time ("pause") generator.
//
// A CNT_W-bit down counter (the published circuit cascades three 4-bit
// 74193-type counters into one 12-bit counter) advances only on ticks of
// the NCO1 clock, so its time step is T_NCO1 (80 ns with the default
// words). While the NCO2 square wave q2 is low the counter is held loaded
// with k0. After q2 rises it counts down one step per tick and stops at
// zero. The pause output is high while q2 is high and the counter has not
// reached zero, so each half period of the output begins with a dead time
//   tau_r = k0 * T_NCO1,
// capped at T_NCO2/2 because the pause also ends when q2 falls. The cap is
// what limits the power regulation factor to about 50..99 %, as in the
// published results. Holding the counter in load while q2 is low and
// stopping at zero are this design's reading of how the counters were wired.
//
// Interface: tick is the one-clk enable from NCO1, q2 the NCO2 MSB, k0 the
// pause constant, count the counter, pause the dead-time window.
// Timing: count changes on clk edges where tick is high; pause is
// combinational from q2 and count. Reset clears the counter.
module pps_pause_counter #(
  parameter int unsigned CNT_W = pps_pkg::CNT_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,    // NCO1 clock enable
  input  logic             q2,      // NCO2 square wave
  input  logic [CNT_W-1:0] k0,      // pause length in NCO1 periods
  output logic [CNT_W-1:0] count,
  output logic             pause
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= '0;
    end else if (tick) begin
      if (!q2)              count <= k0;
      else if (count != '0) count <= count - 1'b1;
    end
  end

  assign pause = q2 && (count != '0);

endmodule
