// pps_nco: numerically controlled oscillator (direct digital synthesis).
//
// An N-bit phase accumulator adds the frequency control word k every clk
// cycle; its most significant bit is a square wave of frequency
//   f_out = k * f_clk / 2^N,
// with a frequency step of f_clk / 2^N. The synthesizer uses two of these:
// NCO1 (k2) produces the fast clock that times the pause and the output
// logic, NCO2 (k3) produces twice the output frequency.
//
// Interface: acc is the accumulator (registered), msb its top bit (the
// q1_out/q2_out test output), rise high for the first clk cycle in which
// msb is 1 (one pulse per output period). Downstream logic stays on clk and uses rise as a
// clock enable; the published circuit instead used the MSB itself as a
// clock for the counters, which this design avoids on purpose.
// Timing: acc updates on every rising clk edge; rise is combinational
// from acc and a one-cycle-delayed copy of msb.
// Reset (active-low, synchronous) clears the accumulator.
module pps_nco #(
  parameter int unsigned N = pps_pkg::N_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] k,      // frequency control word
  output logic [N-1:0] acc,    // phase accumulator
  output logic         msb,    // f_out square wave
  output logic         rise    // one-cycle pulse per period of msb
);

  logic msb_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc   <= '0;
      msb_d <= 1'b0;
    end else begin
      acc   <= acc + k;
      msb_d <= acc[N-1];
    end
  end

  assign msb  = acc[N-1];
  assign rise = acc[N-1] & ~msb_d;

endmodule
