// pps_output_synth: builds the two gate-drive signals ChA and ChB.
//
// All state advances on ticks of the NCO1 clock (clock enable tick), so
// the output edges fall on a grid of T_NCO1 (the "PWM resolution").
// A flip-flop samples the NCO2 square wave q2 on each tick; each rising
// edge of q2 toggles the phase flip-flop, which divides f_NCO2 by two into
// the output frequency f_C = f_NCO2/2. ChA is driven while the phase is 1,
// ChB while it is 0, and both are held low during the pause window from
// pps_pause_counter, so each channel's pulse is a half period less the dead
// time:
//   tau_I = T_C/2 - tau_r,  k_r = 2 tau_I / T_C = 1 - 2 tau_r / T_C.
// The flip-flop-and-gate structure follows the published design. The
// enable pins are read as: en_out switches both outputs on or off, twoch_en
// additionally enables channel B (with twoch_en low only ChA runs). The
// outputs are registered, which the published gate outputs were not, so
// the transistor drivers see glitch-free signals.
//
// Timing: ChA/ChB change only on clk edges where tick is high, one tick
// after the q2 edge or the end of the pause is seen. Reset clears the
// phase and both outputs.
module pps_output_synth (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,      // NCO1 clock enable
  input  logic q2,        // NCO2 square wave
  input  logic pause,     // dead-time window
  input  logic en_out,    // ENOUT: enable both channels
  input  logic twoch_en,  // enable channel B
  output logic phase,     // 1: channel A half period, 0: channel B
  output logic ch_a,
  output logic ch_b
);

  logic q2_d;
  logic phase_next;

  // The phase flips when a rising edge of q2 is seen on a tick.
  assign phase_next = (q2 && !q2_d) ? !phase : phase;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q2_d  <= 1'b0;
      phase <= 1'b0;
      ch_a  <= 1'b0;
      ch_b  <= 1'b0;
    end else if (tick) begin
      q2_d  <= q2;
      phase <= phase_next;
      ch_a  <= en_out &&  phase_next && !pause;
      ch_b  <= en_out && twoch_en && !phase_next && !pause;
    end
  end

  // The two channels must never conduct at the same time.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(ch_a && ch_b));

endmodule
