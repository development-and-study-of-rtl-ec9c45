// pps_top: two-channel programmable pulse synthesizer.
//
// Produces two opposite-phase square waves ChA and ChB for the two halves
// of a full-bridge resonant inverter, with a programmable dead time
// ("pause") at the start of every half period so the two transistors of a
// leg never conduct together. Frequency and dead time can be changed while
// running, which regulates the inverter power through
//   k_r = 1 - 2 tau_r / T_C.
//
// Datapath (all on clk, 50 MHz in the published design):
//   serial port -> pps_input_data -> k2, k3, k0, mng
//   sel_pin3 -> pps_kword_mux -> k2 -> NCO1 -> tick every T_NCO1 = 2^n/(k2 f_clk)
//   sel_pin2 -> pps_kword_mux -> k3 -> NCO2 -> q2,  T_C = 2^(n+1)/(k3 f_clk)
//   q2, tick, k0 -> pps_pause_counter -> pause (k0 * T_NCO1 after each q2 rise)
//   q2, tick, pause, enables -> pps_output_synth -> ChA, ChB
// q1_out and q2_out bring the NCO MSBs out for test, as in the published
// design. The mng control bits are loaded over the serial port and brought
// out unchanged, since what they control is not specified.
//
// This structure, the widths (n = 32, 12-bit pause counter) and the default
// words follow the published design. Own choices: a single clock domain
// with NCO1 used as a clock enable rather than as a clock, two-flip-flop
// synchronizers on all asynchronous pins, registered outputs, and an
// active-low synchronous reset.
//
// Timing: ChA/ChB move on the T_NCO1 grid, a few clk cycles behind the NCO
// edges; the pins act 2-3 clk cycles after they change.
module pps_top
  import pps_pkg::*;
#(
  parameter int unsigned N     = N_DEF,
  parameter int unsigned CNT_W = CNT_W_DEF,
  parameter int unsigned MNG_W = MNG_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  // serial port from the control unit
  input  logic             data_clk2,
  input  logic             reg_cnt,
  input  logic             data_in,
  // frequency word selects: 0 = built-in word, 1 = serially loaded word
  input  logic             sel_pin2,   // k3 (NCO2)
  input  logic             sel_pin3,   // k2 (NCO1)
  // output enables
  input  logic             en_out,     // ENOUT: both channels
  input  logic             twoch_en,   // channel B
  // outputs
  output logic             ch_a,
  output logic             ch_b,
  output logic             q1_out,
  output logic             q2_out,
  output logic [MNG_W-1:0] mng
);

  logic             sel2_s, sel3_s, en_out_s, twoch_en_s;
  logic [1:0]       addr;
  logic [N-1:0]     k2_ld, k3_ld, k2, k3, acc1, acc2;
  logic [CNT_W-1:0] k0, count;
  logic             tick1, rise2, q1, q2, pause, phase;

  pps_sync #(.W(4)) u_sync (
    .clk   (clk),
    .rst_n (rst_n),
    .d     ({sel_pin2, sel_pin3, en_out, twoch_en}),
    .q     ({sel2_s, sel3_s, en_out_s, twoch_en_s})
  );

  pps_input_data #(.N(N), .CNT_W(CNT_W), .MNG_W(MNG_W)) u_input (
    .clk       (clk),
    .rst_n     (rst_n),
    .data_clk2 (data_clk2),
    .reg_cnt   (reg_cnt),
    .data_in   (data_in),
    .addr      (addr),
    .k2        (k2_ld),
    .k3        (k3_ld),
    .k0        (k0),
    .mng       (mng)
  );

  pps_kword_mux #(.W(N), .PRESET(N'(K2_DEF))) u_mux_k2 (
    .clk    (clk),
    .rst_n  (rst_n),
    .sel    (sel3_s),
    .loaded (k2_ld),
    .k      (k2)
  );

  pps_kword_mux #(.W(N), .PRESET(N'(K3_DEF))) u_mux_k3 (
    .clk    (clk),
    .rst_n  (rst_n),
    .sel    (sel2_s),
    .loaded (k3_ld),
    .k      (k3)
  );

  pps_nco #(.N(N)) u_nco1 (
    .clk   (clk),
    .rst_n (rst_n),
    .k     (k2),
    .acc   (acc1),
    .msb   (q1),
    .rise  (tick1)
  );

  pps_nco #(.N(N)) u_nco2 (
    .clk   (clk),
    .rst_n (rst_n),
    .k     (k3),
    .acc   (acc2),
    .msb   (q2),
    .rise  (rise2)
  );

  pps_pause_counter #(.CNT_W(CNT_W)) u_pause (
    .clk   (clk),
    .rst_n (rst_n),
    .tick  (tick1),
    .q2    (q2),
    .k0    (k0),
    .count (count),
    .pause (pause)
  );

  pps_output_synth u_out (
    .clk      (clk),
    .rst_n    (rst_n),
    .tick     (tick1),
    .q2       (q2),
    .pause    (pause),
    .en_out   (en_out_s),
    .twoch_en (twoch_en_s),
    .phase    (phase),
    .ch_a     (ch_a),
    .ch_b     (ch_b)
  );

  assign q1_out = q1;
  assign q2_out = q2;

endmodule
