// pps_kword_mux: frequency-word selector in front of an NCO.
//
// The published design feeds each NCO through a 2:1 multiplexer (one for
// k2, one for k3) controlled by an external select pin. What the two
// multiplexer inputs are is this design's reading: input 0 is a built-in
// constant (PRESET, the value used in the published simulations), input 1
// is the word loaded through the serial port. The output is registered so
// that the NCO adder sees a clean word when the select pin, which comes
// from outside the chip, changes.
//
// Interface: sel chooses the source, loaded is the serial word, k the word
// given to the NCO. Timing: k follows sel/loaded one clk later. Reset loads
// PRESET.
module pps_kword_mux #(
  parameter int unsigned   W      = pps_pkg::N_DEF,
  parameter logic [W-1:0]  PRESET = W'(pps_pkg::K2_DEF)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sel,      // 0: PRESET, 1: loaded
  input  logic [W-1:0] loaded,
  output logic [W-1:0] k
);

  always_ff @(posedge clk) begin
    if (!rst_n)   k <= PRESET;
    else if (sel) k <= loaded;
    else          k <= PRESET;
  end

endmodule
