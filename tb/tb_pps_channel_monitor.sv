// tb_pps_channel_monitor: measurement helper for the synthesizer
// testbenches. It watches ChA and ChB on every clk edge and, while enabled,
// records in clk cycles the minimum and maximum of: each channel's period
// (rise to rise), pulse width (rise to fall) and the dead time before it
// rises (other channel's fall to this rise), plus pulse counts and the
// number of cycles in which both channels were high. clear restarts the
// statistics (the first edges after a clear only open the intervals).
module tb_pps_channel_monitor (
  input  logic clk,
  input  logic enable,
  input  logic clear,
  input  logic ch_a,
  input  logic ch_b,
  output int   n_a,
  output int   n_b,
  output int   overlap,
  output int   per_min[2],
  output int   per_max[2],
  output int   wid_min[2],
  output int   wid_max[2],
  output int   gap_min[2],
  output int   gap_max[2]
);
  timeunit 1ns; timeprecision 1ps;

  longint cyc = 0;
  longint t_rise[2], t_fall[2];
  logic   d[2];
  logic   ch[2];

  assign ch[0] = ch_a;
  assign ch[1] = ch_b;

  function automatic void upd(ref int mn, ref int mx, input longint v);
    if (mn < 0 || v < mn) mn = int'(v);
    if (mx < 0 || v > mx) mx = int'(v);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (clear) begin
      n_a = 0; n_b = 0; overlap = 0;
      for (int c = 0; c < 2; c++) begin
        per_min[c] = -1; per_max[c] = -1; wid_min[c] = -1; wid_max[c] = -1;
        gap_min[c] = -1; gap_max[c] = -1; t_rise[c] = -1; t_fall[c] = -1;
      end
    end else if (enable) begin
      if (ch_a && ch_b) overlap++;
      // falls first, so a fall and a rise in the same cycle give a gap of 0
      for (int c = 0; c < 2; c++)
        if (!ch[c] && d[c]) begin
          if (t_rise[c] >= 0) upd(wid_min[c], wid_max[c], cyc - t_rise[c]);
          t_fall[c] = cyc;
        end
      for (int c = 0; c < 2; c++)
        if (ch[c] && !d[c]) begin
          if (t_rise[c] >= 0) upd(per_min[c], per_max[c], cyc - t_rise[c]);
          if (t_fall[1-c] >= 0) upd(gap_min[c], gap_max[c], cyc - t_fall[1-c]);
          t_rise[c] = cyc;
          if (c == 0) n_a++; else n_b++;
        end
    end
    d[0] = ch_a;
    d[1] = ch_b;
  end
endmodule
