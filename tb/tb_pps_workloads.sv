// tb_pps_workloads: runs the published operating points on the synthesizer
// at its default sizes and 50 MHz, and compares the measured outputs with
// the published simulation results.
//   40 kHz output (built-in k3 = 6871948), k0 = 10, 40, 50, 60, 70, 72
//   3 kHz output (k3 = 515396 loaded over the serial port), k0 = 10 ... 1030
// k2 stays at 2^30 (80 ns pause resolution). For each point it measures the
// pulse tau_I, the dead time tau_r between the channels, the pause
// tau_P = 2 tau_r + tau_I, the duty cycle tau_I / T_C and the power
// regulation factor k_r = 1 - 2 tau_r / T_C, and checks them against the
// published numbers with tolerances of one to two 80 ns steps (those
// numbers were read from waveform cursors). It also checks the largest
// pause constant per frequency: at 40 kHz the dead time stops growing at
// T_NCO2/2 = 6.25 us once k0 passes 78, which is where k_r bottoms out
// near 50 %.
module tb_pps_workloads;
  timeunit 1ns; timeprecision 1ps;
  import pps_pkg::*;

  localparam int  HALF = 4;
  localparam real TCLK = 0.02;   // us

  logic       clk = 1'b0;
  logic       rst_n, data_clk2, reg_cnt, data_in, sel_pin2, sel_pin3, en_out, twoch_en;
  logic       ch_a, ch_b, q1_out, q2_out;
  logic [3:0] mng;

  int checks = 0, failures = 0;

  pps_top dut (
    .clk(clk), .rst_n(rst_n), .data_clk2(data_clk2), .reg_cnt(reg_cnt), .data_in(data_in),
    .sel_pin2(sel_pin2), .sel_pin3(sel_pin3), .en_out(en_out), .twoch_en(twoch_en),
    .ch_a(ch_a), .ch_b(ch_b), .q1_out(q1_out), .q2_out(q2_out), .mng(mng));

  always #10 clk = ~clk;

  logic mon_en = 1'b0, mon_clr = 1'b1;
  int   n_a, n_b, overlap;
  int   per_min[2], per_max[2], wid_min[2], wid_max[2], gap_min[2], gap_max[2];

  tb_pps_channel_monitor mon (
    .clk(clk), .enable(mon_en), .clear(mon_clr), .ch_a(ch_a), .ch_b(ch_b),
    .n_a(n_a), .n_b(n_b), .overlap(overlap),
    .per_min(per_min), .per_max(per_max), .wid_min(wid_min), .wid_max(wid_max),
    .gap_min(gap_min), .gap_max(gap_max));

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit near(input real v, input real e, input real tol);
    return (v - e) <= tol && (e - v) <= tol;
  endfunction

  task automatic send_bit(input logic rc, input logic b);
    reg_cnt = rc;
    data_in = b;
    repeat (HALF) @(posedge clk);
    data_clk2 = 1'b1;
    repeat (HALF) @(posedge clk);
    data_clk2 = 1'b0;
  endtask

  task automatic write_reg(input logic [1:0] a, input logic [31:0] value, input int bits);
    send_bit(1'b1, a[1]);
    send_bit(1'b1, a[0]);
    for (int i = bits - 1; i >= 0; i--) send_bit(1'b0, value[i]);
    repeat (HALF) @(posedge clk);
  endtask

  // One operating point; p_* are the published results (us and %).
  task automatic point(input string tag, input int tc_clk, input int k0,
                       input real p_ti, input real p_tp, input real p_tr,
                       input real p_dc, input real p_kr);
    real tc, ti, tr, tp, dc, kr;
    write_reg(REG_K0, 32'(k0), 12);
    repeat (2 * tc_clk + 10) @(posedge clk);
    mon_clr = 1'b1; @(posedge clk); mon_clr = 1'b0;
    mon_en = 1'b1;
    repeat (3 * tc_clk) @(posedge clk);
    mon_en = 1'b0;
    tc = 0.5 * (per_min[0] + per_max[0]) * TCLK;
    ti = 0.5 * (wid_min[0] + wid_max[0]) * TCLK;
    tr = 0.5 * (gap_min[0] + gap_max[0]) * TCLK;
    tp = 2.0 * tr + ti;
    dc = 100.0 * ti / tc;
    kr = 100.0 * (1.0 - 2.0 * tr / tc);
    $display("%s k0=%4d: tau_I %8.3f (%8.3f) tau_P %8.3f (%8.3f) tau_r %7.3f (%7.3f) dc %6.2f (%6.2f) k_r %6.2f (%6.2f)",
             tag, k0, ti, p_ti, tp, p_tp, tr, p_tr, dc, p_dc, kr, p_kr);
    check(overlap == 0 && n_a >= 2 && n_b >= 2, $sformatf("%s k0=%0d: channels alternate", tag, k0));
    check(gap_min[0] == gap_max[0] && gap_min[1] == gap_min[0], $sformatf("%s k0=%0d: dead time steady and equal", tag, k0));
    check(near(tr, p_tr, 0.1),  $sformatf("%s k0=%0d: tau_r", tag, k0));
    check(near(ti, p_ti, 0.15), $sformatf("%s k0=%0d: tau_I", tag, k0));
    check(near(tp, p_tp, 0.2),  $sformatf("%s k0=%0d: tau_P", tag, k0));
    check(near(dc, p_dc, 0.5),  $sformatf("%s k0=%0d: duty cycle", tag, k0));
    check(near(kr, p_kr, 0.5),  $sformatf("%s k0=%0d: k_r", tag, k0));
  endtask

  // Largest dead time: k0 beyond the NCO2 half period.
  task automatic limit(input string tag, input int tc_clk, input int k0, input real e_tr);
    real tr;
    write_reg(REG_K0, 32'(k0), 12);
    repeat (2 * tc_clk + 10) @(posedge clk);
    mon_clr = 1'b1; @(posedge clk); mon_clr = 1'b0;
    mon_en = 1'b1;
    repeat (3 * tc_clk) @(posedge clk);
    mon_en = 1'b0;
    tr = 0.5 * (gap_min[0] + gap_max[0]) * TCLK;
    $display("%s k0=%4d: tau_r %7.3f (expected %7.3f)", tag, k0, tr, e_tr);
    check(near(tr, e_tr, 0.09), $sformatf("%s k0=%0d: dead-time limit", tag, k0));
  endtask

  initial begin
    rst_n = 1'b0;
    data_clk2 = 1'b0; reg_cnt = 1'b0; data_in = 1'b0;
    sel_pin2 = 1'b0; sel_pin3 = 1'b0; en_out = 1'b1; twoch_en = 1'b1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // 40 kHz with the built-in NCO2 word
    point("40kHz", 1250, 10, 11.683, 13.227, 0.772, 46.81, 93.61);
    point("40kHz", 1250, 40,  9.282, 15.678, 3.198, 37.19, 74.38);
    point("40kHz", 1250, 50,  8.482, 16.478, 3.998, 33.98, 67.96);
    point("40kHz", 1250, 60,  7.682, 17.278, 4.789, 30.78, 61.55);
    point("40kHz", 1250, 70,  6.883, 18.077, 5.597, 27.58, 55.15);
    point("40kHz", 1250, 72,  6.721, 18.239, 5.759, 26.93, 53.85);
    limit("40kHz", 1250, 78, 6.24);
    limit("40kHz", 1250, 79, 6.25);
    limit("40kHz", 1250, 4095, 6.25);

    // 3 kHz: NCO2 word loaded over the serial port
    write_reg(REG_K3, 32'd515396, 32);
    sel_pin2 = 1'b1;
    point("3kHz", 16667, 10,   165.922, 167.438,  0.758, 49.77, 99.55);
    point("3kHz", 16667, 50,   162.721, 170.639,  3.959, 48.81, 97.62);
    point("3kHz", 16667, 70,   161.123, 172.237,  5.557, 48.33, 96.66);
    point("3kHz", 16667, 100,  158.722, 174.638,  7.958, 47.61, 95.23);
    point("3kHz", 16667, 300,  142.720, 190.64,  23.96,  42.81, 85.63);
    point("3kHz", 16667, 500,  126.723, 206.637, 39.957, 38.01, 76.03);
    point("3kHz", 16667, 700,  110.724, 222.636, 55.956, 33.21, 66.43);
    point("3kHz", 16667, 1000,  86.723, 246.637, 79.957, 26.01, 52.03);
    point("3kHz", 16667, 1030,  84.323, 249.037, 82.357, 25.29, 50.59);
    limit("3kHz", 16667, 2000, 83.333);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
