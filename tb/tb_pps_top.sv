// tb_pps_top: end-to-end test of the synthesizer at its default sizes
// (32-bit NCOs, 12-bit pause counter, 50 MHz clock).
// A task plays the control unit on the three-wire serial port. Each step
// sets a configuration and then measures ChA/ChB in clk cycles against
// values worked out from the DDS formulas:
//   T_NCO1 = 2^32 / k2 clk,  T_C = 2^33 / k3 clk,
//   dead time tau_r = k0 * T_NCO1 unless that exceeds T_C/4 (the NCO2 high
//   half), where it stops at T_C/4; pulse tau_I = T_C/2 - tau_r.
// Outputs move on the T_NCO1 grid, so period and width are allowed one
// T_NCO1 of error; the dead time is exact when T_NCO1 is a whole number of
// clk cycles. Mechanisms exercised and counted: serial writes, built-in
// and loaded words on both multiplexers, a pause cut short by the NCO2
// half period, k0 = 0, ENOUT off and single-channel mode. The channels
// must never overlap.
module tb_pps_top;
  timeunit 1ns; timeprecision 1ps;
  import pps_pkg::*;

  localparam int HALF = 4;   // serial clock half period in clk cycles

  logic       clk = 1'b0;
  logic       rst_n, data_clk2, reg_cnt, data_in, sel_pin2, sel_pin3, en_out, twoch_en;
  logic       ch_a, ch_b, q1_out, q2_out;
  logic [3:0] mng;

  int checks = 0, failures = 0;

  pps_top dut (
    .clk(clk), .rst_n(rst_n), .data_clk2(data_clk2), .reg_cnt(reg_cnt), .data_in(data_in),
    .sel_pin2(sel_pin2), .sel_pin3(sel_pin3), .en_out(en_out), .twoch_en(twoch_en),
    .ch_a(ch_a), .ch_b(ch_b), .q1_out(q1_out), .q2_out(q2_out), .mng(mng));

  always #10 clk = ~clk;   // 50 MHz

  logic mon_en = 1'b0, mon_clr = 1'b1;
  int   n_a, n_b, overlap;
  int   per_min[2], per_max[2], wid_min[2], wid_max[2], gap_min[2], gap_max[2];

  tb_pps_channel_monitor mon (
    .clk(clk), .enable(mon_en), .clear(mon_clr), .ch_a(ch_a), .ch_b(ch_b),
    .n_a(n_a), .n_b(n_b), .overlap(overlap),
    .per_min(per_min), .per_max(per_max), .wid_min(wid_min), .wid_max(wid_max),
    .gap_min(gap_min), .gap_max(gap_max));

  initial begin
    repeat (2000000) @(posedge clk);
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

  // ---- control unit model ----------------------------------------------
  int n_serial = 0;
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
    n_serial++;
  endtask

  // ---- measurement -------------------------------------------------------
  // true when min..max was measured and lies within tol of the expected value
  function automatic bit in_tol(input int mn, input int mx, input real e, input int tol);
    real lo, hi;
    lo = real'(mn) - e;
    hi = real'(mx) - e;
    return mn >= 0 && lo >= -tol && lo <= tol && hi >= -tol && hi <= tol;
  endfunction

  int n_capped = 0, n_uncapped = 0;

  // Measure `periods` output periods and compare with the formulas.
  task automatic measure(input string name, input longint k2, input longint k3,
                         input int k0, input int periods, input bit two_ch);
    real t1, tc, tau_r, tau_i;
    int  tol;
    t1 = (2.0 ** 32) / real'(k2);
    tc = (2.0 ** 33) / real'(k3);
    tau_r = k0 * t1;
    if (tau_r > tc / 4.0) begin
      tau_r = tc / 4.0;
      n_capped++;
    end else begin
      n_uncapped++;
    end
    tau_i = tc / 2.0 - tau_r;
    tol = int'($ceil(t1)) + 1;
    // skip two periods so that the new setting is in force
    repeat (int'(2.0 * tc) + 10) @(posedge clk);
    mon_clr = 1'b1;
    @(posedge clk);
    mon_clr = 1'b0;
    mon_en = 1'b1;
    repeat (int'(periods * tc)) @(posedge clk);
    mon_en = 1'b0;
    $display("%s: T_C %0d..%0d (%.1f)  tau_I %0d..%0d (%.1f)  tau_r %0d..%0d (%.1f) clk",
             name, per_min[0], per_max[0], tc, wid_min[0], wid_max[0], tau_i,
             gap_min[0], gap_max[0], tau_r);
    check(overlap == 0, {name, ": ChA and ChB never overlap"});
    check(n_a >= periods - 1, $sformatf("%s: ChA pulses %0d", name, n_a));
    check(in_tol(per_min[0], per_max[0], tc, tol),
          {name, ": ChA period"});
    check(in_tol(wid_min[0], wid_max[0], tau_i, tol),
          {name, ": ChA pulse width"});
    if (two_ch) begin
      check(n_b >= periods - 1, $sformatf("%s: ChB pulses %0d", name, n_b));
      check(in_tol(per_min[1], per_max[1], tc, tol),
            {name, ": ChB period"});
      check(in_tol(wid_min[1], wid_max[1], tau_i, tol),
            {name, ": ChB pulse width"});
      for (int c = 0; c < 2; c++)
        check(in_tol(gap_min[c], gap_max[c], tau_r, tol),
              $sformatf("%s: dead time before channel %0d", name, c));
    end else begin
      check(n_b == 0, {name, ": ChB silent in single-channel mode"});
    end
  endtask

  // ---- scenario ----------------------------------------------------------
  int n_sel_loaded2 = 0, n_sel_loaded3 = 0, n_enout_off = 0, n_single = 0, n_k0_zero = 0;

  initial begin
    rst_n = 1'b0;
    data_clk2 = 1'b0; reg_cnt = 1'b0; data_in = 1'b0;
    sel_pin2 = 1'b0; sel_pin3 = 1'b0; en_out = 1'b1; twoch_en = 1'b1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // NCO test outputs: q1_out runs at f_clk/4 with the built-in k2
    begin
      int edges = 0;
      logic p = q1_out;
      for (int i = 0; i < 400; i++) begin
        @(posedge clk);
        if (q1_out && !p) edges++;
        p = q1_out;
      end
      check(edges == 100, $sformatf("q1_out: %0d rising edges in 400 clk, expected 100", edges));
    end

    // 1. built-in words, reset k0 = 10: 40 kHz, 0.8 us dead time
    measure("preset 40 kHz k0=10", 1073741824, 6871948, 10, 4, 1'b1);

    // 2. new pause constants over the serial port
    write_reg(REG_K0, 32'd72, 12);
    measure("40 kHz k0=72", 1073741824, 6871948, 72, 4, 1'b1);
    write_reg(REG_K0, 32'd200, 12);
    measure("40 kHz k0=200 (capped)", 1073741824, 6871948, 200, 4, 1'b1);
    write_reg(REG_K0, 32'd0, 12);
    measure("40 kHz k0=0", 1073741824, 6871948, 0, 4, 1'b1);
    n_k0_zero++;

    // 3. loaded NCO2 word: 3 kHz output
    write_reg(REG_K0, 32'd100, 12);
    write_reg(REG_K3, 32'd515396, 32);
    write_reg(REG_K2, 32'd536870912, 32);      // loaded but not yet selected
    sel_pin2 = 1'b1;
    n_sel_loaded2++;
    measure("loaded k3 3 kHz k0=100", 1073741824, 515396, 100, 3, 1'b1);

    // 4. loaded NCO1 word: 160 ns resolution, 20 kHz output
    write_reg(REG_K3, 32'd3435974, 32);        // 40 kHz NCO2 word halved: 20 kHz output
    write_reg(REG_K2, 32'd536870912, 32);      // 2^29: f_NCO1 = 6.25 MHz
    sel_pin3 = 1'b1;
    n_sel_loaded3++;
    measure("loaded k2 2^29, k3 20 kHz, k0=100 (capped)", 536870912, 3435974, 100, 4, 1'b1);
    write_reg(REG_K0, 32'd50, 12);
    measure("loaded k2 2^29, k3 20 kHz, k0=50", 536870912, 3435974, 50, 4, 1'b1);

    // 5. back to the built-in words
    sel_pin2 = 1'b0;
    sel_pin3 = 1'b0;
    write_reg(REG_K0, 32'd40, 12);
    measure("preset again k0=40", 1073741824, 6871948, 40, 4, 1'b1);

    // 6. single-channel mode
    twoch_en = 1'b0;
    n_single++;
    measure("ChB disabled", 1073741824, 6871948, 40, 4, 1'b0);
    twoch_en = 1'b1;

    // 7. ENOUT off: both outputs quiet
    en_out = 1'b0;
    n_enout_off++;
    repeat (20) @(posedge clk);
    mon_clr = 1'b1; @(posedge clk); mon_clr = 1'b0;
    mon_en = 1'b1;
    repeat (3000) @(posedge clk);
    mon_en = 1'b0;
    check(n_a == 0 && n_b == 0 && !ch_a && !ch_b, "ENOUT=0 silences both channels");
    en_out = 1'b1;

    // 8. mng bits come out of the serial port
    write_reg(REG_MNG, 32'h5, 4);
    check(mng == 4'h5, "mng control bits loaded");

    // every mechanism must have happened
    check(n_serial >= 8, "serial writes");
    check(n_capped > 0, "pause cut at the NCO2 half period");
    check(n_uncapped > 0, "pause timed by the counter");
    check(n_k0_zero > 0, "k0 = 0");
    check(n_sel_loaded2 > 0 && n_sel_loaded3 > 0, "loaded words on both multiplexers");
    check(n_single > 0 && n_enout_off > 0, "output enables");
    $display("mechanisms: serial=%0d capped=%0d uncapped=%0d k0_zero=%0d sel2=%0d sel3=%0d single=%0d enout_off=%0d",
             n_serial, n_capped, n_uncapped, n_k0_zero, n_sel_loaded2, n_sel_loaded3, n_single, n_enout_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
