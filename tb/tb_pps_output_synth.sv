// tb_pps_output_synth: self-checking test of the output logic.
// The testbench makes its own tick (one clk in four), a q2 square wave of
// Q ticks per period (half high) and a pause window covering the first D
// ticks of each q2 high half. From these it expects, per channel: a period
// of 2*Q ticks, a pulse of Q - D ticks, a dead gap of D ticks between one
// channel falling and the other rising, strict alternation and no overlap.
// It then checks that en_out = 0 silences both outputs and twoch_en = 0
// silences only ChB.
module tb_pps_output_synth;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n, tick, q2, pause, en_out, twoch_en, phase, ch_a, ch_b;

  int checks = 0, failures = 0;

  pps_output_synth dut (
    .clk(clk), .rst_n(rst_n), .tick(tick), .q2(q2), .pause(pause),
    .en_out(en_out), .twoch_en(twoch_en), .phase(phase), .ch_a(ch_a), .ch_b(ch_b));

  always #10 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // stimulus: tick every 4 clk; q2 and pause advance with the tick counter
  int Q = 50, D = 10;
  int unsigned cyc = 0, tick_no = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (tick) tick_no <= tick_no + 1;
  end
  assign tick  = (cyc % 4 == 0);
  assign q2    = (tick_no % Q) < (Q / 2);
  assign pause = q2 && ((tick_no % Q) < D);

  // edge monitor, times in clk cycles
  longint t_a_rise = -1, t_a_fall = -1, t_b_rise = -1, t_b_fall = -1;
  longint per_a, wid_a, gap_ba, per_b, wid_b, gap_ab;
  int     n_a, n_b, overlap;
  logic   ch_a_d = 1'b0, ch_b_d = 1'b0;
  logic   last_was_a;

  task automatic clear_stats();
    n_a = 0; n_b = 0; overlap = 0;
    per_a = -1; wid_a = -1; gap_ba = -1; per_b = -1; wid_b = -1; gap_ab = -1;
    t_a_rise = -1; t_a_fall = -1; t_b_rise = -1; t_b_fall = -1;
  endtask

  // per-quantity checks are made on every edge after the first ones
  int exp_per, exp_wid, exp_gap;
  bit measure = 1'b0;
  always @(posedge clk) begin
    if (measure) begin
      if (ch_a && ch_b) overlap++;
      if (!ch_a && ch_a_d && t_a_rise >= 0)
        begin check(cyc - t_a_rise == exp_wid, $sformatf("ChA pulse %0d, expected %0d", cyc - t_a_rise, exp_wid)); t_a_fall = cyc; end
      if (!ch_b && ch_b_d && t_b_rise >= 0)
        begin check(cyc - t_b_rise == exp_wid, $sformatf("ChB pulse %0d, expected %0d", cyc - t_b_rise, exp_wid)); t_b_fall = cyc; end
      if (ch_a && !ch_a_d) begin
        if (t_a_rise >= 0) check(cyc - t_a_rise == exp_per, $sformatf("ChA period %0d, expected %0d", cyc - t_a_rise, exp_per));
        if (t_b_fall >= 0 && exp_gap >= 0) check(cyc - t_b_fall == exp_gap, $sformatf("dead time B->A %0d, expected %0d", cyc - t_b_fall, exp_gap));
        if (n_a + n_b > 0 && exp_gap >= 0) check(!last_was_a, "ChA follows ChB");
        last_was_a = 1'b1;
        t_a_rise = cyc;
        n_a++;
      end
      if (ch_b && !ch_b_d) begin
        if (t_b_rise >= 0) check(cyc - t_b_rise == exp_per, $sformatf("ChB period %0d, expected %0d", cyc - t_b_rise, exp_per));
        if (t_a_fall >= 0 && exp_gap >= 0) check(cyc - t_a_fall == exp_gap, $sformatf("dead time A->B %0d, expected %0d", cyc - t_a_fall, exp_gap));
        if (n_a + n_b > 0) check(last_was_a, "ChB follows ChA");
        last_was_a = 1'b0;
        t_b_rise = cyc;
        n_b++;
      end
    end
    ch_a_d <= ch_a;
    ch_b_d <= ch_b;
  end

  task automatic run_case(input int q, input int d, input int periods);
    Q = q; D = d;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(!ch_a && !ch_b && !phase, "reset clears outputs and phase");
    // let the first (partial) q2 period pass
    repeat (8 * q) @(posedge clk);
    clear_stats();
    exp_per = 8 * q;
    exp_wid = 4 * (q - d);
    exp_gap = 4 * d;
    measure = 1'b1;
    repeat (periods * 8 * q) @(posedge clk);
    measure = 1'b0;
    check(overlap == 0, "channels never overlap");
    check(n_a >= periods - 1 && n_b >= periods - 1,
          $sformatf("both channels pulse (%0d, %0d)", n_a, n_b));
  endtask

  initial begin
    rst_n = 1'b0;
    en_out = 1'b1;
    twoch_en = 1'b1;
    run_case(50, 10, 6);
    run_case(50, 0, 6);
    run_case(50, 24, 6);
    run_case(120, 37, 5);
    run_case(30, 1, 8);

    // ENOUT low: both outputs stay low, phase keeps running
    en_out = 1'b0;
    clear_stats();
    measure = 1'b1;
    repeat (1000) @(posedge clk);
    measure = 1'b0;
    check(n_a == 0 && n_b == 0, "ENOUT=0 silences both channels");
    en_out = 1'b1;

    // twoch_en low: ChA only
    twoch_en = 1'b0;
    repeat (10) @(posedge clk);
    clear_stats();
    exp_per = 8 * Q; exp_wid = 4 * (Q - D); exp_gap = -1;
    measure = 1'b1;
    repeat (2000) @(posedge clk);
    measure = 1'b0;
    check(n_b == 0 && n_a >= 7, $sformatf("twoch_en=0: ChA only (%0d, %0d)", n_a, n_b));
    twoch_en = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
