// tb_pps_pause_counter: self-checking test of the dead-time counter.
// A tick arrives every 4 clk (as from NCO1 with k2 = 2^30) and q2 is
// driven as a square wave of chosen high/low lengths. For each k0 the test
// measures, in ticks, how long pause stays high after q2 rises and
// compares it with min(k0, number of ticks while q2 is high). It also
// checks that the counter holds k0 while q2 is low, never wraps below zero,
// and that pause is low whenever q2 is low.
module tb_pps_pause_counter;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned CNT_W = 12;

  logic             clk = 1'b0;
  logic             rst_n, tick, q2;
  logic [CNT_W-1:0] k0, count;
  logic             pause;

  int checks = 0, failures = 0;
  int capped_runs = 0, full_runs = 0;

  pps_pause_counter #(.CNT_W(CNT_W)) dut (
    .clk(clk), .rst_n(rst_n), .tick(tick), .q2(q2), .k0(k0),
    .count(count), .pause(pause));

  always #10 clk = ~clk;

  // tick generator: one clk in four
  int unsigned phase_cnt = 0;
  always_ff @(posedge clk) phase_cnt <= phase_cnt + 1;
  assign tick = (phase_cnt % 4 == 3);

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

  // One q2 period: `lo` clk low, then `hi` clk high. Counts the ticks on
  // which pause is high while q2 is high.
  task automatic q2_period(input int lo, input int hi, input logic [CNT_W-1:0] k);
    int pause_ticks, hi_ticks, expect_ticks;
    k0 = k;
    q2 = 1'b0;
    for (int i = 0; i < lo; i++) begin
      @(posedge clk); #1;
      if (pause) begin checks++; failures++; $display("FAIL: pause while q2 low"); end
    end
    check(count == k, $sformatf("counter holds k0=%0d while q2 low (count=%0d)", k, count));
    q2 = 1'b1;
    #1;
    pause_ticks = 0;
    hi_ticks = 0;
    for (int i = 0; i < hi; i++) begin
      // sample just before the clk edge, as the output logic does
      if (tick) begin
        hi_ticks++;
        if (pause) pause_ticks++;
      end
      @(posedge clk); #1;
    end
    expect_ticks = (int'(k) < hi_ticks) ? int'(k) : hi_ticks;
    check(pause_ticks == expect_ticks,
          $sformatf("k0=%0d hi=%0d: pause for %0d ticks, expected %0d", k, hi, pause_ticks, expect_ticks));
    if (int'(k) >= hi_ticks) begin
      capped_runs++;
      check(count == k - CNT_W'(hi_ticks), "capped: counter stopped where q2 fell");
    end else begin
      full_runs++;
      check(count == '0, "counter stops at zero, no wrap");
    end
  endtask

  initial begin
    rst_n = 1'b0;
    q2 = 1'b0;
    k0 = '0;
    repeat (3) @(posedge clk);
    #1;
    check(count == '0, "reset clears the counter");
    rst_n = 1'b1;
    q2_period(20, 400, 12'd10);
    q2_period(20, 400, 12'd0);
    q2_period(20, 400, 12'd72);
    q2_period(20, 400, 12'd99);     // 100 ticks high: just fits
    q2_period(20, 400, 12'd100);    // capped at q2 fall
    q2_period(20, 400, 12'd4095);
    q2_period(50, 17000, 12'd4095); // full 12-bit range
    for (int i = 0; i < 40; i++)
      q2_period($urandom_range(4, 60), $urandom_range(4, 600), CNT_W'($urandom_range(0, 200)));
    check(capped_runs > 0 && full_runs > 0, "both capped and uncapped pauses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
