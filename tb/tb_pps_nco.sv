// tb_pps_nco: self-checking test of the phase accumulator.
// Checks the accumulator against k * cycles mod 2^N, the MSB against the
// accumulator, and the number of rise pulses over a long window against
// floor(k * cycles / 2^N) for several frequency words, including the two
// published ones (2^30 -> one pulse every 4 clk, 6871948 -> 80 kHz at
// 50 MHz, i.e. about one pulse per 625 clk).
module tb_pps_nco;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned N = 32;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] k;
  logic [N-1:0] acc;
  logic         msb, rise;

  int checks = 0, failures = 0;

  pps_nco #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .k(k), .acc(acc), .msb(msb), .rise(rise));

  always #5 clk = ~clk;

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

  // Run one frequency word from reset for `cycles` clocks.
  task automatic run_word(input logic [N-1:0] word, input int unsigned cycles);
    longint unsigned model, pulses, expect_pulses;
    logic            prev_msb;
    rst_n = 1'b0;
    k     = word;
    @(posedge clk);
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    check(acc == '0, "accumulator cleared by reset");
    model  = 0;
    pulses = 0;
    prev_msb = 1'b0;
    for (int unsigned i = 0; i < cycles; i++) begin
      @(posedge clk);
      #1;
      model = (model + word) & ((64'd1 << N) - 1);
      if (rise) pulses++;
      if (i % 97 == 0) begin
        check(acc == N'(model), $sformatf("acc k=%0d cycle %0d: %0h vs %0h", word, i, acc, model));
        check(msb == acc[N-1], "msb is the accumulator's top bit");
      end
      // rise is high exactly on a 0 -> 1 step of the MSB
      if (rise != (msb && !prev_msb)) begin
        checks++;
        failures++;
        $display("FAIL: rise mismatch at cycle %0d", i);
      end
      prev_msb = msb;
    end
    // the MSB first rises when the accumulator crosses 2^(N-1)
    expect_pulses = 0;
    for (longint unsigned j = 1; j <= cycles; j++)
      if ((((j * word) >> (N - 1)) & 1) == 1 && ((((j - 1) * word) >> (N - 1)) & 1) == 0)
        expect_pulses++;
    check(pulses == expect_pulses,
          $sformatf("k=%0d: %0d rise pulses, expected %0d", word, pulses, expect_pulses));
  endtask

  initial begin
    rst_n = 1'b0;
    k = '0;
    run_word(32'd1073741824, 4000);   // f_clk/4: 1000 pulses
    run_word(32'd6871948, 20000);     // 80 kHz at 50 MHz
    run_word(32'd515396, 40000);      // 6 kHz at 50 MHz
    run_word(32'h9E37_79B9, 5000);    // above f_clk/2: aliasing still counted
    run_word($urandom, 5000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
