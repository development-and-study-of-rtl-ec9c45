// tb_pps_kword_mux: self-checking test of the frequency-word selector.
// Checks the reset value, that sel = 0 gives the built-in word and sel = 1
// the loaded word, and the one-clk latency, with random words and selects.
module tb_pps_kword_mux;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned W = 32;
  localparam logic [W-1:0] PRESET = 32'd6871948;

  logic         clk = 1'b0;
  logic         rst_n, sel;
  logic [W-1:0] loaded, k;

  int checks = 0, failures = 0;

  pps_kword_mux #(.W(W), .PRESET(PRESET)) dut (
    .clk(clk), .rst_n(rst_n), .sel(sel), .loaded(loaded), .k(k));

  always #10 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
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

  initial begin
    logic         prev_sel;
    logic [W-1:0] prev_loaded;
    rst_n  = 1'b0;
    sel    = 1'b1;
    loaded = 32'h1234_5678;
    @(posedge clk); #1;
    check(k == PRESET, "reset loads the built-in word");
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(k == 32'h1234_5678, "sel=1 passes the loaded word");
    sel = 1'b0;
    #1;
    check(k == 32'h1234_5678, "k is registered: no change before the clock");
    @(posedge clk); #1;
    check(k == PRESET, "sel=0 gives the built-in word");
    for (int i = 0; i < 500; i++) begin
      prev_sel    = ($urandom_range(0, 1) == 1);
      prev_loaded = $urandom;
      sel    = prev_sel;
      loaded = prev_loaded;
      @(posedge clk); #1;
      check(k == (prev_sel ? prev_loaded : PRESET),
            $sformatf("sel=%0b loaded=%h -> k=%h", prev_sel, prev_loaded, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
