// tb_pps_input_data: self-checking test of the serial input block.
// A task plays the control unit: it shifts a 2-bit address with reg_cnt
// high, then the data bits MSB first with reg_cnt low, toggling data_clk2
// every HALF clk cycles. After each write the test compares all four
// registers with a model kept in the testbench, so a write to one register
// must leave the others alone. It also checks the reset values, a partial
// (bit-serial) write and the latency from a data_clk2 edge to the register.
module tb_pps_input_data;
  timeunit 1ns; timeprecision 1ps;
  import pps_pkg::*;
  localparam int unsigned N = 32, CNT_W = 12, MNG_W = 4;
  localparam int HALF = 4;

  logic             clk = 1'b0;
  logic             rst_n, data_clk2, reg_cnt, data_in;
  logic [1:0]       addr;
  logic [N-1:0]     k2, k3;
  logic [CNT_W-1:0] k0;
  logic [MNG_W-1:0] mng;

  int checks = 0, failures = 0;

  pps_input_data #(.N(N), .CNT_W(CNT_W), .MNG_W(MNG_W)) dut (
    .clk(clk), .rst_n(rst_n), .data_clk2(data_clk2), .reg_cnt(reg_cnt), .data_in(data_in),
    .addr(addr), .k2(k2), .k3(k3), .k0(k0), .mng(mng));

  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic send_bit(input logic rc, input logic b);
    reg_cnt = rc;
    data_in = b;
    repeat (HALF) @(posedge clk);
    data_clk2 = 1'b1;
    repeat (HALF) @(posedge clk);
    data_clk2 = 1'b0;
  endtask

  task automatic write_reg(input logic [1:0] a, input logic [63:0] value, input int bits);
    send_bit(1'b1, a[1]);
    send_bit(1'b1, a[0]);
    for (int i = bits - 1; i >= 0; i--) send_bit(1'b0, value[i]);
    repeat (HALF) @(posedge clk);
  endtask

  logic [N-1:0]     m_k2, m_k3;
  logic [CNT_W-1:0] m_k0;
  logic [MNG_W-1:0] m_mng;

  task automatic compare_all(input string when);
    check(k2 == m_k2,   $sformatf("%s: k2 %h vs %h", when, k2, m_k2));
    check(k3 == m_k3,   $sformatf("%s: k3 %h vs %h", when, k3, m_k3));
    check(k0 == m_k0,   $sformatf("%s: k0 %h vs %h", when, k0, m_k0));
    check(mng == m_mng, $sformatf("%s: mng %h vs %h", when, mng, m_mng));
  endtask

  initial begin
    logic [N-1:0] v;
    int lat;
    rst_n = 1'b0;
    data_clk2 = 1'b0;
    reg_cnt = 1'b0;
    data_in = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    m_k2 = 32'd1073741824; m_k3 = 32'd6871948; m_k0 = 12'd10; m_mng = '0;
    compare_all("after reset");

    write_reg(REG_K3, 64'd515396, N);     m_k3 = 32'd515396;    compare_all("k3 write");
    check(addr == REG_K3, "address register holds the last address");
    write_reg(REG_K0, 64'd1030, CNT_W);   m_k0 = 12'd1030;      compare_all("k0 write");
    write_reg(REG_K2, 64'h2000_0000, N);  m_k2 = 32'h2000_0000; compare_all("k2 write");
    write_reg(REG_MNG, 64'hA, MNG_W);     m_mng = 4'hA;         compare_all("mng write");

    for (int i = 0; i < 40; i++) begin
      logic [1:0] a;
      a = 2'($urandom_range(0, 3));
      v = $urandom;
      unique case (a)
        REG_K2:  begin write_reg(a, 64'(v), N);     m_k2  = v; end
        REG_K3:  begin write_reg(a, 64'(v), N);     m_k3  = v; end
        REG_K0:  begin write_reg(a, 64'(v), CNT_W); m_k0  = v[CNT_W-1:0]; end
        REG_MNG: begin write_reg(a, 64'(v), MNG_W); m_mng = v[MNG_W-1:0]; end
      endcase
      compare_all($sformatf("random write %0d to %0d", i, a));
    end

    // a short write shifts the old contents up: 3 bits into k0
    write_reg(REG_K0, 64'b101, 3);
    m_k0 = {m_k0[CNT_W-4:0], 3'b101};
    compare_all("3-bit shift into k0");

    // latency: one data bit, count clk from the data_clk2 rising edge
    reg_cnt = 1'b0;
    data_in = ~k0[CNT_W-1];
    repeat (HALF) @(posedge clk);
    v = N'(k0);
    data_clk2 = 1'b1;
    lat = 0;
    while (k0 == v[CNT_W-1:0] && lat < 20) begin
      @(posedge clk);
      lat++;
    end
    data_clk2 = 1'b0;
    check(lat == 3, $sformatf("shift seen %0d clk after data_clk2 rises, expected 3", lat));

    // reset restores the built-in words
    rst_n = 1'b0;
    @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    m_k2 = 32'd1073741824; m_k3 = 32'd6871948; m_k0 = 12'd10; m_mng = '0;
    compare_all("second reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
