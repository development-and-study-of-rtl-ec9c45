// pps_input_data: serial input block between the control unit (for example
// a microcontroller) and the synthesizer.
//
// Three wires come from the control unit: data_clk2 (serial clock), reg_cnt
// and data_in. On each rising edge of data_clk2 one bit of data_in is
// shifted in, MSB first. With reg_cnt high the bit goes into the 2-bit
// address register; with reg_cnt low it goes into the shift register the
// address selects (pps_pkg::reg_addr_e): k2 (NCO1 word), k3 (NCO2 word),
// k0 (pause constant) or the mng control bits. This three-wire protocol
// with address and data shift registers follows the published design; the
// register map, the bit order, the reset values (the built-in constants)
// and the width of the mng word are this design's choices.
//
// The registers drive the synthesizer directly, as the published shift
// registers did, so a word changes bit by bit while it is being loaded;
// the control unit should select the built-in frequency word (sel pins) or
// accept the transient while it writes.
//
// Timing: the three inputs are synchronized into clk with two flip-flops,
// so data_clk2 must stay high and low for at least 2 clk cycles each, and
// reg_cnt/data_in must be stable from 3 clk cycles before to 1 cycle after
// its rising edge. A shift takes effect 3 clk cycles after the edge.
module pps_input_data
  import pps_pkg::*;
#(
  parameter int unsigned N     = N_DEF,
  parameter int unsigned CNT_W = CNT_W_DEF,
  parameter int unsigned MNG_W = MNG_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             data_clk2,  // serial clock from the control unit
  input  logic             reg_cnt,    // 1: address bit, 0: data bit
  input  logic             data_in,    // serial data
  output logic [1:0]       addr,       // selected register
  output logic [N-1:0]     k2,         // NCO1 frequency word
  output logic [N-1:0]     k3,         // NCO2 frequency word
  output logic [CNT_W-1:0] k0,         // pause constant
  output logic [MNG_W-1:0] mng         // general control bits
);

  logic [2:0] pins_s;
  logic       sclk_s, rc_s, din_s, sclk_d;
  logic       shift;

  pps_sync #(.W(3)) u_sync (
    .clk   (clk),
    .rst_n (rst_n),
    .d     ({data_clk2, reg_cnt, data_in}),
    .q     (pins_s)
  );

  assign {sclk_s, rc_s, din_s} = pins_s;
  assign shift = sclk_s && !sclk_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sclk_d <= 1'b0;
      addr   <= REG_K2;
      k2     <= N'(K2_DEF);
      k3     <= N'(K3_DEF);
      k0     <= CNT_W'(K0_DEF);
      mng    <= '0;
    end else begin
      sclk_d <= sclk_s;
      if (shift) begin
        if (rc_s) begin
          addr <= {addr[0], din_s};
        end else begin
          unique case (reg_addr_e'(addr))
            REG_K2:  k2  <= {k2[N-2:0], din_s};
            REG_K3:  k3  <= {k3[N-2:0], din_s};
            REG_K0:  k0  <= {k0[CNT_W-2:0], din_s};
            REG_MNG: mng <= {mng[MNG_W-2:0], din_s};
          endcase
        end
      end
    end
  end

endmodule
