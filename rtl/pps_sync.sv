// pps_sync: two-flip-flop synchronizer for W independent asynchronous
// inputs (external pins) into the clk domain. Output lags the input by two
// clk cycles; each bit is synchronized on its own, so it is meant for
// levels and slow signals, not for multi-bit words. Reset clears both
// stages.
module pps_sync #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] meta;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
