// sync_2ff: two-flop synchroniser for signals that cross from one clock domain into another.
//
// The decompressor runs its FSM on the tester (ATE) clock and its counter and scan chain on
// the chip (SoC) clock. The two exchange only toggle flags (one toggle per handed-over run),
// and each flag passes through one of these before it is used, so the two clocks may be
// unrelated. Latency is two cycles of the receiving clock. The flops are reset to 0 by the
// asynchronous active-low reset, which matches the reset value of the toggles they carry.
// The synchroniser is this design's choice; the source method does not describe how its two
// clock domains meet.
module sync_2ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
