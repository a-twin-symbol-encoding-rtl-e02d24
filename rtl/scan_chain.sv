// scan_chain: the scan chain of the circuit under test, as seen by the decompressor.
//
// A shift register of LEN flops. On a rising clk edge with shift_en high the bit on scan_in
// enters cell 0 and every cell moves one place towards cell LEN-1, whose value is scan_out.
// With shift_en low the cells hold. q shows all cells, so a test can see the loaded vector.
// The capture of the circuit's response is not modelled. The chain belongs to the circuit
// under test; its length (default 64) and the reset to 0 are this design's choices.
module scan_chain
  import tse_pkg::*;
#(
  parameter int unsigned LEN = SCAN_LEN
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           scan_in,
  output logic           scan_out,
  output logic [LEN-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= {q[LEN-2:0], scan_in};
  end

  assign scan_out = q[LEN-1];
endmodule
