// tse_counter: run-length counter of the TSE test data decompressor, on the chip (SoC) clock.
//
// The symbol decoder (tse_fsm) announces a new run by toggling run_req and holds the run's
// length on run_len and its value on the data line until the run is finished. This counter
// sees the toggle through a two-flop synchroniser, loads the length, and then raises shift for
// exactly that many chip-clock cycles in which en (scan enable) is high; each such cycle moves
// one bit of the data line into the scan chain. When the last bit has been shifted it toggles
// run_ack, which frees the decoder to present the next run. A cycle with en low pauses the
// run, so no bit is lost while the scan chain is not shifting.
//
// Timing: the first shift comes 3 chip cycles after the run_req toggle (2 to synchronise, 1
// to load); run_ack toggles on the clock edge of the last shift.
//
// The method names a counter clocked by the chip clock between the decoder FSM and the scan
// chain; the handshake, the synchroniser and the pause on en are this design's choices.
module tse_counter
  import tse_pkg::*;
#(
  parameter  int unsigned M  = MAX_BLOCK_LEN,
  localparam int unsigned IW = $clog2(M + 1)
) (
  input  logic          clk_soc,
  input  logic          rst_n,
  input  logic          en,        // scan enable: shifting allowed this cycle
  input  logic          run_req,   // toggle from the decoder (tester clock domain)
  input  logic [IW-1:0] run_len,   // 1..M, stable while a run is pending
  output logic          run_ack,   // toggles when a run is finished
  output logic          shift,     // one bit of the data line enters the scan chain
  output logic          busy       // a run is loaded and not finished
);
  logic          req_s;
  logic [IW-1:0] cnt;

  sync_2ff #(.W(1)) u_req_sync (.clk(clk_soc), .rst_n(rst_n), .d(run_req), .q(req_s));

  assign shift = busy && en;

  always_ff @(posedge clk_soc or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cnt     <= '0;
      run_ack <= 1'b0;
    end else if (!busy) begin
      if (req_s != run_ack) begin
        busy <= 1'b1;
        cnt  <= run_len;
      end
    end else if (en) begin
      cnt <= cnt - IW'(1);
      if (cnt == IW'(1)) begin
        busy    <= 1'b0;
        run_ack <= ~run_ack;
      end
    end
  end

  a_len_valid: assert property (@(posedge clk_soc) disable iff (!rst_n)
    (!busy && (req_s != run_ack)) |-> (run_len != '0) && (run_len <= IW'(M)));
endmodule
