// tse_decoder: on-chip decompressor for twin-symbol-encoded (TSE) scan test data, with the
// scan chain it fills.
//
// Test data is compressed off-chip: don't-care bits are filled with the value of the bit
// before them (adjacent filling, which keeps scan-shift transitions and so test power low),
// the filled stream is cut into runs of equal bits, each run is written as symbols of at most
// M bits, and the symbols are Huffman coded. A run of length L > M becomes symbols M' (M bits,
// value held) until at most M bits remain, then one symbol k (k bits, then the value toggles).
// The decoder undoes this:
//
//   tester --ate_data--> tse_fsm (tester clock) --run_len, run_req--> tse_counter (chip clock)
//                          |  data line                                     | shift
//                          +------------------------------> scan_in  scan_chain <--+
//
// tse_fsm decodes the Huffman codewords and keeps the data value; tse_counter counts out each
// run on the chip clock; while it does so (shift high) the data line is shifted into the scan
// chain. stop tells the tester to hold its bit while the decoder has a run waiting. The two
// clocks may be unrelated; the run hand-over crosses between them with synchronised toggles.
// scan_en gates shifting: a run in progress pauses while scan_en is low.
//
// Ports: clk_ate and tester-side signals (ate_valid/ate_data/stop, cfg_* code-table writes,
// init_data = value of the first run, constant during a test), clk_soc and chip-side signals
// (scan_en, scan chain outputs), one asynchronous active-low reset for both domains, and
// scan_shift/scan_in for observing each bit as it enters the chain, run_busy (a run is being
// counted out) and last_hold (the run held by the decoder came from the twin symbol M').
//
// The block structure (FSM on the tester clock, counter on the chip clock, one-bit data line
// from the FSM gated into the scan chain, Stop) follows the method; the interfaces between the
// blocks and the programmable code table are this design's choices.
module tse_decoder
  import tse_pkg::*;
#(
  parameter  int unsigned M        = MAX_BLOCK_LEN,
  parameter  int unsigned SCAN_LEN_P = SCAN_LEN,
  localparam int unsigned IW       = $clog2(M + 1),
  localparam int unsigned NW       = (M > 1) ? $clog2(M) : 1
) (
  input  logic                  clk_ate,
  input  logic                  clk_soc,
  input  logic                  rst_n,
  input  logic                  init_data,
  // tester side
  input  logic                  ate_valid,
  input  logic                  ate_data,
  output logic                  stop,
  input  logic                  cfg_we,
  input  logic [NW-1:0]         cfg_node,
  input  logic                  cfg_bit,
  input  logic                  cfg_leaf,
  input  logic [IW-1:0]         cfg_idx,
  // chip side
  input  logic                  scan_en,
  output logic                  scan_shift,
  output logic                  scan_in,
  output logic                  scan_out,
  output logic [SCAN_LEN_P-1:0] scan_q,
  output logic                  run_busy,
  output logic                  last_hold
);
  logic          data_line;
  logic [IW-1:0] run_len;
  logic          run_req;
  logic          run_ack;

  tse_fsm #(.M(M)) u_fsm (
    .clk_ate   (clk_ate),
    .rst_n     (rst_n),
    .init_data (init_data),
    .ate_valid (ate_valid),
    .ate_data  (ate_data),
    .stop      (stop),
    .cfg_we    (cfg_we),
    .cfg_node  (cfg_node),
    .cfg_bit   (cfg_bit),
    .cfg_leaf  (cfg_leaf),
    .cfg_idx   (cfg_idx),
    .data      (data_line),
    .run_len   (run_len),
    .run_req   (run_req),
    .run_ack   (run_ack),
    .last_hold (last_hold)
  );

  tse_counter #(.M(M)) u_counter (
    .clk_soc (clk_soc),
    .rst_n   (rst_n),
    .en      (scan_en),
    .run_req (run_req),
    .run_len (run_len),
    .run_ack (run_ack),
    .shift   (scan_shift),
    .busy    (run_busy)
  );

  // The data line reaches the scan chain only in cycles the counter enables.
  assign scan_in = data_line;

  scan_chain #(.LEN(SCAN_LEN_P)) u_chain (
    .clk      (clk_soc),
    .rst_n    (rst_n),
    .shift_en (scan_shift),
    .scan_in  (data_line),
    .scan_out (scan_out),
    .q        (scan_q)
  );
endmodule
