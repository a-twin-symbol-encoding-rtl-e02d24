// tse_fsm: symbol decoder of the twin-symbol-encoding (TSE) test data decompressor.
//
// The tester sends the compressed test data as a serial stream of Huffman codewords, one bit
// per tester clock. Each codeword names one TSE symbol: k (1 <= k <= m) means "k bits equal to
// the current data value, then invert the data value", and the twin m' means "m bits equal to
// the current data value, then keep it". This module walks the Huffman code tree one bit at a
// time. On reaching a leaf it hands the run (its length and its data value) to the counter,
// which shifts it into the scan chain on the chip clock, and it updates the data value for the
// next run: inverted after k, unchanged after m'. The hold-or-toggle update is the only place
// where TSE differs from a plain run-length Huffman decoder.
//
// Code table. The Huffman code depends on the test set, so it is held in a small table, not
// fixed in logic: node n (0..M-1) has two entries, one per input bit, each either a pointer to
// another node or a leaf with a symbol index (0..M-1 for runs 1..M with toggle, M for the twin
// M'). A tree with M+1 leaves has exactly M internal nodes, so the walk has M states. The table
// is written through the cfg_* port; after reset it holds a default code in which node n
// decodes bit 0 as symbol n and bit 1 as "go to node n+1", and the last node decodes bit 1 as
// the twin M' (the codeword of symbol k is k-1 ones then a zero).
//
// Hand-over. One run at a time is held in run_len/data. A new run is announced by toggling
// run_req; the counter toggles run_ack once it has shifted the whole run, and this module sees
// that through a two-flop synchroniser. While a run is held and not yet acknowledged, stop is
// high and no tester bit is taken, so data and run_len never change while the counter uses
// them. A tester bit is taken on a rising clk_ate edge with ate_valid high and stop low.
//
// Following the method: symbol set, toggle/hold rule, Huffman-coded input, FSM on the tester
// clock, a counter, a one-bit data line and a Stop signal. This design's own choices: the
// programmable tree table and its default, ate_valid, the toggle handshake, the init_data input
// that sets the value of the first run (the data line is the internal value XOR init_data),
// and the asynchronous active-low reset.
module tse_fsm
  import tse_pkg::*;
#(
  parameter  int unsigned M  = MAX_BLOCK_LEN,
  localparam int unsigned IW = $clog2(M + 1),        // node or symbol index
  localparam int unsigned NW = (M > 1) ? $clog2(M) : 1  // node index
) (
  input  logic          clk_ate,
  input  logic          rst_n,
  input  logic          init_data,   // value of the first run, held constant during a test
  // serial compressed data from the tester
  input  logic          ate_valid,
  input  logic          ate_data,
  output logic          stop,        // high: tester must hold its current bit
  // code table write port (tester clock domain)
  input  logic          cfg_we,
  input  logic [NW-1:0] cfg_node,    // internal node 0..M-1
  input  logic          cfg_bit,     // which child: the input bit value
  input  logic          cfg_leaf,    // 1: child is a leaf, 0: child is node cfg_idx
  input  logic [IW-1:0] cfg_idx,     // node index or symbol index
  // run hand-over to the counter
  output logic          data,        // data line: value of every bit of the current run
  output logic [IW-1:0] run_len,     // length of the current run, 1..M
  output logic          run_req,     // toggles once per new run
  input  logic          run_ack,     // toggles once per finished run (counter clock domain)
  // status
  output logic          last_hold    // the run being held came from the twin symbol M'
);
  typedef struct packed {
    logic          leaf;
    logic [IW-1:0] idx;
  } entry_t;

  entry_t tree [M][2];

  logic   [NW-1:0] node;  // current tree node (the FSM state)
  logic   ack_s;
  logic   cur;          // next run's value relative to init_data
  logic   run_val;      // current run's value relative to init_data
  logic   accept;
  entry_t e;
  logic   is_twin;
  logic   [IW-1:0] len_of_sym;

  sync_2ff #(.W(1)) u_ack_sync (.clk(clk_ate), .rst_n(rst_n), .d(run_ack), .q(ack_s));

  assign stop   = run_req ^ ack_s;
  assign data   = run_val ^ init_data;
  assign accept = ate_valid && !stop;
  assign e      = tree[node][ate_data];
  assign is_twin    = (e.idx == IW'(M));
  assign len_of_sym = is_twin ? IW'(M) : e.idx + IW'(1);

  // code table
  always_ff @(posedge clk_ate or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < M; n++) begin
        tree[n][0] <= '{leaf: 1'b1, idx: IW'(n)};
        if (n == M - 1) tree[n][1] <= '{leaf: 1'b1, idx: IW'(M)};
        else            tree[n][1] <= '{leaf: 1'b0, idx: IW'(n + 1)};
      end
    end else if (cfg_we) begin
      tree[cfg_node][cfg_bit] <= '{leaf: cfg_leaf, idx: cfg_idx};
    end
  end

  // tree walk and run hand-over
  always_ff @(posedge clk_ate or negedge rst_n) begin
    if (!rst_n) begin
      node      <= '0;
      cur       <= 1'b0;
      run_val   <= 1'b0;
      run_len   <= IW'(1);
      run_req   <= 1'b0;
      last_hold <= 1'b0;
    end else if (accept) begin
      if (e.leaf) begin
        node      <= '0;
        run_val   <= cur;
        run_len   <= len_of_sym;
        run_req   <= ~run_req;
        last_hold <= is_twin;
        cur       <= is_twin ? cur : ~cur;
      end else begin
        node <= e.idx[NW-1:0];
      end
    end
  end

  // A code table entry must point to an existing node or name an existing symbol.
  a_cfg_range: assert property (@(posedge clk_ate) disable iff (!rst_n)
    cfg_we |-> (int'(cfg_node) < M) && (cfg_leaf ? (cfg_idx <= IW'(M)) : (cfg_idx < IW'(M))));
endmodule
