// tse_e2e_harness: drives one TSE decompressor of block-length limit M from a filled bit
// stream and checks what reaches its scan chain. Used by the testbenches that compare
// several configurations side by side.
//
// When start rises, the harness cuts 'bits' into TSE symbols, builds a Huffman code from their
// counts, writes it into the decoder's code table, sends the code as the tester would (holding
// each bit while stop is high) and compares every bit shifted into the scan chain with 'bits'.
// It raises done once all bits have arrived (or after a time-out) and reports its counts.
`timescale 1ns / 1ps
module tse_e2e_harness #(
  parameter int unsigned M = 8,
  parameter int unsigned L = 64
) (
  input  logic        clk_ate,
  input  logic        clk_soc,
  input  logic        start,
  input  bit          init_val,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned n_tse,      // TSE symbols
  output int unsigned n_rl,       // symbols of run-length Huffman with the same limit
  output int unsigned n_code,     // compressed bits
  output int unsigned n_twin,
  output int unsigned n_stop
);
  import tse_tb_pkg::*;
  localparam int unsigned IW = $clog2(M + 1);
  localparam int unsigned NW = $clog2(M);

  bit bits[$];

  logic rst_n = 0, ate_valid = 0, ate_data = 0, stop;
  logic cfg_we = 0, cfg_bit = 0, cfg_leaf = 0;
  logic [NW-1:0] cfg_node = '0;
  logic [IW-1:0] cfg_idx = '0;
  logic scan_en = 1, scan_shift, scan_in, scan_out, run_busy, last_hold;
  logic [L-1:0] scan_q;
  int unsigned got = 0;

  tse_decoder #(.M(M), .SCAN_LEN_P(L)) dut (
    .clk_ate(clk_ate), .clk_soc(clk_soc), .rst_n(rst_n), .init_data(init_val),
    .ate_valid(ate_valid), .ate_data(ate_data), .stop(stop), .cfg_we(cfg_we),
    .cfg_node(cfg_node), .cfg_bit(cfg_bit), .cfg_leaf(cfg_leaf), .cfg_idx(cfg_idx),
    .scan_en(scan_en), .scan_shift(scan_shift), .scan_in(scan_in), .scan_out(scan_out),
    .scan_q(scan_q), .run_busy(run_busy), .last_hold(last_hold));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 5) $display("FAIL M=%0d %s at %0t", M, what, $time);
    end
  endtask

  always @(negedge clk_soc) begin
    if (rst_n && scan_shift) begin
      if (got < bits.size()) check(scan_in == bits[got], $sformatf("bit %0d", got));
      else check(1'b0, "extra bit");
      got++;
    end
  end

  initial begin
    sym_t        syms[$];
    bit          stream[$];
    int unsigned freq[];
    huff_code    hc;
    int unsigned t;
    done = 0; checks = 0; failures = 0; n_tse = 0; n_rl = 0; n_code = 0; n_twin = 0; n_stop = 0;
    wait (start);
    tse_symbols(bits, M, syms);
    n_tse = syms.size();
    n_rl  = rl_count(bits, M);
    freq  = new[M + 1];
    foreach (syms[i]) begin
      freq[sym_index(syms[i], M)]++;
      if (syms[i].hold) n_twin++;
    end
    hc = new(M);
    hc.build(freq);
    hc.encode(syms, stream);
    n_code = stream.size();
    repeat (2) @(negedge clk_ate);
    rst_n = 1;
    for (int unsigned n = 0; n < M; n++)
      for (int b = 0; b < 2; b++) begin
        @(negedge clk_ate);
        cfg_we = 1; cfg_node = NW'(n); cfg_bit = b[0];
        cfg_leaf = hc.t_leaf[n][b]; cfg_idx = IW'(hc.t_idx[n][b]);
      end
    @(negedge clk_ate);
    cfg_we = 0;
    foreach (stream[i]) begin
      @(negedge clk_ate);
      ate_valid = 1;
      ate_data  = stream[i];
      while (stop) begin
        n_stop++;
        @(negedge clk_ate);
      end
    end
    @(negedge clk_ate);
    ate_valid = 0;
    t = 0;
    while (got < bits.size() && t < 100000) begin
      @(negedge clk_soc);
      t++;
    end
    repeat (10) @(negedge clk_soc);
    check(got == bits.size(), $sformatf("received %0d of %0d bits", got, bits.size()));
    for (int unsigned i = 0; i < L && i < bits.size(); i++)
      check(scan_q[i] == bits[bits.size() - 1 - i], $sformatf("scan cell %0d", i));
    done = 1;
  end
endmodule
