// tb_tse_fig1_example: the worked example of twin-symbol encoding with block-length limit 4.
//
// Test cube (X = don't care):  1XXX 0XX 11XX1X1 0XXXXX 1XXX1XXX 0XX, then a 12-bit run of 1s
// Adjacent fill:               1111 000 1111111 000000 11111111 000 111111111111
// Runs 4,3,7,6,8,3 encode as   4[1] 3[0] 4'[1] 3[1] 4'[0] 2[0] 4'[1] 4[1] 3[0]   (9 symbols,
// against 12 for run-length Huffman, which needs an extra empty symbol at each division), and
// the 12-bit run as 4' 4' 4 (3 symbols against 5). The testbench checks its encoder against
// this symbol list, then sends the Huffman-coded stream to a decoder with M = 4 and a 43-cell
// scan chain and checks every bit shifted in and the final chain contents.
`timescale 1ns / 1ps
module tb_tse_fig1_example;
  import tse_tb_pkg::*;
  localparam int unsigned M  = 4;
  localparam int unsigned L  = 43;
  localparam int unsigned IW = $clog2(M + 1);
  localparam int unsigned NW = $clog2(M);
  localparam string CUBE = "1XXX0XX11XX1X10XXXXX1XXX1XXX0XX1XXXXXXXXXXX";
  // expected symbols: length, hold, value
  localparam int unsigned NSYM = 12;
  localparam int unsigned EXP_LEN  [NSYM] = '{4, 3, 4, 3, 4, 2, 4, 4, 3, 4, 4, 4};
  localparam bit          EXP_HOLD [NSYM] = '{0, 0, 1, 0, 1, 0, 1, 0, 0, 1, 1, 0};
  localparam bit          EXP_VAL  [NSYM] = '{1, 0, 1, 1, 0, 0, 1, 1, 0, 1, 1, 1};

  logic clk_ate = 0, clk_soc = 0, rst_n = 0, init_data = 1;
  logic ate_valid = 0, ate_data = 0, stop;
  logic cfg_we = 0, cfg_bit = 0, cfg_leaf = 0;
  logic [NW-1:0] cfg_node = '0;
  logic [IW-1:0] cfg_idx = '0;
  logic scan_en = 1, scan_shift, scan_in, scan_out, run_busy, last_hold;
  logic [L-1:0] scan_q;

  tse_decoder #(.M(M), .SCAN_LEN_P(L)) dut (.*);

  always #10 clk_ate = ~clk_ate;
  always #4 clk_soc = ~clk_soc;

  int unsigned checks = 0, failures = 0, got = 0, n_twin_seen = 0;
  bit bits[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk_soc) begin
    if (rst_n && scan_shift) begin
      if (got < bits.size()) check(scan_in == bits[got], $sformatf("bit %0d", got));
      else check(1'b0, "extra bit");
      got++;
    end
  end
  always @(posedge last_hold) n_twin_seen++;

  initial begin : watchdog
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    byte         cube[$];
    sym_t        syms[$];
    bit          stream[$];
    int unsigned freq[];
    huff_code    hc;
    bit          first_part[$];
    for (int i = 0; i < CUBE.len(); i++)
      cube.push_back(CUBE[i] == "X" ? 8'd2 : byte'(CUBE[i] - "0"));
    adjacent_fill(cube, 1'b1, bits);
    tse_symbols(bits, M, syms);
    check(syms.size() == NSYM, $sformatf("%0d symbols", syms.size()));
    foreach (syms[i])
      if (i < NSYM)
        check(syms[i].len == EXP_LEN[i] && syms[i].hold == EXP_HOLD[i] && syms[i].val == EXP_VAL[i],
              $sformatf("symbol %0d", i));
    for (int i = 0; i < 31; i++) first_part.push_back(bits[i]);
    check(rl_count(first_part, M) == 12, "run-length Huffman needs 12 symbols for the first 31 bits");
    freq = new[M + 1];
    foreach (syms[i]) freq[sym_index(syms[i], M)]++;
    hc = new(M);
    hc.build(freq);
    hc.encode(syms, stream);
    $display("%0d bits -> %0d symbols -> %0d code bits", bits.size(), syms.size(), stream.size());
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
      while (stop) @(negedge clk_ate);
    end
    @(negedge clk_ate);
    ate_valid = 0;
    repeat (400) @(negedge clk_soc);
    check(got == L, $sformatf("%0d bits shifted", got));
    for (int unsigned i = 0; i < L; i++) check(scan_q[i] == bits[L - 1 - i], $sformatf("cell %0d", i));
    check(n_twin_seen > 0, "twin symbols decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
