// tb_tse_decoder: end-to-end test of the TSE decompressor at its default size (M = 16,
// 64-cell scan chain), from test cubes to scan-chain contents.
//
// The testbench plays the tester and the compression software. It makes random test cubes
// with don't-care bits, fills them adjacently, cuts them into TSE symbols, Huffman-codes them
// and sends the code one bit per tester clock, holding a bit while stop is high. On the chip
// side it toggles scan_en at random and records every bit that enters the scan chain, which
// must equal the filled stream bit for bit; at the end the chain must hold the last 64 bits.
//   phase 1: the decoder's reset-default code.
//   phase 2: a Huffman code built from the stream's own symbol counts, written through cfg_*.
// Tester clock 20 ns, chip clock 7 ns (unrelated). Counted mechanisms, each of which must
// occur: toggle symbols, twin symbols M', stop holding the tester, runs paused by scan_en,
// tester idle cycles, code-table writes. The number of transitions in the shifted stream
// (what costs scan-shift power) must equal the number of toggle symbols less one.
`timescale 1ns / 1ps
module tb_tse_decoder;
  import tse_pkg::*;
  import tse_tb_pkg::*;

  localparam int unsigned M   = MAX_BLOCK_LEN;
  localparam int unsigned L   = SCAN_LEN;
  localparam int unsigned IW  = $clog2(M + 1);
  localparam int unsigned NW  = $clog2(M);
  localparam int unsigned NBITS = 3000;

  logic clk_ate = 0, clk_soc = 0, rst_n = 0, init_data = 0;
  logic ate_valid = 0, ate_data = 0, stop;
  logic cfg_we = 0, cfg_bit = 0, cfg_leaf = 0;
  logic [NW-1:0] cfg_node = '0;
  logic [IW-1:0] cfg_idx = '0;
  logic scan_en = 1, scan_shift, scan_in, scan_out, run_busy, last_hold;
  logic [L-1:0] scan_q;

  tse_decoder dut (.*);

  always #10 clk_ate = ~clk_ate;
  always #3.5 clk_soc = ~clk_soc;

  int unsigned checks = 0, failures = 0;
  int unsigned n_toggle = 0, n_twin = 0, n_stop = 0, n_pause = 0, n_idle = 0, n_cfg = 0;
  bit expected[$];
  int unsigned got = 0;
  int unsigned n_trans = 0;   // transitions in the shifted stream (scan-shift power)
  bit prev_bit;
  bit monitor_on = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // chip side: record each bit shifted into the chain
  always @(negedge clk_soc) begin
    if (monitor_on && scan_shift) begin
      if (got < expected.size()) check(scan_in == expected[got], $sformatf("scan bit %0d", got));
      else check(1'b0, "more bits than expected");
      if (got > 0 && scan_in != prev_bit) n_trans++;
      prev_bit = scan_in;
      got++;
    end
    if (run_busy && !scan_en) n_pause++;
  end
  always @(posedge clk_soc) scan_en <= ($urandom % 8) != 0;

  task automatic send_bit(input bit b);
    @(negedge clk_ate);
    if (($urandom % 16) == 0) begin
      ate_valid = 0;
      n_idle++;
      @(negedge clk_ate);
    end
    ate_valid = 1;
    ate_data  = b;
    while (stop) begin
      n_stop++;
      @(negedge clk_ate);
    end
    @(posedge clk_ate);
  endtask

  task automatic send_stream(input bit stream[$]);
    foreach (stream[i]) send_bit(stream[i]);
    @(negedge clk_ate);
    ate_valid = 0;
  endtask

  task automatic write_table(huff_code hc);
    for (int unsigned n = 0; n < M; n++)
      for (int b = 0; b < 2; b++) begin
        @(negedge clk_ate);
        cfg_we   = 1;
        cfg_node = NW'(n);
        cfg_bit  = b[0];
        cfg_leaf = hc.t_leaf[n][b];
        cfg_idx  = IW'(hc.t_idx[n][b]);
        n_cfg++;
      end
    @(negedge clk_ate);
    cfg_we = 0;
  endtask

  task automatic wait_drained();
    int unsigned t;
    t = 0;
    while (got < expected.size() && t < 200000) begin
      @(posedge clk_soc);
      t++;
    end
    repeat (20) @(posedge clk_soc);
  endtask

  task automatic run_phase(input bit use_default, input bit start, input int unsigned x_pct,
                           output bit next_start);
    byte     cube[$];
    bit      bits[$], stream[$];
    sym_t    syms[$];
    int unsigned freq[];
    huff_code hc;
    random_cube(NBITS, x_pct, cube);
    cube[0] = 8'd2;
    adjacent_fill(cube, start, bits);
    tse_symbols(bits, M, syms);
    freq = new[M + 1];
    foreach (syms[i]) begin
      freq[sym_index(syms[i], M)]++;
      if (syms[i].hold) n_twin++;
      else n_toggle++;
    end
    hc = new(M);
    if (use_default) hc.set_default();
    else begin
      hc.build(freq);
      write_table(hc);
    end
    hc.encode(syms, stream);
    $display("phase: %0d bits, %0d TSE symbols (run-length Huffman would need %0d), %0d code bits",
             bits.size(), syms.size(), rl_count(bits, M), stream.size());
    foreach (bits[i]) expected.push_back(bits[i]);
    send_stream(stream);
    next_start = syms[syms.size() - 1].val ^ 1'b1;
  endtask

  initial begin : watchdog
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit s;
    init_data = 1'b1;
    repeat (3) @(posedge clk_ate);
    rst_n = 1;
    monitor_on = 1;
    run_phase(1'b1, init_data, 70, s);
    wait_drained();
    run_phase(1'b0, s, 85, s);
    wait_drained();
    check(got == expected.size(), $sformatf("bit count %0d vs %0d", got, expected.size()));
    for (int unsigned i = 0; i < L; i++)
      check(scan_q[i] == expected[expected.size() - 1 - i], $sformatf("scan cell %0d", i));
    check(scan_out == expected[expected.size() - L], "scan_out");
    check(!run_busy && !stop, "decoder idle at end");
    $display("mechanisms: toggle=%0d twin=%0d stop=%0d pause=%0d idle=%0d cfg=%0d",
             n_toggle, n_twin, n_stop, n_pause, n_idle, n_cfg);
    // transitions only where a toggle symbol ends a run (not after the very last one)
    check(n_trans == n_toggle - 1, $sformatf("%0d transitions for %0d toggle symbols", n_trans, n_toggle));
    check(n_toggle > 0, "toggle symbols used");
    check(n_twin > 0, "twin symbols used");
    check(n_stop > 0, "stop held the tester");
    check(n_pause > 0, "scan_en paused a run");
    check(n_idle > 0, "tester idle cycles");
    check(n_cfg > 0, "code table written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
