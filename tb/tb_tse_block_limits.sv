// tb_tse_block_limits: the three block-length limits the method is evaluated with (M = 8, 16
// and 32), side by side on the same test data. A random stream of test cubes with 90% don't-
// care bits (typical of scan test sets) is filled adjacently and decompressed by one decoder
// per limit; each must reproduce the filled stream exactly. The testbench also reports, per
// limit, the number of TSE symbols against the number the earlier run-length Huffman scheme
// (with an extra empty symbol at every block division) would need, and the compression ratio
// (1 - compressed bits / original bits). It checks that TSE never needs more symbols, and
// that its saving is largest at the smallest limit.
`timescale 1ns / 1ps
module tb_tse_block_limits;
  import tse_tb_pkg::*;
  localparam int unsigned NBITS = 6000;

  logic clk_ate = 0, clk_soc = 0, start = 0;
  bit   init_val;
  always #10 clk_ate = ~clk_ate;
  always #2.5 clk_soc = ~clk_soc;

  logic        done8, done16, done32;
  int unsigned c8, f8, t8, r8, b8, w8, s8;
  int unsigned c16, f16, t16, r16, b16, w16, s16;
  int unsigned c32, f32, t32, r32, b32, w32, s32;
  int unsigned checks = 0, failures = 0;

  tse_e2e_harness #(.M(8))  h8  (.clk_ate, .clk_soc, .start, .init_val, .done(done8),
    .checks(c8), .failures(f8), .n_tse(t8), .n_rl(r8), .n_code(b8), .n_twin(w8), .n_stop(s8));
  tse_e2e_harness #(.M(16)) h16 (.clk_ate, .clk_soc, .start, .init_val, .done(done16),
    .checks(c16), .failures(f16), .n_tse(t16), .n_rl(r16), .n_code(b16), .n_twin(w16), .n_stop(s16));
  tse_e2e_harness #(.M(32)) h32 (.clk_ate, .clk_soc, .start, .init_val, .done(done32),
    .checks(c32), .failures(f32), .n_tse(t32), .n_rl(r32), .n_code(b32), .n_twin(w32), .n_stop(s32));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real improvement(int unsigned tse, int unsigned rl);
    return 100.0 * (real'(rl) - real'(tse)) / real'(rl);
  endfunction

  initial begin : watchdog
    #20ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    byte cube[$];
    bit  bits[$];
    random_cube(NBITS, 90, cube);
    init_val = $urandom % 2;
    cube[0] = 8'd2;
    adjacent_fill(cube, init_val, bits);
    h8.bits = bits;
    h16.bits = bits;
    h32.bits = bits;
    #1 start = 1;
    wait (done8 && done16 && done32);
    $display("limit  TSE symbols  RL-Huffman symbols  improvement  compression");
    $display("  8    %6d       %6d              %5.1f%%       %5.1f%%", t8, r8, improvement(t8, r8), 100.0 * (1.0 - real'(b8) / NBITS));
    $display(" 16    %6d       %6d              %5.1f%%       %5.1f%%", t16, r16, improvement(t16, r16), 100.0 * (1.0 - real'(b16) / NBITS));
    $display(" 32    %6d       %6d              %5.1f%%       %5.1f%%", t32, r32, improvement(t32, r32), 100.0 * (1.0 - real'(b32) / NBITS));
    checks += c8 + c16 + c32;
    failures += f8 + f16 + f32;
    check(t8 <= r8 && t16 <= r16 && t32 <= r32, "TSE needs no more symbols than RL-Huffman");
    check(improvement(t8, r8) >= improvement(t16, r16) && improvement(t16, r16) >= improvement(t32, r32),
          "saving largest at the smallest limit");
    check(w8 > 0 && w16 > 0 && w32 > 0, "twin symbols used at every limit");
    check(s8 > 0 && s16 > 0 && s32 > 0, "stop used at every limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
