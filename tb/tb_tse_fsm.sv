// tb_tse_fsm: checks the TSE symbol decoder on its own (M = 16). The testbench makes random
// symbol sequences (runs 1..16 with toggle, and the twin 16' with hold), Huffman-codes them and
// sends the code bit by bit, holding each bit while stop is high. It plays the counter: after
// each run_req toggle it waits a random number of cycles and toggles run_ack. Every handed-over
// run (run_len, data line, last_hold) must match the symbol sent, with the data value inverted
// after a toggle symbol and kept after the twin; run_len and data must not change while stop
// is high; stop must rise after each hand-over and stay high until the acknowledgement has
// passed the synchroniser (2 cycles). Phase 1 uses the reset-default code, phase 2 a code
// written through cfg_*, phase 3 runs with init_data = 1 after a new reset.
`timescale 1ns / 1ps
module tb_tse_fsm;
  import tse_pkg::*;
  import tse_tb_pkg::*;
  localparam int unsigned M  = MAX_BLOCK_LEN;
  localparam int unsigned IW = $clog2(M + 1);
  localparam int unsigned NW = $clog2(M);

  logic clk = 0, rst_n = 0, init_data = 0, ate_valid = 0, ate_data = 0, stop;
  logic cfg_we = 0, cfg_bit = 0, cfg_leaf = 0;
  logic [NW-1:0] cfg_node = '0;
  logic [IW-1:0] cfg_idx = '0;
  logic data, run_req, run_ack = 0, last_hold;
  logic [IW-1:0] run_len;

  tse_fsm dut (.clk_ate(clk), .rst_n(rst_n), .init_data(init_data), .ate_valid(ate_valid),
               .ate_data(ate_data), .stop(stop), .cfg_we(cfg_we), .cfg_node(cfg_node),
               .cfg_bit(cfg_bit), .cfg_leaf(cfg_leaf), .cfg_idx(cfg_idx), .data(data),
               .run_len(run_len), .run_req(run_req), .run_ack(run_ack), .last_hold(last_hold));

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  sym_t exp_q[$];
  int unsigned n_runs = 0, n_twin = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // counter model: acknowledge each run after a random delay, checking the hand-over
  initial begin
    bit          req_seen;
    int unsigned d;
    sym_t        s;
    logic [IW-1:0] l0;
    logic        d0;
    req_seen = 0;
    forever begin
      @(negedge clk);
      if (!rst_n) begin
        req_seen = 0;
        run_ack  = 0;
        continue;
      end
      if (run_req != req_seen) begin
        req_seen = run_req;
        n_runs++;
        if (exp_q.size() == 0) check(1'b0, "unexpected run");
        else begin
          s = exp_q.pop_front();
          check(run_len == IW'(s.len), $sformatf("run_len %0d exp %0d", run_len, s.len));
          check(data == s.val, "data line value");
          check(last_hold == s.hold, "twin flag");
          if (s.hold) n_twin++;
        end
        l0 = run_len;
        d0 = data;
        d  = $urandom % 6;
        repeat (d) begin
          check(stop, "stop while run pending");
          @(negedge clk);
          check(run_len == l0 && data == d0, "run stable while pending");
        end
        run_ack = ~run_ack;
        // two synchroniser stages: stop stays high for two more edges
        check(stop, "stop before ack synchronised");
        @(negedge clk);
        check(stop, "stop one cycle after ack");
        @(negedge clk);
        check(!stop, "stop released");
      end
    end
  end

  task automatic send_stream(input bit stream[$]);
    foreach (stream[i]) begin
      @(negedge clk);
      if (($urandom % 8) == 0) begin
        ate_valid = 0;
        @(negedge clk);
      end
      ate_valid = 1;
      ate_data  = stream[i];
      while (stop) @(negedge clk);
    end
    @(negedge clk);
    ate_valid = 0;
  endtask

  task automatic write_table(huff_code hc);
    for (int unsigned n = 0; n < M; n++)
      for (int b = 0; b < 2; b++) begin
        @(negedge clk);
        cfg_we = 1; cfg_node = NW'(n); cfg_bit = b[0];
        cfg_leaf = hc.t_leaf[n][b]; cfg_idx = IW'(hc.t_idx[n][b]);
      end
    @(negedge clk);
    cfg_we = 0;
  endtask

  // nsym random symbols whose values start at 'start'; skew > 0 favours short runs
  task automatic make_syms(input int unsigned nsym, input bit start, input int skew,
                           output sym_t syms[$], output bit next_start);
    bit v;
    int unsigned k;
    v = start;
    syms = {};
    for (int unsigned i = 0; i < nsym; i++) begin
      k = $urandom % (M + 1);
      if (skew > 0 && ($urandom % 2) != 0) k = $urandom % 3;
      syms.push_back('{len: (k == M) ? M : k + 1, hold: (k == M), val: v});
      if (k != M) v = ~v;
    end
    next_start = v;
  endtask

  task automatic phase(input bit use_default, input int skew, input bit start, output bit nxt);
    sym_t syms[$];
    bit   stream[$];
    int unsigned freq[];
    huff_code hc;
    make_syms(300, start, skew, syms, nxt);
    hc = new(M);
    if (use_default) hc.set_default();
    else begin
      freq = new[M + 1];
      foreach (syms[i]) freq[sym_index(syms[i], M)]++;
      hc.build(freq);
      write_table(hc);
    end
    hc.encode(syms, stream);
    foreach (syms[i]) exp_q.push_back(syms[i]);
    send_stream(stream);
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, "all runs handed over");
  endtask

  initial begin : watchdog
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    phase(1'b1, 0, 1'b0, s);
    phase(1'b0, 1, s, s);
    // new reset with the first run at value 1
    @(negedge clk);
    rst_n = 0;
    init_data = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    phase(1'b1, 1, 1'b1, s);
    check(n_twin > 0 && n_runs == 900, $sformatf("runs %0d twins %0d", n_runs, n_twin));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
