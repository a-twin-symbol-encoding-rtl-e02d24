// tb_tse_counter: checks the run-length counter on its own (M = 16). The testbench plays the
// decoder: it presents a random run length 1..16, toggles run_req, and waits for run_ack to
// toggle before the next run. Per run it checks that shift is high in exactly run_len cycles,
// never while en is low, that run_ack toggles once, and, with en held high, that the first
// shift comes 3 chip-clock edges after the run_req toggle and run_ack toggles on the edge of the last shift.
`timescale 1ns / 1ps
module tb_tse_counter;
  import tse_pkg::*;
  localparam int unsigned M  = MAX_BLOCK_LEN;
  localparam int unsigned IW = $clog2(M + 1);

  logic clk = 0, rst_n = 0, en = 1, run_req = 0, run_ack, shift, busy;
  logic [IW-1:0] run_len = IW'(1);
  int unsigned checks = 0, failures = 0;

  tse_counter dut (.clk_soc(clk), .rst_n(rst_n), .en(en), .run_req(run_req), .run_len(run_len),
                   .run_ack(run_ack), .shift(shift), .busy(busy));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned len, nshift, cyc, first, acks;
    bit          ack0, rand_en;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 400; r++) begin
      rand_en = (r >= 100);
      len     = 1 + $urandom % M;
      @(negedge clk);
      run_len = IW'(len);
      run_req = ~run_req;
      ack0    = run_ack;
      nshift  = 0;
      cyc     = 0;
      first   = 0;
      acks    = 0;
      // run_ack toggles on the edge of the last shift
      while (run_ack == ack0 && cyc < 200) begin
        en = rand_en ? (($urandom % 3) != 0) : 1'b1;
        #1;
        if (shift) begin
          nshift++;
          if (first == 0) first = cyc;
          check(en, "shift only with en");
        end
        @(negedge clk);
        cyc++;
      end
      check(nshift == len, $sformatf("run %0d: %0d shifts for length %0d", r, nshift, len));
      check(run_ack != ack0, "run_ack toggled");
      if (!rand_en) begin
        check(first == 3, $sformatf("first shift after %0d cycles", first));
        check(cyc == len + 3, $sformatf("run took %0d cycles for length %0d", cyc, len));
      end
      // no further shift without a new request
      repeat (4) begin
        #1;
        check(!shift && !busy, "idle after run");
        if (run_ack != ~ack0) acks++;
        @(negedge clk);
      end
      check(acks == 0, "single ack toggle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
