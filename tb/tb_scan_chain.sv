// tb_scan_chain: checks the scan chain against a reference shift register kept in the
// testbench. Random scan_in and shift_en for 2000 cycles; every cycle all cells and
// scan_out are compared. Default length (64 cells).
`timescale 1ns / 1ps
module tb_scan_chain;
  import tse_pkg::*;
  localparam int unsigned L = SCAN_LEN;

  logic clk = 0, rst_n = 0, shift_en = 0, scan_in = 0, scan_out;
  logic [L-1:0] q;
  bit   model [L];
  int unsigned checks = 0, failures = 0, shifts = 0;

  scan_chain dut (.clk(clk), .rst_n(rst_n), .shift_en(shift_en), .scan_in(scan_in),
                  .scan_out(scan_out), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      ok = 1;
      foreach (model[i]) if (q[i] != model[i]) ok = 0;
      checks++;
      if (!ok || scan_out != model[L-1]) begin
        failures++;
        if (failures < 5) $display("FAIL cycle %0d", c);
      end
      shift_en = ($urandom % 4) != 0;
      scan_in  = $urandom % 2;
      if (shift_en) begin
        shifts++;
        for (int i = L - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = scan_in;
      end
    end
    checks++;
    if (shifts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
