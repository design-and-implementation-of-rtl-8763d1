// tb_spw_ddr_out: DDR output register unit test.
//
// Random even/odd pairs are applied at each rising edge. The output is
// sampled in the middle of each clock half: the high phase must show the
// even bit and the low phase the odd bit of the pair taken at the start of
// that clock. Every change of the output is counted: it may change at most
// once per clock edge (no glitches), since the far receiver clocks itself
// on D xor S.
`timescale 1ns/1ps
module tb_spw_ddr_out;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic d_even = 0, d_odd = 0, q;
  spw_ddr_out dut (.*);

  int changes = 0;
  always @(q) changes++;

  initial begin
    int bad_hi = 0, bad_lo = 0, edges = 0;
    logic e, o;
    #12 rst_n = 1;
    @(posedge clk);
    #0.1 d_even = 1'($urandom); d_odd = 1'($urandom);
    changes = 0;
    repeat (500) begin
      e = d_even; o = d_odd;
      @(posedge clk); edges += 2;
      #0.1 d_even = 1'($urandom); d_odd = 1'($urandom);
      #1.15 if (q != e) bad_hi++;   // high phase
      #2.5  if (q != o) bad_lo++;   // low phase
    end
    check(bad_hi == 0, $sformatf("even bit in high phase: %0d wrong", bad_hi));
    check(bad_lo == 0, $sformatf("odd bit in low phase: %0d wrong", bad_lo));
    check(changes <= edges && changes > edges / 4, $sformatf("%0d output changes for %0d edges", changes, edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
