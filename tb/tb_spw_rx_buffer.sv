// tb_spw_rx_buffer: receive buffer and credit management unit test at the
// default 56-N-char depth.
//
// Checked: no FCT request while fct_enable is low; exactly seven FCTs
// (56 N-chars) granted into an empty buffer; the buffer holds all 56 N-chars
// in order; no new FCT while fewer than eight places are free beyond what
// is outstanding, a new one as soon as eight are read; an N-char beyond the
// granted credit raises credit_error; fct_enable low clears the credit.
`timescale 1ns/1ps
module tb_spw_rx_buffer;
  import spw_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic fct_enable = 0, wr_en = 0, fct_ack = 0, rx_ready = 0;
  nchar_t wr_data = '0, rx_data;
  logic fct_req, credit_error, rx_valid;
  logic [5:0] count;

  spw_rx_buffer dut (.*);

  int acks = 0;
  task automatic grant_all();
    while (fct_req) begin
      #0.1 fct_ack = 1; @(posedge clk); #0.1 fct_ack = 0; acks++;
      @(posedge clk); #0.1;
    end
  endtask

  task automatic write(input nchar_t c);
    #0.1 wr_en = 1; wr_data = c; @(posedge clk); #0.1 wr_en = 0;
  endtask

  initial begin
    #12 rst_n = 1;
    repeat (3) @(posedge clk); #0.1;
    check(!fct_req, "no FCT request while disabled");
    fct_enable = 1; #0.1;
    check(fct_req, "FCT request when enabled");
    grant_all();
    check(acks == 7, $sformatf("%0d FCTs for an empty 56-char buffer", acks));

    for (int k = 0; k < 56; k++) write('{ctrl: (k % 10 == 9), data: 8'(k)});
    @(posedge clk); #0.1;
    check(count == 56 && !credit_error && !fct_req, $sformatf("56 chars held, count %0d", count));

    // read seven: still no FCT; eighth: FCT
    begin
      int bad = 0;
      for (int k = 0; k < 8; k++) begin
        if (rx_data != nchar_t'{ctrl: (k % 10 == 9), data: 8'(k)} || !rx_valid) bad++;
        if (k == 7) check(!fct_req, "no FCT with 7 places free");
        #0.1 rx_ready = 1; @(posedge clk); #0.1 rx_ready = 0;
      end
      #0.1;
      check(fct_req && bad == 0, "FCT with 8 places free, data in order");
      acks = 0;
      grant_all();
      check(acks == 1, "exactly one more FCT");
      #0.1 rx_ready = 1;
      for (int k = 8; k < 56; k++) begin
        if (rx_data != nchar_t'{ctrl: (k % 10 == 9), data: 8'(k)}) bad++;
        @(posedge clk); #0.1;
      end
      rx_ready = 0;
      check(bad == 0 && count == 0, $sformatf("all 56 read in order, %0d bad", bad));
    end

    // 8 granted: the ninth N-char is a credit error
    for (int k = 0; k < 8; k++) write('{ctrl: 1'b0, data: 8'(k)});
    @(posedge clk); #0.1;
    check(!credit_error, "eight N-chars within credit");
    // all granted credit used and no FCT acknowledged since: one more is an error
    write('{ctrl: 1'b0, data: 8'hee});
    @(posedge clk); #0.1;
    check(credit_error, "N-char without credit raises credit_error");
    fct_enable = 0; @(posedge clk); #0.1;
    check(!credit_error && !fct_req, "fct_enable low clears the error");

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
