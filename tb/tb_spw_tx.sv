// tb_spw_tx: transmitter unit test with an independent bit-stream decoder.
//
// The testbench collects the even/odd pair outputs, checks the strobe rule
// of each flow (S_even = not D_even, S_odd = D_odd), rebuilds the bit stream
// and parses it into characters with its own parity check. Checked: NULLs
// only while just enabled, the 8-bit NULL taking four clocks in DDR mode; an
// FCT on request with one fct_ack; no N-char without credit; exactly eight
// N-chars per received FCT; the time-code sent ahead of waiting N-chars;
// EOP/EEP encodings; credit error on a ninth FCT; in slow mode each bit held
// tx_div clocks.
`timescale 1ns/1ps
module tb_spw_tx;
  import spw_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic tx_enable = 0, fct_enable = 0, data_enable = 0, got_fct = 0, fct_req = 0;
  logic fct_ack, credit_error, tx_valid = 0, tx_ready, tick_in = 0;
  logic [7:0] tx_div = 0, time_in = 0;
  logic [5:0] credit;
  nchar_t tx_data = '0;
  logic d_even, d_odd, s_even, s_odd;

  spw_tx dut (.*);

  // ---- independent decoder ----
  bit     bits[$];
  string  toks[$];
  int     strobe_bad = 0, parity_bad = 0;
  bit     prev_par = 0;   // xor of previous character's data bits
  bit     esc = 0;
  bit     slow = 0;
  int     run_len = 0, hold_bad = 0;
  bit     last_bit;
  bit     started = 0;

  always @(posedge clk) if (tx_enable && rst_n) begin
    if (!slow) begin
      if (started || d_even || s_even) begin
        started = 1;
        if (s_even != !d_even || s_odd != d_odd) strobe_bad++;
        bits.push_back(d_even); bits.push_back(d_odd);
      end
    end
  end

  function automatic void parse();
    forever begin
      bit p, f;
      int n;
      if (bits.size() < 2) return;
      f = bits[1];
      n = f ? 4 : 10;
      if (bits.size() < n) return;
      p = bits[0];
      if ((p ^ f ^ prev_par) != 1'b1) parity_bad++;
      if (f) begin
        logic [1:0] cc;
        cc = {bits[2], bits[3]};
        prev_par = bits[2] ^ bits[3];
        if (esc) begin
          toks.push_back(cc == 2'b00 ? "NULL" : "ESCERR");
          esc = 0;
        end else case (cc)
          2'b00: toks.push_back("FCT");
          2'b01: toks.push_back("EOP");
          2'b10: toks.push_back("EEP");
          default: esc = 1;
        endcase
      end else begin
        logic [7:0] d;
        for (int k = 0; k < 8; k++) d[k] = bits[2 + k];
        prev_par = ^d;
        toks.push_back($sformatf("%s%02h", esc ? "T" : "D", d));
        esc = 0;
      end
      repeat (n) void'(bits.pop_front());
    end
  endfunction

  function automatic int count_tok(input string t);
    int c = 0;
    foreach (toks[i]) if (toks[i] == t) c++;
    return c;
  endfunction

  int acks = 0, readies = 0;
  always @(posedge clk) begin
    if (fct_ack) acks++;
    if (tx_valid && tx_ready) readies++;
  end

  initial begin
    #12 rst_n = 1;
    @(posedge clk); #0.1 tx_enable = 1;
    repeat (41) @(posedge clk);
    parse();
    // 40 clocks after the first character is loaded: 10 NULLs of 4 clocks
    check(toks.size() >= 9 && toks.size() <= 10 && count_tok("NULL") == toks.size(),
          $sformatf("NULLs only: %0d chars, %0d NULL", toks.size(), count_tok("NULL")));

    // FCT on request
    #0.1 fct_enable = 1; fct_req = 1;
    while (!fct_ack) @(posedge clk);
    #0.1 fct_req = 0;
    repeat (12) @(posedge clk);
    parse();
    check(count_tok("FCT") == 1 && acks == 1, $sformatf("one FCT sent, %0d acks", acks));

    // N-chars: none without credit
    #0.1 data_enable = 1; tx_valid = 1; tx_data = '{ctrl: 1'b0, data: 8'h5a};
    repeat (20) @(posedge clk);
    check(readies == 0 && credit == 0, "no N-char without credit");
    #0.1 got_fct = 1;
    @(posedge clk); #0.1 got_fct = 0;
    check(credit == 6'd8, $sformatf("credit 8 after FCT, %0d", credit));
    repeat (100) @(posedge clk);
    #0.1 tx_valid = 0;
    check(readies == 8 && credit == 0, $sformatf("eight N-chars per FCT, sent %0d", readies));
    repeat (12) @(posedge clk);
    parse();
    check(count_tok("D5a") == 8, $sformatf("data char 5a seen %0d times", count_tok("D5a")));

    // time-code goes ahead of waiting N-chars, markers encode correctly
    #0.1 got_fct = 1; tick_in = 1; time_in = 8'h17;
    tx_valid = 1; tx_data = NCHAR_EOP;
    @(posedge clk); #0.1 got_fct = 0; tick_in = 0;
    while (!tx_ready) @(posedge clk);
    #0.1 tx_data = NCHAR_EEP;
    do @(posedge clk); while (!tx_ready);
    #0.1 tx_valid = 0;
    repeat (20) @(posedge clk);
    parse();
    begin
      int it = -1, ie = -1, iq = -1;
      foreach (toks[i]) begin
        if (toks[i] == "T17" && it < 0) it = i;
        if (toks[i] == "EOP" && ie < 0) ie = i;
        if (toks[i] == "EEP" && iq < 0) iq = i;
      end
      check(it >= 0 && ie > it && iq > ie, $sformatf("time-code %0d before EOP %0d before EEP %0d", it, ie, iq));
    end
    check(strobe_bad == 0, $sformatf("strobe rule broken %0d times", strobe_bad));
    check(parity_bad == 0, $sformatf("parity wrong %0d times", parity_bad));
    check(count_tok("ESCERR") == 0, "no escape misuse");

    // credit error: 6 credits left, 7 more FCTs exceed 56
    for (int k = 0; k < 6; k++) begin
      #0.1 got_fct = 1; @(posedge clk);
    end
    #0.1 got_fct = 0; @(posedge clk);
    check(!credit_error && credit == 6'd54, $sformatf("credit %0d below limit", credit));
    #0.1 got_fct = 1; @(posedge clk); #0.1 got_fct = 0; @(posedge clk);
    check(credit_error, "credit error above 56");

    // slow mode: each bit held tx_div clocks, same bit in both halves
    #0.1 tx_enable = 0; fct_enable = 0; data_enable = 0; slow = 1;
    @(posedge clk); #0.1 tx_enable = 1; tx_div = 8'd3;
    repeat (3) @(posedge clk);
    begin
      int runs[$]; int len = 0; bit cur; bit fl;
      #1; cur = d_even; fl = s_even;
      repeat (96) begin
        @(posedge clk); #1;
        if (d_even != d_odd) hold_bad++;
        if (s_even != s_odd) hold_bad++;
        len++;
        if ({d_even, s_even} != {cur, fl}) begin
          runs.push_back(len);
          len = 0;
        end
        cur = d_even; fl = s_even;
      end
      // D or S changes once per bit: every run lasts exactly three clocks
      foreach (runs[i]) if (i > 0 && runs[i] != 3) hold_bad++;
      check(runs.size() >= 25 && hold_bad == 0, $sformatf("slow mode: %0d bits, %0d bad", runs.size(), hold_bad));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
