// tb_spw_rx: receiver unit test driven by a behavioural DS encoder.
//
// The testbench encodes characters itself (odd parity, data LSB first; the
// strobe toggles whenever the data bit does not change) and drives D and S
// with a chosen bit period, independent of the system clock. Checked: no
// event before the first NULL, the first NULL found, FCT, data characters,
// EOP, EEP and a time-code decoded with their values, at 10 Mb/s and at
// 400 Mb/s (2.5 ns bits, twice the 200 MHz system clock rate); a receiver
// enabled in the middle of a character stream still locks on the next NULL;
// a wrong parity bit raises parity_err; ESC followed by EOP raises esc_err;
// a line that stops raises disc_err after 850 ns (170 clocks) and not before.
`timescale 1ns/1ps
module tb_spw_rx;
  import spw_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic rx_enable = 0, d_in = 0, s_in = 0;
  logic got_bit, got_null, got_fct, got_nchar, got_time, parity_err, esc_err, disc_err;
  nchar_t nchar;
  logic [7:0] time_out;

  spw_rx dut (.clk, .rst_n, .rx_enable, .d_in, .s_in, .got_bit, .got_null, .got_fct,
              .got_nchar, .nchar, .got_time, .time_out, .parity_err, .esc_err, .disc_err);

  // ---- event log ----
  string ev[$];
  always @(posedge clk) begin
    if (got_null)  ev.push_back("NULL");
    if (got_fct)   ev.push_back("FCT");
    if (got_time)  ev.push_back($sformatf("T%02h", time_out));
    if (got_nchar) ev.push_back(nchar.ctrl ? (nchar.data[0] ? "EEP" : "EOP") : $sformatf("D%02h", nchar.data));
  end

  // ---- behavioural encoder ----
  realtime tbit = 100.0;
  bit      par_acc = 0;     // xor of previous data bits
  bit      flip_parity = 0;

  task automatic line_bit(input bit b);
    if (b != d_in) d_in = b;
    else           s_in = ~s_in;
    #(tbit);
  endtask

  task automatic send_char(input bit f, input logic [7:0] v);
    bit p;
    p = 1'b1 ^ f ^ par_acc ^ flip_parity;
    line_bit(p);
    line_bit(f);
    if (f) begin
      line_bit(v[1]); line_bit(v[0]);   // v[1:0] = {first, second}
      par_acc = v[1] ^ v[0];
    end else begin
      for (int k = 0; k < 8; k++) line_bit(v[k]);
      par_acc = ^v;
    end
  endtask

  task automatic c_null();  send_char(1, 8'b11); send_char(1, 8'b00); endtask
  task automatic c_fct();   send_char(1, 8'b00); endtask
  task automatic c_eop();   send_char(1, 8'b01); endtask
  task automatic c_eep();   send_char(1, 8'b10); endtask
  task automatic c_data(input logic [7:0] v); send_char(0, v); endtask
  task automatic c_time(input logic [7:0] v); send_char(1, 8'b11); send_char(0, v); endtask

  task automatic restart_line();
    rx_enable = 0; d_in = 0; s_in = 0; par_acc = 0; flip_parity = 0;
    #200; ev.delete();
    @(posedge clk); #0.1 rx_enable = 1;
    #50;
  endtask

  task automatic sequence_check(input string what);
    c_null(); c_null(); c_fct(); c_data(8'ha5); c_data(8'h3c); c_eop();
    c_time(8'h21); c_data(8'h00); c_eep(); c_null();
    #(4 * tbit + 100);
    check(ev.size() == 10 && ev[9] == "NULL" && ev[0] == "NULL" && ev[1] == "NULL" && ev[2] == "FCT" &&
          ev[3] == "Da5" && ev[4] == "D3c" && ev[5] == "EOP" && ev[6] == "T21" &&
          ev[7] == "D00" && ev[8] == "EEP",
          $sformatf("%s: %0d events, first %s", what, ev.size(), ev.size() ? ev[0] : "-"));
    check(!parity_err && !esc_err && !disc_err, {what, ": no errors"});
  endtask

  initial begin
    #12 rst_n = 1;

    // 10 Mb/s
    tbit = 100.0;
    restart_line();
    sequence_check("10 Mb/s");

    // 400 Mb/s: two bits per system clock
    tbit = 2.5;
    restart_line();
    sequence_check("400 Mb/s");
    repeat (50) c_null();
    check(!parity_err && !disc_err, "400 Mb/s: long NULL stream clean");

    // enabled in the middle of a stream: start the line first
    tbit = 10.0;
    rx_enable = 0; d_in = 0; s_in = 0; par_acc = 0; #100;
    c_null(); c_data(8'h77);
    line_bit(1'b1); line_bit(1'b0);  // first bits of a char, then enable
    @(posedge clk); #0.1 rx_enable = 1; ev.delete();
    for (int k = 0; k < 8; k++) line_bit(k[0]);
    c_null(); c_fct(); c_data(8'h42);
    #300;
    check(ev.size() >= 3 && ev[ev.size()-3] == "NULL" && ev[ev.size()-2] == "FCT" && ev[ev.size()-1] == "D42",
          $sformatf("mid-stream lock: %0d events", ev.size()));

    // parity error
    tbit = 20.0;
    restart_line();
    c_null(); c_data(8'h11);
    flip_parity = 1; c_data(8'h12); flip_parity = 0;
    c_null();
    #200;
    check(parity_err && !esc_err, "parity error detected");

    // escape error: ESC then EOP
    restart_line();
    c_null(); send_char(1, 8'b11); c_eop(); c_null();
    #200;
    check(esc_err && !parity_err, "escape error detected");

    // disconnect: line stops after some NULLs
    tbit = 20.0;
    restart_line();
    c_null(); c_null();
    begin
      int t = 0;
      while (!disc_err && t < 1000) begin @(posedge clk); t++; end
      // last transition is one bit period before the line goes quiet
      check(disc_err && (t * 5 + 20) >= 850 && (t * 5 + 20) <= 900,
            $sformatf("disconnect after %0d ns of silence", t * 5 + 20));
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
