// tb_spw_codec: two codecs joined by a SpaceWire link, each on its own clock.
//
// Checks: both links reach Run within the start-up time of the standard
// (6.4 us + 12.8 us + connection); packets longer than the 56-N-char buffer
// cross in both directions at the 10 Mb/s start rate and in DDR mode
// (two bits per clock) with the receiving host stalling at random, so FCT
// flow control must work; EOP and EEP arrive as sent; a time-code arrives
// with its value; with B's clock 4 % faster than A's (so B sends at
// 417 Mb/s in DDR mode) data still crosses both ways without a link error;
// cutting the line makes the far end detect the
// disconnection and both ends restart and reach Run again.
`timescale 1ns/1ps
module tb_spw_codec;
  import spw_pkg::*;

  logic clk_a = 0, clk_b = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #2.5 clk_a = ~clk_a;
  real half_b = 2.5;    // clk_b half period, changed for the fast-sender phase
  initial begin #1.3; forever #(half_b) clk_b = ~clk_b; end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // link A -> B and B -> A, with a cut for the disconnect test
  logic cut = 0;
  logic a_d, a_s, b_d, b_s;

  logic a_tx_valid, a_tx_ready, a_rx_valid, a_rx_ready, a_tick_in, a_tick_out;
  logic b_tx_valid, b_tx_ready, b_rx_valid, b_rx_ready, b_tick_in, b_tick_out;
  nchar_t a_tx_data, a_rx_data, b_tx_data, b_rx_data;
  logic [7:0] a_time_in, a_time_out, b_time_in, b_time_out, a_div, b_div;
  link_state_t a_state, b_state;
  logic a_run, b_run, a_ed, a_ep, a_ee, a_ec, b_ed, b_ep, b_ee, b_ec;
  logic a_start, b_auto;

  spw_codec u_a (
    .clk(clk_a), .rst_n, .link_start(a_start), .link_disable(1'b0), .autostart(1'b0),
    .tx_div(a_div), .link_state(a_state), .running(a_run),
    .err_disc(a_ed), .err_parity(a_ep), .err_esc(a_ee), .err_credit(a_ec),
    .tx_valid(a_tx_valid), .tx_data(a_tx_data), .tx_ready(a_tx_ready),
    .tick_in(a_tick_in), .time_in(a_time_in),
    .rx_valid(a_rx_valid), .rx_data(a_rx_data), .rx_ready(a_rx_ready),
    .tick_out(a_tick_out), .time_out(a_time_out),
    .d_in(b_d & ~cut), .s_in(b_s & ~cut), .d_out(a_d), .s_out(a_s));

  spw_codec u_b (
    .clk(clk_b), .rst_n, .link_start(1'b0), .link_disable(1'b0), .autostart(b_auto),
    .tx_div(b_div), .link_state(b_state), .running(b_run),
    .err_disc(b_ed), .err_parity(b_ep), .err_esc(b_ee), .err_credit(b_ec),
    .tx_valid(b_tx_valid), .tx_data(b_tx_data), .tx_ready(b_tx_ready),
    .tick_in(b_tick_in), .time_in(b_time_in),
    .rx_valid(b_rx_valid), .rx_data(b_rx_data), .rx_ready(b_rx_ready),
    .tick_out(b_tick_out), .time_out(b_time_out),
    .d_in(a_d & ~cut), .s_in(a_s & ~cut), .d_out(b_d), .s_out(b_s));

  // random stalls on the receiving hosts
  always_ff @(posedge clk_a) a_rx_ready <= ($urandom % 4) != 0;
  always_ff @(posedge clk_b) b_rx_ready <= ($urandom % 3) != 0;

  // expected-data queues
  nchar_t q_ab[$], q_ba[$];
  int got_ab = 0, got_ba = 0, bad_ab = 0, bad_ba = 0;
  int b_ticks = 0; logic [7:0] b_last_time;

  always @(posedge clk_b) if (b_rx_valid && b_rx_ready) begin
    if (q_ab.size() == 0 || b_rx_data != q_ab[0]) bad_ab++;
    if (q_ab.size() != 0) void'(q_ab.pop_front());
    got_ab++;
  end
  always @(posedge clk_a) if (a_rx_valid && a_rx_ready) begin
    if (q_ba.size() == 0 || a_rx_data != q_ba[0]) bad_ba++;
    if (q_ba.size() != 0) void'(q_ba.pop_front());
    got_ba++;
  end
  always @(posedge clk_b) if (b_tick_out) begin b_ticks++; b_last_time = b_time_out; end

  task automatic send_a(input int n, input bit eep);
    for (int k = 0; k < n; k++) begin
      nchar_t c;
      c = (k == n-1) ? (eep ? NCHAR_EEP : NCHAR_EOP) : '{ctrl: 1'b0, data: 8'($urandom)};
      a_tx_data = c; a_tx_valid = 1;
      q_ab.push_back(c);
      do @(posedge clk_a); while (!a_tx_ready);
      #0.1 a_tx_valid = 0;
    end
  endtask
  task automatic send_b(input int n, input bit eep);
    for (int k = 0; k < n; k++) begin
      nchar_t c;
      c = (k == n-1) ? (eep ? NCHAR_EEP : NCHAR_EOP) : '{ctrl: 1'b0, data: 8'($urandom)};
      b_tx_data = c; b_tx_valid = 1;
      q_ba.push_back(c);
      do @(posedge clk_b); while (!b_tx_ready);
      #0.1 b_tx_valid = 0;
    end
  endtask

  task automatic wait_run(input string what);
    int t = 0;
    while (!(a_run && b_run) && t < 10000) begin @(posedge clk_a); t++; end
    check(a_run && b_run, {what, ": both links in Run"});
    // start-up: 6.4 + 12.8 us reset/wait, then a few characters at 10 Mb/s
    check(t * 5 >= 19200 && t * 5 <= 40000, $sformatf("%s: Run after %0d ns", what, t*5));
  endtask

  task automatic drain();
    int t = 0;
    while ((q_ab.size() != 0 || q_ba.size() != 0) && t < 400000) begin @(posedge clk_a); t++; end
  endtask

  initial begin
    a_tx_valid = 0; b_tx_valid = 0; a_tx_data = '0; b_tx_data = '0;
    a_tick_in = 0; b_tick_in = 0; a_time_in = 0; b_time_in = 0;
    a_div = 8'd0; b_div = 8'd0;                 // Run rate: DDR mode
    a_start = 1; b_auto = 1;
    a_div = 8'd20; b_div = 8'd20;               // first: stay at 10 Mb/s in Run
    #20 rst_n = 1;

    wait_run("start");
    check(a_state == ST_RUN && b_state == ST_RUN, "state encoding Run");

    // 10 Mb/s, A->B 70 N-chars, B->A 60 N-chars ending in EEP
    fork
      send_a(70, 0);
      send_b(60, 1);
    join
    drain();
    check(q_ab.size() == 0 && got_ab == 70, $sformatf("A->B slow: received %0d", got_ab));
    check(q_ba.size() == 0 && got_ba == 60, $sformatf("B->A slow: received %0d", got_ba));
    check(bad_ab == 0 && bad_ba == 0, "slow: data and markers match");

    // time-code
    @(posedge clk_a); #0.1 a_time_in = 8'h2b; a_tick_in = 1;
    @(posedge clk_a); #0.1 a_tick_in = 0;
    repeat (2000) @(posedge clk_a);
    check(b_ticks == 1 && b_last_time == 8'h2b, $sformatf("time-code: %0d ticks, value %h", b_ticks, b_last_time));

    // DDR mode: two bits per clock
    a_div = 8'd0; b_div = 8'd0;
    got_ab = 0; got_ba = 0;
    fork
      send_a(200, 0);
      send_b(150, 0);
    join
    drain();
    check(q_ab.size() == 0 && got_ab == 200, $sformatf("A->B DDR: received %0d", got_ab));
    check(q_ba.size() == 0 && got_ba == 150, $sformatf("B->A DDR: received %0d", got_ba));
    check(bad_ab == 0 && bad_ba == 0, "DDR: data and markers match");
    check(!a_ep && !b_ep && !a_ee && !b_ee && !a_ec && !b_ec, "no parity, escape or credit error");

    // DDR rate: 100 data characters (10 bits each) in about 500 clocks
    begin
      int t0, t1;
      got_ab = 0;
      t0 = $time;
      send_a(101, 0);
      while (q_ab.size() != 0) @(posedge clk_a);
      t1 = $time;
      // 1010 bits at 400 Mb/s = 2525 ns, plus stalls from the receive buffer
      check((t1 - t0) < 2525 * 2 && (t1 - t0) > 2525 / 2, $sformatf("DDR throughput: %0d ns for 1010 bits", t1 - t0));
    end

    // fast sender: B's clock 4 % faster, the receiver of A must keep up
    half_b = 2.4;
    got_ab = 0; got_ba = 0;
    fork
      send_a(150, 0);
      send_b(250, 1);
    join
    drain();
    check(got_ab == 150 && got_ba == 250 && bad_ab == 0 && bad_ba == 0,
          $sformatf("fast B: received %0d and %0d", got_ab, got_ba));
    check(a_run && b_run && !a_ed && !a_ep && !a_ee,
          "fast B: link stays in Run, no receive error at A");
    half_b = 2.5;
    repeat (10) @(posedge clk_a);

    // disconnect: cut the line, both ends must leave Run and come back
    cut = 1;
    begin
      int t = 0;
      while (!b_ed && t < 1000) begin @(posedge clk_b); t++; end
      // 850 ns disconnect timeout (170 clocks) plus synchroniser delay
      check(b_ed && t * 5 >= 850 && t * 5 <= 950, $sformatf("disconnect detected after %0d ns", t * 5));
    end
    repeat (20) @(posedge clk_a);
    check(!a_run && !b_run, "both links left Run after cut");
    cut = 0;
    wait_run("restart");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
