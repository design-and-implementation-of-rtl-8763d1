// tb_spw_link_fsm: initialisation state machine unit test at its default
// timing (6.4 us = 1280 clocks, 12.8 us = 2560 clocks).
//
// Checked: the exact ErrorReset and ErrorWait durations; Ready waits for
// link_start; Started times out after 12.8 us without a NULL; Started ->
// Connecting on gotNULL -> Run on gotFCT, with the enables of each state;
// autostart waits for a NULL and then passes Started at once; errors and
// early characters (FCT in ErrorWait, N-char in Connecting) reset the link;
// link_disable and a credit error leave Run.
`timescale 1ns/1ps
module tb_spw_link_fsm;
  import spw_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic link_start = 0, link_disable = 0, autostart = 0;
  logic got_null = 0, got_fct = 0, got_nchar = 0, got_time = 0, rx_error = 0, credit_error = 0;
  link_state_t state;
  logic rx_enable, tx_enable, fct_enable, data_enable;

  spw_link_fsm dut (.*);

  task automatic pulse(ref logic sig);
    #0.1 sig = 1; @(posedge clk); #0.1 sig = 0;
  endtask


  task automatic time_in_state(input link_state_t s, output int n);
    n = 0;
    while (state == s && n < 10000) begin @(posedge clk); #0.1; n++; end
  endtask

  task automatic goto_ready();
    int n;
    while (state != ST_ERROR_RESET) @(posedge clk);
    time_in_state(ST_ERROR_RESET, n);
    time_in_state(ST_ERROR_WAIT, n);
  endtask

  initial begin
    int n;
    #12 rst_n = 1;
    @(posedge clk); #0.1;
    check(state == ST_ERROR_RESET && !rx_enable && !tx_enable, "reset: ErrorReset, all off");
    time_in_state(ST_ERROR_RESET, n);
    check(n == 1280 - 1 && state == ST_ERROR_WAIT, $sformatf("ErrorReset lasts %0d clocks", n + 1));
    check(rx_enable && !tx_enable, "ErrorWait: receiver on, transmitter off");
    time_in_state(ST_ERROR_WAIT, n);
    check(n == 2560 && state == ST_READY, $sformatf("ErrorWait lasts %0d clocks", n));
    repeat (100) @(posedge clk);
    check(state == ST_READY, "Ready waits without link_start");
    #0.1 link_start = 1;
    @(posedge clk); #0.1;
    check(state == ST_STARTED && tx_enable && !fct_enable, "Started sends NULLs only");
    time_in_state(ST_STARTED, n);
    check(n == 2560 && state == ST_ERROR_RESET, $sformatf("Started times out after %0d clocks", n));

    goto_ready();
    @(posedge clk); #0.1;
    check(state == ST_STARTED, "Started again");
    pulse(got_null);
    @(posedge clk); #0.1;
    check(state == ST_CONNECTING && fct_enable && !data_enable, "Connecting after gotNULL");
    pulse(got_fct);
    @(posedge clk); #0.1;
    check(state == ST_RUN && data_enable, "Run after gotFCT");
    pulse(rx_error);
    @(posedge clk); #0.1;
    check(state == ST_ERROR_RESET, "receive error leaves Run");

    // autostart
    #0.1 link_start = 0; autostart = 1;
    goto_ready();
    repeat (50) @(posedge clk);
    check(state == ST_READY, "autostart waits for a NULL");
    pulse(got_null);
    check(state == ST_STARTED, "autostart: Started on NULL");
    @(posedge clk); #0.1;
    check(state == ST_CONNECTING, "NULL remembered: Connecting");
    pulse(got_nchar);
    @(posedge clk); #0.1;
    check(state == ST_ERROR_RESET, "N-char in Connecting resets");

    // FCT in ErrorWait
    while (state != ST_ERROR_WAIT) @(posedge clk);
    repeat (10) @(posedge clk);
    pulse(got_fct);
    @(posedge clk); #0.1;
    check(state == ST_ERROR_RESET, "FCT in ErrorWait resets");

    // link_disable and credit error in Run
    #0.1 autostart = 0; link_start = 1;
    goto_ready();
    @(posedge clk);
    pulse(got_null); @(posedge clk); pulse(got_fct); @(posedge clk); #0.1;
    check(state == ST_RUN, "back in Run");
    pulse(link_disable);
    @(posedge clk); #0.1;
    check(state == ST_ERROR_RESET, "link_disable leaves Run");
    goto_ready();
    @(posedge clk);
    pulse(got_null); @(posedge clk); pulse(got_fct); @(posedge clk); #0.1;
    pulse(credit_error);
    @(posedge clk); #0.1;
    check(state == ST_ERROR_RESET, "credit error leaves Run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
