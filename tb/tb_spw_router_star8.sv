// tb_spw_router_star8: the router node at its largest size, eight ports, as a
// star network of eight nodes (the most a router supports without links to
// other routers). Same traffic and checks as tb_spw_router_node: all links
// reach Run, every packet arrives whole and in order per source, a busy
// output blocks a header, unknown addresses are dropped, EEPs pass, and a
// slow receiving host holds senders back through flow control.
`timescale 1ns/1ps
module tb_spw_router_star8;
  import spw_pkg::*;

  localparam int N = 8;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  logic [N-1:0] nclk = '0;
  always #2.5 clk = ~clk;
  for (genvar p = 0; p < N; p++) begin : g_clk
    initial begin #(0.7 + 0.9 * p); forever #2.5 nclk[p] = ~nclk[p]; end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // router node under test
  logic [N-1:0] r_d_in, r_s_in, r_d_out, r_s_out;
  logic [N-1:0] r_run, r_err, r_blocked, r_dropped, r_tick_out;
  link_state_t [N-1:0] r_state;
  logic [N-1:0][7:0] r_time_out;

  spw_router_node #(.NPORTS(N)) dut (
    .clk, .rst_n,
    .d_in(r_d_in), .s_in(r_s_in), .d_out(r_d_out), .s_out(r_s_out),
    .link_start('0), .link_disable('0), .autostart('1), .tx_div('0),
    .link_state(r_state), .running(r_run), .link_error(r_err),
    .tick_in('0), .time_in('0), .tick_out(r_tick_out), .time_out(r_time_out),
    .blocked(r_blocked), .dropped(r_dropped)
  );

  // the nodes
  logic [N-1:0] n_tick = '0;
  logic [N-1:0] n_tx_valid, n_tx_ready, n_rx_valid, n_rx_ready, n_run;
  nchar_t [N-1:0] n_tx_data, n_rx_data;

  for (genvar p = 0; p < N; p++) begin : g_node
    link_state_t st;
    logic ed, ep, ee, ec, tko;
    logic [7:0] tmo;
    spw_codec u_node (
      .clk(nclk[p]), .rst_n, .link_start(1'b1), .link_disable(1'b0), .autostart(1'b0),
      .tx_div(8'd0), .link_state(st), .running(n_run[p]),
      .err_disc(ed), .err_parity(ep), .err_esc(ee), .err_credit(ec),
      .tx_valid(n_tx_valid[p]), .tx_data(n_tx_data[p]), .tx_ready(n_tx_ready[p]),
      .tick_in(n_tick[p]), .time_in(8'(8'h30 + p)),
      .rx_valid(n_rx_valid[p]), .rx_data(n_rx_data[p]), .rx_ready(n_rx_ready[p]),
      .tick_out(tko), .time_out(tmo),
      .d_in(r_d_out[p]), .s_in(r_s_out[p]), .d_out(r_d_in[p]), .s_out(r_s_in[p]));
    // node 3 is a slow host, the others read at random
    always_ff @(posedge nclk[p]) n_rx_ready[p] <= (p == 3) ? (($urandom % 8) == 0) : (($urandom % 2) == 0);
  end

  // expected characters per (source, destination)
  nchar_t exp_q [N][N][$];
  int delivered [N];
  int bad = 0, n_eep = 0, n_blocked = 0, n_dropped = 0, n_credit_stall = 0;

  // receive side: collect a packet, then compare with what its source sent
  for (genvar p = 0; p < N; p++) begin : g_rx
    nchar_t pkt[$];
    always @(posedge nclk[p]) if (n_rx_valid[p] && n_rx_ready[p]) begin
      pkt.push_back(n_rx_data[p]);
      if (n_rx_data[p].ctrl) begin
        int src;
        src = (pkt.size() > 1) ? int'(pkt[1].data) : 0;
        if (pkt.size() < 3 || src >= N || pkt[0].data != 8'(32 + p)) begin
          bad++;
          $display("FAIL: port %0d bad packet, size %0d", p, pkt.size());
        end else begin
          foreach (pkt[k]) begin
            if (exp_q[src][p].size() == 0 || exp_q[src][p][0] != pkt[k]) begin
              bad++;
              $display("FAIL: port %0d from %0d: char %0d mismatch", p, src, k);
            end
            if (exp_q[src][p].size() != 0) void'(exp_q[src][p].pop_front());
          end
          if (pkt[pkt.size()-1] == NCHAR_EEP) n_eep++;
          delivered[p]++;
        end
        pkt.delete();
      end
    end
  end

  int n_ticks = 0, bad_ticks = 0;
  always @(posedge clk) begin
    for (int p = 0; p < N; p++) if (r_tick_out[p]) begin
      n_ticks++;
      if (r_time_out[p] != 8'(8'h30 + p)) bad_ticks++;
    end
    if (|r_blocked) n_blocked++;
    if (|r_dropped) n_dropped++;
  end
  for (genvar p = 0; p < N; p++) begin : g_stall
    always @(posedge nclk[p])
      if (n_run[p] && n_tx_valid[p] && g_node[p].u_node.u_tx.credit == 6'd0) n_credit_stall++;
  end

  // send one packet from node src to logical address addr
  task automatic send(input int src, input int addr, input int len, input bit eep, input int seq);
    nchar_t c;
    bit record;
    int dst;
    record = (addr >= 32 && addr < 32 + N);
    dst = addr - 32;
    for (int k = 0; k < len + 3; k++) begin
      if (k == 0)            c = '{ctrl: 1'b0, data: 8'(addr)};
      else if (k == 1)       c = '{ctrl: 1'b0, data: 8'(src)};
      else if (k == 2)       c = '{ctrl: 1'b0, data: 8'(seq)};
      else if (k == len + 2) c = eep ? NCHAR_EEP : NCHAR_EOP;
      else                   c = '{ctrl: 1'b0, data: 8'($urandom)};
      if (record) exp_q[src][dst].push_back(c);
      n_tx_data[src] = c; n_tx_valid[src] = 1'b1;
      do @(posedge nclk[src]); while (!n_tx_ready[src]);
      #0.1 n_tx_valid[src] = 1'b0;
    end
  endtask

  task automatic node_traffic(input int src);
    // first: sources 0..2 all hit port 3 at once (busy output, slow host)
    if (src != 3) send(src, 35, 60 + 10 * src, 1'b0, 0);
    for (int i = 1; i <= 6; i++) begin
      int dst;
      dst = (src + i) % N;
      send(src, 32 + dst, 5 + ($urandom % 80), (i == 3), i);
    end
    if (src == 1) send(src, 40, 20, 1'b0, 99);   // unknown logical address
    if (src == 2) send(src, 5, 20, 1'b0, 98);    // path address, unsupported
    send(src, 32 + ((src + 2) % N), 30, 1'b0, 7);
  endtask

  // one traffic process per node, started together
  logic go = 1'b0;
  logic [N-1:0] traffic_done = '0;
  for (genvar p = 0; p < N; p++) begin : g_traffic
    initial begin
      wait (go);
      node_traffic(p);
      traffic_done[p] = 1'b1;
    end
  end

  initial begin
    int t = 0;
    n_tx_valid = '0; n_tx_data = '0;
    foreach (delivered[p]) delivered[p] = 0;
    #20 rst_n = 1;
    while (!(&r_run && &n_run) && t < 20000) begin @(posedge clk); t++; end
    check(&r_run && &n_run, $sformatf("all links in Run (%0d ns)", t * 5));
    check(t * 5 >= 19200 && t * 5 <= 40000, $sformatf("link start-up time %0d ns", t * 5));

    go = 1'b1;
    // a time-code from every node, sent while packets flow
    repeat (300) @(posedge clk);
    for (int p = 0; p < N; p++) begin
      @(posedge nclk[p]); #0.1 n_tick[p] = 1'b1;
      @(posedge nclk[p]); #0.1 n_tick[p] = 1'b0;
    end
    wait (&traffic_done);

    t = 0;
    while (t < 200000) begin
      bit empty = 1;
      for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) if (exp_q[s][d].size() != 0) empty = 0;
      if (empty) break;
      @(posedge clk); t++;
    end
    repeat (200) @(posedge clk);

    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++)
      check(exp_q[s][d].size() == 0, $sformatf("all of %0d -> %0d delivered (%0d left)", s, d, exp_q[s][d].size()));
    check(bad == 0, $sformatf("%0d corrupted packets", bad));
    for (int p = 0; p < N; p++)
      check(delivered[p] >= 4, $sformatf("port %0d: %0d packets delivered", p, delivered[p]));
    check(n_blocked > 0,      $sformatf("wormhole stall on busy output: %0d cycles", n_blocked));
    check(n_dropped == 2,     $sformatf("packets dropped: %0d", n_dropped));
    check(n_eep == N,         $sformatf("EEP packets forwarded: %0d", n_eep));
    check(n_ticks == N && bad_ticks == 0, $sformatf("time-codes received: %0d, %0d wrong", n_ticks, bad_ticks));
    check(n_credit_stall > 0, $sformatf("sender held by flow control: %0d cycles", n_credit_stall));
    check(&r_run && &n_run && r_err == '0, "links still in Run, no errors");
    check(dut.g_port[0].u_codec.u_tx.div_q == 8'd0, "DDR line rate in use");
    $display("mechanisms: blocked %0d, dropped %0d, eep %0d, credit stall %0d, time-codes %0d",
             n_blocked, n_dropped, n_eep, n_credit_stall, n_ticks);
    for (int p = 0; p < N; p++) $display("port %0d: %0d packets delivered", p, delivered[p]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
