// tb_spw_router: router unit test at its default size (four ports), with the
// ports driven directly through their valid/ready handshakes.
//
// Each input sends packets to logical addresses; each output checks that a
// packet arrives whole and uninterrupted (wormhole: no other packet's
// characters in between), with its header, on the port the default table
// gives (address 32 + k -> port k), and in order per source. Also checked:
// the three-clock header latency through an idle router and one N-char per
// clock after it; a header waiting on a busy output (blocked) while the
// source's input stops reading; unknown logical addresses, path addresses and
// a lone EOP dropped; EEP passed through.
`timescale 1ns/1ps
module tb_spw_router;
  import spw_pkg::*;

  localparam int N = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic   [N-1:0] in_valid = '0, in_ready, out_valid, out_ready, blocked, dropped;
  nchar_t [N-1:0] in_data = '0, out_data;

  spw_router dut (.*);

  logic fast_sink = 0;
  always_ff @(posedge clk) out_ready <= fast_sink ? '1 : N'($urandom);

  nchar_t exp_q [N][N][$];
  int delivered = 0, bad = 0, n_blocked = 0, n_dropped = 0, n_eep = 0;

  for (genvar o = 0; o < N; o++) begin : g_sink
    nchar_t pkt[$];
    always @(posedge clk) if (out_valid[o] && out_ready[o]) begin
      pkt.push_back(out_data[o]);
      if (out_data[o].ctrl) begin
        int src;
        src = int'(pkt[1].data);
        if (pkt[0].data != 8'(32 + o) || src >= N) bad++;
        else begin
          foreach (pkt[k]) begin
            if (exp_q[src][o].size() == 0 || exp_q[src][o][0] != pkt[k]) bad++;
            if (exp_q[src][o].size() != 0) void'(exp_q[src][o].pop_front());
          end
          if (out_data[o] == NCHAR_EEP) n_eep++;
          delivered++;
        end
        pkt.delete();
      end
    end
  end
  int cyc = 0, offer_cyc = -1, hdr_cyc = -1, eop_cyc = -1;
  always @(posedge clk) begin
    cyc++;
    if (in_valid[0] && offer_cyc < 0) offer_cyc = cyc;
    if (out_valid[1] && out_ready[1] && hdr_cyc < 0) hdr_cyc = cyc;
    if (out_valid[1] && out_ready[1] && out_data[1].ctrl && eop_cyc < 0) eop_cyc = cyc;
    if (|blocked) n_blocked++;
    if (|dropped) n_dropped++;
  end

  task automatic send(input int src, input int addr, input int len, input bit eep);
    bit rec;
    rec = addr >= 32 && addr < 32 + N;
    for (int k = 0; k < len + 2; k++) begin
      nchar_t c;
      if (k == 0)            c = '{ctrl: 1'b0, data: 8'(addr)};
      else if (k == 1)       c = '{ctrl: 1'b0, data: 8'(src)};
      else if (k == len + 1) c = eep ? NCHAR_EEP : NCHAR_EOP;
      else                   c = '{ctrl: 1'b0, data: 8'($urandom)};
      if (rec) exp_q[src][addr - 32].push_back(c);
      in_data[src] = c; in_valid[src] = 1'b1;
      do @(posedge clk); while (!in_ready[src]);
      #0.1 in_valid[src] = 1'b0;
    end
  endtask

  initial begin
    #12 rst_n = 1;
    repeat (2) @(posedge clk);

    // latency through an idle router, sinks always ready
    fast_sink = 1;
    repeat (2) @(posedge clk);
    #0.1 in_data[0] = '{ctrl: 1'b0, data: 8'd33}; in_valid[0] = 1;
    exp_q[0][1].push_back(in_data[0]);
    do @(posedge clk); while (!in_ready[0]);
    for (int k = 1; k <= 10; k++) begin
      #0.1 in_data[0] = (k == 10) ? NCHAR_EOP : nchar_t'{ctrl: 1'b0, data: (k == 1) ? 8'd0 : 8'(k)};
      exp_q[0][1].push_back(in_data[0]);
      @(posedge clk);
    end
    #0.1 in_valid[0] = 0;
    check(hdr_cyc - offer_cyc == 3, $sformatf("header reaches the output %0d clocks after it is offered", hdr_cyc - offer_cyc));
    check(eop_cyc - hdr_cyc == 10, $sformatf("11 N-chars in %0d clocks", eop_cyc - hdr_cyc + 1));
    fast_sink = 0;

    // contention on port 3, then all-to-all, bad addresses, EEP
    fork
      begin send(0, 35, 40, 0); send(0, 32, 10, 1); send(0, 34, 5, 0); end
      begin send(1, 35, 30, 0); send(1, 40, 8, 0);  send(1, 33, 12, 0); end
      begin send(2, 35, 20, 0); send(2, 3, 8, 0);   send(2, 32, 7, 0); end
      begin
        // lone EOP, then packets
        in_data[3] = NCHAR_EOP; in_valid[3] = 1;
        do @(posedge clk); while (!in_ready[3]);
        #0.1 in_valid[3] = 0;
        send(3, 34, 25, 0); send(3, 33, 3, 1);
      end
    join
    repeat (200) @(posedge clk);

    begin
      int left = 0;
      for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) left += exp_q[s][d].size();
      check(left == 0, $sformatf("%0d characters not delivered", left));
    end
    check(bad == 0, $sformatf("%0d wrong characters or split packets", bad));
    check(delivered == 10, $sformatf("%0d packets delivered", delivered));
    check(n_blocked > 0, $sformatf("blocked on busy output %0d clocks", n_blocked));
    check(n_dropped == 2, $sformatf("%0d packets dropped", n_dropped));
    check(n_eep == 2, $sformatf("%0d EEPs forwarded", n_eep));

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
