// spw_rx: SpaceWire receiver with DDR capture on the recovered clock.
//
// The receive clock is recovered as D xor S. Because every character has an
// even number of bits and the line starts with D = S = 0, this clock is high
// during even bits and low during odd bits: the even bit is taken at its
// rising edge and the odd bit at its falling edge, so the recovered clock
// runs at half the bit rate. Each falling edge writes the pair {even, odd}
// into a small dual-clock FIFO (spw_async_fifo); everything after it runs on
// the system clock and takes up to two pairs per clock, so the system clock
// may run at a quarter of the bit rate and a sender with a slightly faster
// clock than the receiver cannot overrun the FIFO.
//
// Before the first NULL the decoder slides a four-pair window over the pairs
// looking for ESC followed by FCT (x111 0100, the FCT parity bit is always 0
// after an ESC); parity and escape errors are only checked after it. It then
// assembles characters, checks odd parity (previous data bits + P + F),
// turns ESC+FCT into NULL and ESC+data into a time-code, and flags ESC
// followed by ESC, EOP or EEP as an escape error.
//
// Disconnection: after the first bit, if neither the recovered clock level
// (seen through a two-flop synchroniser) nor the FIFO write pointer changes for
// DISC_CYCLES system clocks (850 ns at 200 MHz), disc_err is raised.
// A FIFO overflow is reported on the same output. Errors are sticky and stop
// decoding until rx_enable is taken low, which clears the whole receiver.
//
// Outputs got_* and the character/time outputs are one-clock pulses,
// registered. The DDR capture on the recovered clock follows the source
// document; the FIFO crossing, the NULL search and the activity detector are
// this design's.
module spw_rx
  import spw_pkg::*;
#(
  parameter int unsigned DISC_CYCLES = T_DISC_CYCLES,
  parameter int unsigned FIFO_AW     = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_enable,
  input  logic       d_in,
  input  logic       s_in,
  output logic       got_bit,      // level: a transition has been seen
  output logic       got_null,     // pulse
  output logic       got_fct,      // pulse
  output logic       got_nchar,    // pulse, with nchar
  output nchar_t     nchar,
  output logic       got_time,     // pulse, with time_out
  output logic [7:0] time_out,
  output logic       parity_err,   // sticky
  output logic       esc_err,      // sticky
  output logic       disc_err      // sticky
);

  // ---------------- recovered-clock domain ----------------
  logic rxclk, rxclk_n, rx_arst_n;
  logic even_bit, armed, ovf;
  logic wfull;

  assign rxclk     = d_in ^ s_in;
  assign rxclk_n   = ~rxclk;
  assign rx_arst_n = rst_n & rx_enable;

  always_ff @(posedge rxclk or negedge rx_arst_n) begin
    if (!rx_arst_n) begin
      even_bit <= 1'b0;
      armed    <= 1'b0;
    end else begin
      even_bit <= d_in;
      armed    <= 1'b1;
    end
  end

  always_ff @(posedge rxclk_n or negedge rx_arst_n) begin
    if (!rx_arst_n)          ovf <= 1'b0;
    else if (armed && wfull) ovf <= 1'b1;
  end

  // ---------------- crossing ----------------
  logic [1:0]       pair, pair2, avail, take;
  logic [FIFO_AW:0] wptr_s, wptr_prev;

  spw_async_fifo #(.WIDTH(2), .AW(FIFO_AW)) u_fifo (
    .wclk (rxclk_n), .wrst_n(rx_arst_n), .wr_en(armed), .wdata({even_bit, d_in}),
    .full (wfull),
    .rclk (clk), .rrst_n(rx_arst_n), .rd_num(take), .rdata(pair), .rdata2(pair2),
    .avail(avail),
    .wptr_sync(wptr_s)
  );

  // ---------------- system-clock domain ----------------
  logic rxclk_s1, rxclk_s2, rxclk_s3, ovf_s1, ovf_s2;
  logic [$clog2(DISC_CYCLES+1)-1:0] idle_cnt;
  logic activity, err_any;

  assign err_any = parity_err | esc_err | disc_err;
  assign activity = (rxclk_s2 != rxclk_s3) || (wptr_s != wptr_prev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxclk_s1 <= 1'b0; rxclk_s2 <= 1'b0; rxclk_s3 <= 1'b0;
      ovf_s1 <= 1'b0; ovf_s2 <= 1'b0;
      wptr_prev <= '0; idle_cnt <= '0; got_bit <= 1'b0; disc_err <= 1'b0;
    end else if (!rx_enable) begin
      rxclk_s1 <= 1'b0; rxclk_s2 <= 1'b0; rxclk_s3 <= 1'b0;
      ovf_s1 <= 1'b0; ovf_s2 <= 1'b0;
      wptr_prev <= '0; idle_cnt <= '0; got_bit <= 1'b0; disc_err <= 1'b0;
    end else begin
      rxclk_s1 <= rxclk; rxclk_s2 <= rxclk_s1; rxclk_s3 <= rxclk_s2;
      ovf_s1 <= ovf; ovf_s2 <= ovf_s1;
      wptr_prev <= wptr_s;
      if (activity) begin
        got_bit  <= 1'b1;
        idle_cnt <= '0;
      end else if (got_bit && !disc_err) begin
        if (idle_cnt == ($bits(idle_cnt))'(DISC_CYCLES - 1)) disc_err <= 1'b1;
        else idle_cnt <= idle_cnt + 1'b1;
      end
      if (ovf_s2) disc_err <= 1'b1;
    end
  end

  // character decoder, up to two pairs per clock. A character has at least
  // two pairs, so at most one character completes per clock.
  typedef struct packed {
    logic       locked, esc_pend, acc, is_ctrl;
    logic [2:0] cnt;
    logic [7:0] win, dbuf;
  } dec_state_t;

  typedef struct packed {
    logic       null_v, fct_v, nchar_v, time_v, perr, eerr;
    nchar_t     nch;
    logic [7:0] tc;
  } dec_event_t;

  typedef struct packed {
    dec_state_t st;
    dec_event_t ev;
  } dec_t;

  // advance the decoder by one pair {even, odd}; events are added to those
  // already in d.ev
  function automatic dec_t dec_step(input dec_t d, input logic [1:0] pr);
    dec_t       r;
    logic [7:0] w;
    r = d;
    if (!d.st.locked) begin
      // window in transmission order, bit 0 earliest
      w = {pr[0], pr[1], d.st.win[7:2]};
      r.st.win = w;
      if (w[7:1] == 7'b0010111) begin
        r.st.locked   = 1'b1;
        r.ev.null_v   = 1'b1;
        r.st.acc      = 1'b0;
        r.st.esc_pend = 1'b0;
        r.st.cnt      = '0;
      end
    end else if (d.st.cnt == 3'd0) begin
      // parity and flag bits
      if ((pr[1] ^ pr[0] ^ d.st.acc) != 1'b1) r.ev.perr = 1'b1;
      r.st.is_ctrl = pr[0];
      r.st.cnt     = 3'd1;
    end else if (d.st.is_ctrl) begin
      // control code, {first, second} = {pr[1], pr[0]}
      r.st.cnt = 3'd0;
      r.st.acc = pr[1] ^ pr[0];
      unique case (ctrl_code_t'({pr[1], pr[0]}))
        CC_FCT: begin
          if (d.st.esc_pend) r.ev.null_v = 1'b1;
          else               r.ev.fct_v  = 1'b1;
          r.st.esc_pend = 1'b0;
        end
        CC_EOP, CC_EEP: begin
          if (d.st.esc_pend) r.ev.eerr = 1'b1;
          else begin
            r.ev.nchar_v = 1'b1;
            r.ev.nch     = '{ctrl: 1'b1, data: {7'b0, pr[1]}};
          end
        end
        default: begin  // ESC
          if (d.st.esc_pend) r.ev.eerr = 1'b1;
          r.st.esc_pend = 1'b1;
        end
      endcase
    end else begin
      // data bits, least significant first
      w = {pr[0], pr[1], d.st.dbuf[7:2]};
      r.st.dbuf = w;
      if (d.st.cnt == 3'd4) begin
        r.st.cnt = 3'd0;
        r.st.acc = ^w;
        if (d.st.esc_pend) begin
          r.ev.time_v   = 1'b1;
          r.ev.tc       = w;
          r.st.esc_pend = 1'b0;
        end else begin
          r.ev.nchar_v = 1'b1;
          r.ev.nch     = '{ctrl: 1'b0, data: w};
        end
      end else begin
        r.st.cnt = d.st.cnt + 3'd1;
      end
    end
    return r;
  endfunction

  dec_state_t st;
  dec_t       d0, d1, d2, dn;

  // the second pair is only taken when the first raised no error, so that
  // nothing is reported after an error
  always_comb begin
    d0    = '0;
    d0.st = st;
    d1    = dec_step(d0, pair);
    d2    = dec_step(d1, pair2);
    if (err_any || avail == 2'd0) begin
      dn = d0; take = 2'd0;
    end else if (avail == 2'd1 || d1.ev.perr || d1.ev.eerr) begin
      dn = d1; take = 2'd1;
    end else begin
      dn = d2; take = 2'd2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= '0;
      got_null <= 1'b0; got_fct <= 1'b0; got_nchar <= 1'b0; got_time <= 1'b0;
      nchar <= '0; time_out <= '0; parity_err <= 1'b0; esc_err <= 1'b0;
    end else if (!rx_enable) begin
      st <= '0;
      got_null <= 1'b0; got_fct <= 1'b0; got_nchar <= 1'b0; got_time <= 1'b0;
      parity_err <= 1'b0; esc_err <= 1'b0;
    end else begin
      st        <= dn.st;
      got_null  <= dn.ev.null_v;
      got_fct   <= dn.ev.fct_v;
      got_nchar <= dn.ev.nchar_v;
      got_time  <= dn.ev.time_v;
      if (dn.ev.nchar_v) nchar    <= dn.ev.nch;
      if (dn.ev.time_v)  time_out <= dn.ev.tc;
      if (dn.ev.perr)    parity_err <= 1'b1;
      if (dn.ev.eerr)    esc_err    <= 1'b1;
    end
  end

endmodule
