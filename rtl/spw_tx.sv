// spw_tx: SpaceWire transmitter working on two bit flows, even and odd.
//
// Every SpaceWire character has an even number of bits (NULL 8, FCT/EOP/EEP 4,
// data 10, time-code 14) and the first bit after reset is an even bit, so the
// parity bit of every character is an even bit. The transmitter therefore
// emits bit pairs {even, odd} and, because data and strobe both start low and
// the first (zero) parity bit must toggle the strobe, the strobe of each flow
// is a fixed function of its data: S_even = not D_even, S_odd = D_odd. The
// receiver's D xor S then is high during even bits and low during odd ones.
//
// Character choice at each character boundary follows the standard's
// priority: time-code, FCT, N-char, NULL. Time-codes and N-chars are sent only
// with data_enable (link in Run), FCTs with fct_enable (Connecting or Run),
// NULLs whenever tx_enable is high. Parity is odd over the previous
// character's data/control bits plus the current parity and flag bits.
// N-chars need transmit credit: each received FCT (got_fct) adds eight, each
// N-char sent takes one, and credit above 56 raises credit_error.
//
// Rate: tx_div = 0 is the DDR mode, one pair per clock (two bits per clock,
// 400 Mb/s at 200 MHz); tx_div = N > 0 holds each bit N whole clocks and the
// pair outputs then carry the same bit twice. tx_div is sampled at character
// boundaries. The pair outputs are registered; spw_ddr_out turns them into
// the line signals. With tx_enable low all state is cleared and D = S = 0.
//
// Host side: tx_valid/tx_data/tx_ready, a transfer happens when both are
// high (tx_ready may depend on tx_valid). tick_in with time_in queues one
// time-code. fct_req/fct_ack: the receive buffer asks for an FCT, fct_ack
// pulses for one clock when that FCT is started.
//
// The even/odd flows and the strobe equations follow the source document;
// the host handshake, the rate encoding and the credit counter placement
// are this design's choices.
module spw_tx
  import spw_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // control from the initialisation state machine
  input  logic       tx_enable,
  input  logic       fct_enable,
  input  logic       data_enable,
  input  logic [7:0] tx_div,
  // flow control
  input  logic       got_fct,
  input  logic       fct_req,
  output logic       fct_ack,
  output logic       credit_error,
  output logic [5:0] credit,
  // host N-chars and time-codes
  input  logic       tx_valid,
  input  nchar_t     tx_data,
  output logic       tx_ready,
  input  logic       tick_in,
  input  logic [7:0] time_in,
  // registered bit pairs for the DDR output registers
  output logic       d_even,
  output logic       d_odd,
  output logic       s_even,
  output logic       s_odd
);

  typedef enum logic [2:0] {SEL_NULL, SEL_FCT, SEL_NCHAR, SEL_TIME} sel_t;

  logic [13:0] sr, sr_n;      // bits still to send, bit 0 first
  logic [3:0]  nb, nb_n;      // number of bits in sr
  logic [7:0]  div_q, div_n;  // rate of the character being sent
  logic [7:0]  hold, hold_n;  // clocks the current bit has been held
  logic        acc, acc_n;    // xor of the previous character's data bits
  logic        tick_pend;
  logic [7:0]  time_q;
  logic        pair_valid;
  logic        pe_d, po_d, pe_s, po_s;
  logic        load;
  sel_t        sel;
  logic [13:0] ld_bits;
  logic [3:0]  ld_len;
  logic        ld_acc;
  logic [3:0]  nb_after;

  // character selection by priority
  always_comb begin
    if (data_enable && tick_pend)                         sel = SEL_TIME;
    else if (fct_enable && fct_req)                       sel = SEL_FCT;
    else if (data_enable && tx_valid && credit != 6'd0)   sel = SEL_NCHAR;
    else                                                  sel = SEL_NULL;
  end

  // bit pattern of the selected character, bit 0 sent first
  always_comb begin
    ld_bits = '0;
    ld_len  = 4'd0;
    ld_acc  = 1'b0;
    unique case (sel)
      SEL_TIME: begin   // ESC then data character with the time value
        ld_bits = {time_q, 1'b0, 1'b1, 1'b1, 1'b1, 1'b1, acc};
        ld_len  = 4'd14;
        ld_acc  = ^time_q;
      end
      SEL_FCT: begin
        ld_bits = {10'b0, 1'b0, 1'b0, 1'b1, acc};
        ld_len  = 4'd4;
        ld_acc  = 1'b0;
      end
      SEL_NCHAR: begin
        if (tx_data.ctrl) begin   // EOP = P 1 0 1, EEP = P 1 1 0
          ld_bits = {10'b0, ~tx_data.data[0], tx_data.data[0], 1'b1, acc};
          ld_len  = 4'd4;
          ld_acc  = 1'b1;
        end else begin
          ld_bits = {4'b0, tx_data.data, 1'b0, ~acc};
          ld_len  = 4'd10;
          ld_acc  = ^tx_data.data;
        end
      end
      default: begin    // NULL = ESC (P 1 1 1) then FCT (0 1 0 0)
        ld_bits = {6'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1, 1'b1, acc};
        ld_len  = 4'd8;
        ld_acc  = 1'b0;
      end
    endcase
  end

  // serialisation: which bits leave this clock, when the next char loads
  always_comb begin
    sr_n       = sr;
    nb_n       = nb;
    div_n      = div_q;
    hold_n     = hold;
    acc_n      = acc;
    pair_valid = 1'b0;
    pe_d = 1'b0; po_d = 1'b0; pe_s = 1'b0; po_s = 1'b0;
    nb_after   = nb;
    if (nb == 4'd0) begin
      nb_after = 4'd0;                          // first character after enable
    end else if (div_q == 8'd0) begin
      pair_valid = 1'b1;                        // DDR mode: one pair per clock
      pe_d = sr[0];  pe_s = ~sr[0];
      po_d = sr[1];  po_s = sr[1];
      sr_n     = sr >> 2;
      nb_after = nb - 4'd2;
    end else begin
      pair_valid = 1'b1;                        // slow mode: same bit twice
      pe_d = sr[0];  po_d = sr[0];
      pe_s = nb[0] ? sr[0] : ~sr[0];            // nb even <=> even bit
      po_s = pe_s;
      if (hold >= div_q - 8'd1) begin
        hold_n   = 8'd0;
        sr_n     = sr >> 1;
        nb_after = nb - 4'd1;
      end else begin
        hold_n   = hold + 8'd1;
      end
    end
    nb_n = nb_after;
    load = (nb_after == 4'd0);
    if (load) begin
      sr_n   = ld_bits;
      nb_n   = ld_len;
      acc_n  = ld_acc;
      div_n  = tx_div;
      hold_n = 8'd0;
    end
  end

  assign tx_ready = tx_enable && load && (sel == SEL_NCHAR);
  assign fct_ack  = tx_enable && load && (sel == SEL_FCT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; nb <= '0; div_q <= '0; hold <= '0; acc <= 1'b0;
      d_even <= 1'b0; d_odd <= 1'b0; s_even <= 1'b0; s_odd <= 1'b0;
    end else if (!tx_enable) begin
      sr <= '0; nb <= '0; div_q <= '0; hold <= '0; acc <= 1'b0;
      d_even <= 1'b0; d_odd <= 1'b0; s_even <= 1'b0; s_odd <= 1'b0;
    end else begin
      sr <= sr_n; nb <= nb_n; div_q <= div_n; hold <= hold_n; acc <= acc_n;
      if (pair_valid) begin
        d_even <= pe_d; d_odd <= po_d; s_even <= pe_s; s_odd <= po_s;
      end
    end
  end

  // time-code queue (one deep) and transmit credit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick_pend <= 1'b0; time_q <= '0;
      credit <= '0; credit_error <= 1'b0;
    end else if (!tx_enable) begin
      tick_pend <= 1'b0;
      credit <= '0; credit_error <= 1'b0;
    end else begin
      if (tick_in && data_enable) begin
        tick_pend <= 1'b1; time_q <= time_in;
      end else if (load && sel == SEL_TIME) begin
        tick_pend <= 1'b0;
      end
      begin : credit_count
        logic [6:0] c;
        c = {1'b0, credit};
        if (got_fct)  c = c + 7'(FCT_CREDIT);
        if (tx_ready) c = c - 7'd1;
        if (c > 7'(MAX_CREDIT)) begin
          credit_error <= 1'b1;
          credit <= 6'(MAX_CREDIT);
        end else begin
          credit <= c[5:0];
        end
      end
    end
  end

endmodule
