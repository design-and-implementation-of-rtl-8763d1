// spw_link_fsm: link initialisation state machine of a SpaceWire codec.
//
// States and transitions are those of the SpaceWire standard (ECSS-E-50-12A):
//   ErrorReset --6.4 us--> ErrorWait --12.8 us--> Ready --link enabled-->
//   Started --gotNULL--> Connecting --gotFCT--> Run.
// Started and Connecting fall back to ErrorReset after 12.8 us without
// progress. Any receive error (disconnect, parity, escape), a credit error,
// or a character the state does not yet allow (FCT before Connecting,
// N-char or time-code before Run) also sends the link to ErrorReset, and so
// does link_disable in Run. "Link enabled" is
// !link_disable && (link_start || (autostart && gotNULL)).
// gotNULL is remembered from the first NULL until the receiver is reset.
//
// Outputs, decoded from the registered state: rx_enable (all states but
// ErrorReset), tx_enable (Started, Connecting, Run: NULLs), fct_enable
// (Connecting, Run), data_enable (Run). The timers count system clocks;
// their defaults are 6.4 us and 12.8 us at 200 MHz.
// The document names this block; its behaviour here is the standard's.
module spw_link_fsm
  import spw_pkg::*;
#(
  parameter int unsigned T_6U4  = T_6U4_CYCLES,
  parameter int unsigned T_12U8 = T_12U8_CYCLES
) (
  input  logic        clk,
  input  logic        rst_n,
  // link control
  input  logic        link_start,
  input  logic        link_disable,
  input  logic        autostart,
  // receiver events
  input  logic        got_null,
  input  logic        got_fct,
  input  logic        got_nchar,
  input  logic        got_time,
  input  logic        rx_error,      // disconnect, parity or escape error
  input  logic        credit_error,
  // control outputs
  output link_state_t state,
  output logic        rx_enable,
  output logic        tx_enable,
  output logic        fct_enable,
  output logic        data_enable
);

  link_state_t state_n;
  logic [$clog2(T_12U8+1)-1:0] timer;
  logic null_seen, null_seen_n;
  logic t6_done, t12_done, link_enabled;

  assign null_seen_n  = null_seen | got_null;
  assign t6_done      = (timer == ($bits(timer))'(T_6U4 - 1));
  assign t12_done     = (timer == ($bits(timer))'(T_12U8 - 1));
  assign link_enabled = !link_disable && (link_start || (autostart && null_seen_n));

  always_comb begin
    state_n = state;
    unique case (state)
      ST_ERROR_RESET: if (t6_done) state_n = ST_ERROR_WAIT;
      ST_ERROR_WAIT: begin
        if (rx_error || got_fct || got_nchar || got_time) state_n = ST_ERROR_RESET;
        else if (t12_done)                                 state_n = ST_READY;
      end
      ST_READY: begin
        if (rx_error || got_fct || got_nchar || got_time) state_n = ST_ERROR_RESET;
        else if (link_enabled)                             state_n = ST_STARTED;
      end
      ST_STARTED: begin
        if (rx_error || got_fct || got_nchar || got_time || t12_done)
          state_n = ST_ERROR_RESET;
        else if (null_seen_n) state_n = ST_CONNECTING;
      end
      ST_CONNECTING: begin
        if (rx_error || got_nchar || got_time || t12_done || credit_error)
          state_n = ST_ERROR_RESET;
        else if (got_fct) state_n = ST_RUN;
      end
      ST_RUN: begin
        if (rx_error || credit_error || link_disable) state_n = ST_ERROR_RESET;
      end
      default: state_n = ST_ERROR_RESET;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_ERROR_RESET;
      timer     <= '0;
      null_seen <= 1'b0;
    end else begin
      state <= state_n;
      if (state_n != state) timer <= '0;
      else if (!t12_done)   timer <= timer + 1'b1;
      null_seen <= (state_n == ST_ERROR_RESET) ? 1'b0 : null_seen_n;
    end
  end

  assign rx_enable   = (state != ST_ERROR_RESET);
  assign tx_enable   = (state == ST_STARTED) || (state == ST_CONNECTING) || (state == ST_RUN);
  assign fct_enable  = (state == ST_CONNECTING) || (state == ST_RUN);
  assign data_enable = (state == ST_RUN);

endmodule
