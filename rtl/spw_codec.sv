// spw_codec: SpaceWire encoder-decoder (codec).
//
// Three blocks, as in the classic codec block diagram: the transmitter
// (spw_tx, with spw_ddr_out for the data and strobe lines), the receiver
// (spw_rx) and the initialisation state machine (spw_link_fsm), plus the
// 56-N-char receive buffer with its credit management (spw_rx_buffer), which
// asks the transmitter for FCTs. The receiver reports events to the state
// machine and FCTs to the transmitter's credit counter; the state machine
// enables receiver and transmitter.
//
// Rate: until the link reaches Run the transmitter uses INIT_DIV (each bit
// held 20 clocks: 10 Mb/s at 200 MHz); in Run it uses tx_div from the host,
// where 0 selects the DDR mode of two bits per clock (400 Mb/s at 200 MHz).
//
// Host interface: N-chars in (tx_valid/tx_data/tx_ready) and out
// (rx_valid/rx_data/rx_ready), time-codes in (tick_in/time_in) and out
// (tick_out/time_out, one-clock pulse), link control (link_start,
// link_disable, autostart, tx_div) and status (link_state, error flags).
// d_out/s_out are the line outputs, d_in/s_in the line inputs, which may
// come from a transmitter with any clock. All logic except the receiver's
// capture stage runs on clk.
module spw_codec
  import spw_pkg::*;
#(
  parameter int unsigned RXBUF_DEPTH = MAX_CREDIT,
  parameter int unsigned INIT_DIV    = INIT_TX_DIV,
  parameter int unsigned T_6U4       = T_6U4_CYCLES,
  parameter int unsigned T_12U8      = T_12U8_CYCLES,
  parameter int unsigned DISC_CYCLES = T_DISC_CYCLES
) (
  input  logic        clk,
  input  logic        rst_n,
  // link control and status
  input  logic        link_start,
  input  logic        link_disable,
  input  logic        autostart,
  input  logic [7:0]  tx_div,
  output link_state_t link_state,
  output logic        running,
  output logic        err_disc,
  output logic        err_parity,
  output logic        err_esc,
  output logic        err_credit,
  // transmit data and time-codes
  input  logic        tx_valid,
  input  nchar_t      tx_data,
  output logic        tx_ready,
  input  logic        tick_in,
  input  logic [7:0]  time_in,
  // received data and time-codes
  output logic        rx_valid,
  output nchar_t      rx_data,
  input  logic        rx_ready,
  output logic        tick_out,
  output logic [7:0]  time_out,
  // SpaceWire line
  input  logic        d_in,
  input  logic        s_in,
  output logic        d_out,
  output logic        s_out
);

  logic rx_enable, tx_enable, fct_enable, data_enable;
  logic got_null, got_fct, got_nchar, got_time;
  nchar_t rx_nchar;
  logic fct_req, fct_ack, tx_credit_err, rx_credit_err;
  logic d_even, d_odd, s_even, s_odd;
  logic [5:0] tx_credit;
  logic [7:0] div_eff;
  logic [$clog2(RXBUF_DEPTH+1)-1:0] rx_count;

  assign div_eff    = (link_state == ST_RUN) ? tx_div : 8'(INIT_DIV);
  assign running    = (link_state == ST_RUN);
  assign err_credit = tx_credit_err | rx_credit_err;

  spw_link_fsm #(.T_6U4(T_6U4), .T_12U8(T_12U8)) u_fsm (
    .clk, .rst_n,
    .link_start, .link_disable, .autostart,
    .got_null, .got_fct, .got_nchar, .got_time,
    .rx_error   (err_disc | err_parity | err_esc),
    .credit_error(err_credit),
    .state      (link_state),
    .rx_enable, .tx_enable, .fct_enable, .data_enable
  );

  spw_rx #(.DISC_CYCLES(DISC_CYCLES)) u_rx (
    .clk, .rst_n, .rx_enable, .d_in, .s_in,
    .got_bit   (),
    .got_null, .got_fct, .got_nchar,
    .nchar     (rx_nchar),
    .got_time,
    .time_out,
    .parity_err(err_parity),
    .esc_err   (err_esc),
    .disc_err  (err_disc)
  );

  assign tick_out = got_time;

  spw_rx_buffer #(.DEPTH(RXBUF_DEPTH)) u_rxbuf (
    .clk, .rst_n, .fct_enable,
    .wr_en  (got_nchar),
    .wr_data(rx_nchar),
    .fct_req, .fct_ack,
    .credit_error(rx_credit_err),
    .rx_valid, .rx_data, .rx_ready,
    .count  (rx_count)
  );

  spw_tx u_tx (
    .clk, .rst_n, .tx_enable, .fct_enable, .data_enable,
    .tx_div (div_eff),
    .got_fct, .fct_req, .fct_ack,
    .credit_error(tx_credit_err),
    .credit (tx_credit),
    .tx_valid, .tx_data, .tx_ready, .tick_in, .time_in,
    .d_even, .d_odd, .s_even, .s_odd
  );

  spw_ddr_out u_ddr_d (.clk, .rst_n, .d_even(d_even), .d_odd(d_odd), .q(d_out));
  spw_ddr_out u_ddr_s (.clk, .rst_n, .d_even(s_even), .d_odd(s_odd), .q(s_out));

endmodule
