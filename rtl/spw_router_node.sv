// spw_router_node: a SpaceWire router with one codec on each of its ports,
// the hub of a star network of up to eight nodes.
//
// Each port is a spw_codec whose received N-chars feed the router's input of
// that port and whose transmitter is fed by the router's output of that port;
// the codec's host interface and the router's port interface match, so no
// glue is needed. Flow control is end to end in the sense the design relies
// on: a blocked router input stops reading the codec's receive buffer, which
// then stops granting FCTs to the far node.
//
// External interface: per port the SpaceWire line (d_in, s_in, d_out,
// s_out), link control (link_start, link_disable, autostart, tx_div) and
// status (link_state, running), and the codec's time-code ports, which the
// router does not use. One clock and one reset serve the whole node.
// The pairing of router and codecs follows the source document; bringing the
// time-code ports out instead of distributing time-codes is this design's
// choice, as the document does not cover time-codes in the router.
module spw_router_node
  import spw_pkg::*;
#(
  parameter int unsigned  NPORTS      = 4,
  parameter route_table_t ROUTES      = default_route_table(NPORTS),
  parameter int unsigned  RXBUF_DEPTH = MAX_CREDIT,
  parameter int unsigned  INIT_DIV    = INIT_TX_DIV,
  parameter int unsigned  T_6U4       = T_6U4_CYCLES,
  parameter int unsigned  T_12U8      = T_12U8_CYCLES,
  parameter int unsigned  DISC_CYCLES = T_DISC_CYCLES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // SpaceWire lines
  input  logic        [NPORTS-1:0] d_in,
  input  logic        [NPORTS-1:0] s_in,
  output logic        [NPORTS-1:0] d_out,
  output logic        [NPORTS-1:0] s_out,
  // link control and status per port
  input  logic        [NPORTS-1:0] link_start,
  input  logic        [NPORTS-1:0] link_disable,
  input  logic        [NPORTS-1:0] autostart,
  input  logic [NPORTS-1:0][7:0]   tx_div,
  output link_state_t [NPORTS-1:0] link_state,
  output logic        [NPORTS-1:0] running,
  output logic        [NPORTS-1:0] link_error,
  // time-codes per port
  input  logic        [NPORTS-1:0] tick_in,
  input  logic [NPORTS-1:0][7:0]   time_in,
  output logic        [NPORTS-1:0] tick_out,
  output logic [NPORTS-1:0][7:0]   time_out,
  // router status
  output logic        [NPORTS-1:0] blocked,
  output logic        [NPORTS-1:0] dropped
);

  logic   [NPORTS-1:0] r_in_valid, r_in_ready, r_out_valid, r_out_ready;
  nchar_t [NPORTS-1:0] r_in_data, r_out_data;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    logic e_disc, e_par, e_esc, e_cred;
    assign link_error[p] = e_disc | e_par | e_esc | e_cred;

    spw_codec #(
      .RXBUF_DEPTH(RXBUF_DEPTH), .INIT_DIV(INIT_DIV),
      .T_6U4(T_6U4), .T_12U8(T_12U8), .DISC_CYCLES(DISC_CYCLES)
    ) u_codec (
      .clk, .rst_n,
      .link_start  (link_start[p]),
      .link_disable(link_disable[p]),
      .autostart   (autostart[p]),
      .tx_div      (tx_div[p]),
      .link_state  (link_state[p]),
      .running     (running[p]),
      .err_disc    (e_disc),
      .err_parity  (e_par),
      .err_esc     (e_esc),
      .err_credit  (e_cred),
      .tx_valid    (r_out_valid[p]),
      .tx_data     (r_out_data[p]),
      .tx_ready    (r_out_ready[p]),
      .tick_in     (tick_in[p]),
      .time_in     (time_in[p]),
      .rx_valid    (r_in_valid[p]),
      .rx_data     (r_in_data[p]),
      .rx_ready    (r_in_ready[p]),
      .tick_out    (tick_out[p]),
      .time_out    (time_out[p]),
      .d_in        (d_in[p]),
      .s_in        (s_in[p]),
      .d_out       (d_out[p]),
      .s_out       (s_out[p])
    );
  end

  spw_router #(.NPORTS(NPORTS), .ROUTES(ROUTES)) u_router (
    .clk, .rst_n,
    .in_valid (r_in_valid),
    .in_data  (r_in_data),
    .in_ready (r_in_ready),
    .out_valid(r_out_valid),
    .out_data (r_out_data),
    .out_ready(r_out_ready),
    .blocked, .dropped
  );

endmodule
