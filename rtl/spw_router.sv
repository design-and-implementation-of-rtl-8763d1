// spw_router: SpaceWire routing switch with logical addressing and wormhole
// routing.
//
// NPORTS ports (four by default, at least three, at most eight) each have an
// input, fed with the N-chars a codec has received, and an output, feeding a
// codec's transmitter; both use the codec's host handshake (valid/ready,
// 9-bit N-char). The first data character of a packet is its logical address
// (32..255); a constant routing table (parameter ROUTES) gives its output
// port. The header is forwarded with the packet (no header deletion).
//
// Per input a small controller waits for a header, looks the address up and
// requests the output port. Each output has a round-robin arbiter
// (spw_router_arbiter). Once granted, the input is switched straight through
// to the output until the EOP or EEP has passed, then the port is released.
// While the wanted output is busy the input simply stops reading: the codec's
// receive buffer fills and its flow control holds the sender back, so
// nothing is lost. A packet whose address is not in the table (path
// addresses 0..31 included) is read and dropped up to its end marker; a lone
// end marker is dropped. The switch matrix is combinational: an N-char moves
// from input to output in the clock it is offered.
//
// The logical addressing, the constant table, the wormhole routing, the
// stall behaviour and the port limits follow the source document; the table
// contents, the arbitration order and the handling of bad addresses are this
// design's.
module spw_router
  import spw_pkg::*;
#(
  parameter int unsigned  NPORTS = 4,
  parameter route_table_t ROUTES = default_route_table(NPORTS)
) (
  input  logic   clk,
  input  logic   rst_n,
  // from the codecs' receive side
  input  logic   [NPORTS-1:0] in_valid,
  input  nchar_t [NPORTS-1:0] in_data,
  output logic   [NPORTS-1:0] in_ready,
  // to the codecs' transmit side
  output logic   [NPORTS-1:0] out_valid,
  output nchar_t [NPORTS-1:0] out_data,
  input  logic   [NPORTS-1:0] out_ready,
  // status, one bit per input
  output logic   [NPORTS-1:0] blocked,   // header waiting for a busy port
  output logic   [NPORTS-1:0] dropped    // pulse: packet discarded
);

  localparam int unsigned IW = $clog2(NPORTS);

  initial begin
    assert (NPORTS >= 3 && NPORTS <= MAX_ROUTER_PORTS)
      else $error("spw_router: NPORTS must be 3..8");
  end

  typedef enum logic [1:0] {IN_IDLE, IN_WAIT, IN_FWD, IN_DISCARD} in_state_t;

  in_state_t   st [NPORTS];
  logic [IW-1:0] dest [NPORTS];
  logic [NPORTS-1:0] req_m  [NPORTS];   // req_m[o][i]: input i wants output o
  logic [NPORTS-1:0] busy_o, rel_o;
  logic [IW-1:0]     owner  [NPORTS];
  logic [NPORTS-1:0] granted, fwd_xfer;

  // per-input controllers
  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    logic [3:0] lookup;
    logic       addr_ok;
    always_comb begin
      lookup  = ROUTE_NONE;
      if (in_data[i].data >= 8'(FIRST_LOGICAL_ADDR))
        lookup = ROUTES[in_data[i].data - 8'(FIRST_LOGICAL_ADDR)];
      addr_ok = (lookup != ROUTE_NONE) && (lookup < 4'(NPORTS));
    end

    assign granted[i]  = busy_o[dest[i]] && (owner[dest[i]] == IW'(i));
    assign fwd_xfer[i] = (st[i] == IN_FWD) && in_valid[i] && out_ready[dest[i]];
    assign blocked[i]  = (st[i] == IN_WAIT) && !granted[i];

    always_comb begin
      unique case (st[i])
        IN_IDLE:    in_ready[i] = in_data[i].ctrl;     // drop lone markers
        IN_FWD:     in_ready[i] = out_ready[dest[i]];
        IN_DISCARD: in_ready[i] = 1'b1;
        default:    in_ready[i] = 1'b0;
      endcase
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[i]      <= IN_IDLE;
        dest[i]    <= '0;
        dropped[i] <= 1'b0;
      end else begin
        dropped[i] <= 1'b0;
        unique case (st[i])
          IN_IDLE: if (in_valid[i] && !in_data[i].ctrl) begin
            if (addr_ok) begin
              dest[i] <= IW'(lookup);
              st[i]   <= IN_WAIT;
            end else begin
              st[i]      <= IN_DISCARD;   // header is read here
              dropped[i] <= 1'b1;
            end
          end
          IN_WAIT:    if (granted[i]) st[i] <= IN_FWD;
          IN_FWD:     if (fwd_xfer[i] && in_data[i].ctrl) st[i] <= IN_IDLE;
          IN_DISCARD: if (in_valid[i] && in_data[i].ctrl) st[i] <= IN_IDLE;
          default:    st[i] <= IN_IDLE;
        endcase
      end
    end
  end

  // output arbiters and switch matrix
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    for (genvar i = 0; i < NPORTS; i++) begin : g_req
      assign req_m[o][i] = (st[i] == IN_WAIT) && (dest[i] == IW'(o));
    end

    assign rel_o[o] = busy_o[o] && fwd_xfer[owner[o]] && in_data[owner[o]].ctrl;

    spw_router_arbiter #(.N(NPORTS)) u_arb (
      .clk, .rst_n,
      .req          (req_m[o]),
      .release_port (rel_o[o]),
      .busy         (busy_o[o]),
      .owner        (owner[o])
    );

    assign out_valid[o] = busy_o[o] && (st[owner[o]] == IN_FWD) && in_valid[owner[o]];
    assign out_data[o]  = in_data[owner[o]];
  end

endmodule
