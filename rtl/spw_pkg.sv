// spw_pkg: types and constants shared by the SpaceWire codec and router.
//
// An N-char on the host side of the codec and on every router port is a 9-bit
// word: bit 8 is the control flag, bits 7:0 the data byte. With the flag set,
// bit 0 tells the packet marker: 0 = EOP (normal end of packet), 1 = EEP
// (error end of packet). Control codes are the two bits that follow the
// parity and flag bits on the wire, in transmission order (ECSS-E-50-12A).
// Timing constants are clock counts at the 200 MHz top clock of this design.
package spw_pkg;

  // Host / router N-char word
  typedef struct packed {
    logic       ctrl;   // 1: end-of-packet marker
    logic [7:0] data;   // data byte, or {7'b0, eep} when ctrl = 1
  } nchar_t;

  localparam nchar_t NCHAR_EOP = '{ctrl: 1'b1, data: 8'h00};
  localparam nchar_t NCHAR_EEP = '{ctrl: 1'b1, data: 8'h01};

  // Control codes, {first bit, second bit} as sent after P and F
  typedef enum logic [1:0] {
    CC_FCT = 2'b00,
    CC_EOP = 2'b01,
    CC_EEP = 2'b10,
    CC_ESC = 2'b11
  } ctrl_code_t;

  // Link initialisation states of the standard
  typedef enum logic [2:0] {
    ST_ERROR_RESET = 3'd0,
    ST_ERROR_WAIT  = 3'd1,
    ST_READY       = 3'd2,
    ST_STARTED     = 3'd3,
    ST_CONNECTING  = 3'd4,
    ST_RUN         = 3'd5
  } link_state_t;

  // Credit: one FCT grants eight N-chars, the receive buffer holds 56
  localparam int unsigned FCT_CREDIT   = 8;
  localparam int unsigned MAX_CREDIT   = 56;

  // Timeouts in 200 MHz clock cycles (5 ns)
  localparam int unsigned T_6U4_CYCLES  = 1280;  // 6.4 us
  localparam int unsigned T_12U8_CYCLES = 2560;  // 12.8 us
  localparam int unsigned T_DISC_CYCLES = 170;   // 850 ns disconnect timeout

  // Transmit bit-rate setting: 0 selects the DDR mode (two bits per clock,
  // 400 Mb/s at 200 MHz); N > 0 holds each bit for N clocks (200/N Mb/s).
  localparam int unsigned INIT_TX_DIV = 20;      // 10 Mb/s start-up rate

  // Router: logical addresses 32..255 (224 of them), port-number encoding
  localparam int unsigned FIRST_LOGICAL_ADDR = 32;
  localparam int unsigned MAX_ROUTER_PORTS   = 8;
  localparam int unsigned NUM_LOGICAL_ADDR   = 224;
  localparam logic [3:0]  ROUTE_NONE         = 4'hF;

  // Routing table: entry i is the output port of logical address 32 + i,
  // or ROUTE_NONE. The default table sends address 32 + k to port k.
  typedef logic [3:0] route_table_t [NUM_LOGICAL_ADDR];

  function automatic route_table_t default_route_table(input int unsigned nports);
    route_table_t t;
    for (int i = 0; i < NUM_LOGICAL_ADDR; i++)
      t[i] = (i < nports) ? 4'(i) : ROUTE_NONE;
    return t;
  endfunction

endpackage
