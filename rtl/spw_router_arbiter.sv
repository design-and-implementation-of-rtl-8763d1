// spw_router_arbiter: round-robin arbiter of one router output port.
//
// While the port is free it grants the first requesting input after the one
// it granted last. The grant is registered (busy, owner) and held until the
// owner signals release, which it does in the clock that its end-of-packet
// marker leaves through the port (wormhole routing: the port belongs to one
// packet from header to EOP/EEP). The port is free again one clock later.
// Round robin is this design's choice; the source document does not say how
// competing inputs are ordered.
module spw_router_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 release_port,
  output logic                 busy,
  output logic [$clog2(N)-1:0] owner
);

  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] last, pick;
  logic          found;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    // first the ports after the last winner, then the rest
    for (int j = 0; j < N; j++) begin
      if (!found && j > int'(last) && req[j]) begin
        found = 1'b1;
        pick  = IW'(j);
      end
    end
    for (int j = 0; j < N; j++) begin
      if (!found && j <= int'(last) && req[j]) begin
        found = 1'b1;
        pick  = IW'(j);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= '0;
      last  <= IW'(N - 1);
    end else if (busy) begin
      if (release_port) busy <= 1'b0;
    end else if (found) begin
      busy  <= 1'b1;
      owner <= pick;
      last  <= pick;
    end
  end

endmodule
