// spw_ddr_out: double-data-rate output register for the SpaceWire line.
//
// One clock carries two line bits: the even bit from the rising edge, the
// odd bit from the falling edge, which is how the codec reaches 400 Mb/s
// with a clock at half the bit rate. The register is built from two plain
// flip-flops whose outputs are XORed: the rising-edge flop stores
// d_even ^ r_neg, so the XOR shows d_even, and the falling-edge flop stores
// odd ^ r_pos, so the XOR shows the odd bit. Only one flop changes at each
// edge, so the output changes once per edge and never glitches, which
// matters because the far receiver clocks itself on D xor S.
// Both inputs are taken at the rising edge (the odd bit through odd_pos, so
// it is held for the falling edge). Latency: the pair taken at rising edge k
// shows its even bit from that edge and its odd bit from the falling edge
// after it.
// On an FPGA the device's DDR output cell may replace this; the source
// document names DDR registers, the XOR arrangement is this design's.
module spw_ddr_out (
  input  logic clk,
  input  logic rst_n,
  input  logic d_even,   // sent during the high phase
  input  logic d_odd,    // sent during the low phase
  output logic q
);

  logic r_pos, r_neg, odd_pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_pos  <= 1'b0;
      r_pos    <= 1'b0;
    end else begin
      odd_pos  <= d_odd;
      r_pos    <= d_even ^ r_neg;
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) r_neg <= 1'b0;
    else        r_neg <= odd_pos ^ r_pos;
  end

  assign q = r_pos ^ r_neg;

endmodule
