// spw_rx_buffer: receive buffer of the codec and its credit management.
//
// A first-in first-out memory of DEPTH N-chars (56 by default, the size of
// the receive buffer in the source document) written by the receiver and read
// by the host through rx_valid/rx_data/rx_ready (a word moves when both
// valid and ready are high; rx_data is the oldest word).
//
// Flow control: "outstanding" counts the N-chars the far end may still send
// on the FCTs already granted. While fct_enable is high and the buffer has
// room for eight more N-chars beyond those outstanding, fct_req asks the
// transmitter for an FCT; fct_ack (one clock, when the FCT starts) adds
// eight. Each received N-char takes one. An N-char arriving with nothing
// outstanding, or with the buffer full, raises credit_error (sticky until
// fct_enable falls). The counter is cleared while fct_enable is low, that is
// whenever the link is not in Connecting or Run; buffered data is kept.
// Storage is a plain array; the write and the read each take one clock.
module spw_rx_buffer
  import spw_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_CREDIT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   fct_enable,
  // from the receiver
  input  logic   wr_en,
  input  nchar_t wr_data,
  // to the transmitter
  output logic   fct_req,
  input  logic   fct_ack,
  output logic   credit_error,
  // host side
  output logic   rx_valid,
  output nchar_t rx_data,
  input  logic   rx_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  nchar_t mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [CW-1:0] outstanding;
  logic do_wr, do_rd;

  assign rx_valid = (count != '0);
  assign rx_data  = mem[rp];
  assign do_rd    = rx_valid && rx_ready;
  assign do_wr    = wr_en && (count != CW'(DEPTH));
  assign fct_req  = fct_enable && !credit_error &&
                    ((CW+1)'(outstanding) + (CW+1)'(FCT_CREDIT) + (CW+1)'(count) <= (CW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= (wp == PW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == PW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      outstanding <= '0; credit_error <= 1'b0;
    end else if (!fct_enable) begin
      outstanding <= '0; credit_error <= 1'b0;
    end else begin
      if (wr_en && (outstanding == '0 || count == CW'(DEPTH))) credit_error <= 1'b1;
      outstanding <= outstanding
                     + (fct_ack ? CW'(FCT_CREDIT) : '0)
                     - ((wr_en && outstanding != '0) ? CW'(1) : '0);
    end
  end

endmodule
