// spw_async_fifo: small dual-clock FIFO with Gray-coded pointers.
//
// Carries the receiver's bit pairs from the recovered-clock domain into the
// system clock domain. Each pointer is one bit wider than the address; it is
// Gray coded and passed through two flip-flops into the other domain. Full is
// seen by the writer, the fill level by the reader, both conservatively (a
// pointer seen late only delays them). The reader may take up to two words
// per clock: rdata is the oldest word, rdata2 the one after it, avail the
// number of words it may take now (0, 1 or 2), rd_num how many it takes.
// wptr_sync is the writer's pointer as the reader sees it, so the reader can
// tell that the writer is active.
// The structure is a common textbook one; the source document does not
// describe how the receiver reaches the system clock.
module spw_async_fifo #(
  parameter int unsigned WIDTH = 2,
  parameter int unsigned AW    = 3     // 2**AW entries
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic [1:0]       rd_num,
  output logic [WIDTH-1:0] rdata,
  output logic [WIDTH-1:0] rdata2,
  output logic [1:0]       avail,
  output logic [AW:0]      wptr_sync
);

  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int k = AW - 1; k >= 0; k--) b[k] = b[k+1] ^ g[k];
    return b;
  endfunction

  // write side
  assign wbin_n = wbin + (AW+1)'(1);
  assign full   = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin_n;
        wgray <= bin2gray(wbin_n);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  // read side
  logic [AW:0] fill;
  assign fill   = gray2bin(wgray_r2) - rbin;
  assign avail  = (fill >= (AW+1)'(2)) ? 2'd2 : 2'(fill);
  assign rbin_n = rbin + (AW+1)'(rd_num);
  assign rdata  = mem[rbin[AW-1:0]];
  assign rdata2 = mem[AW'(rbin[AW-1:0] + AW'(1))];
  assign wptr_sync = wgray_r2;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_num != 2'd0 && rd_num <= avail) begin
        rbin  <= rbin_n;
        rgray <= bin2gray(rbin_n);
      end
    end
  end

endmodule
