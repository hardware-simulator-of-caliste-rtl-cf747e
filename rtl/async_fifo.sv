// async_fifo: dual-clock first-word-fall-through FIFO.
//
// Separates two clock domains: the 60 MHz USB domain from the 50 MHz
// system domain in the controller, and the controller from each detector
// quarter. Classic design: binary pointers in each domain, Gray-coded copies
// passed through two-flop synchronisers, full computed in the write domain and
// empty in the read domain, both conservative. rdata shows the head word
// whenever empty is low; rd_en pops it. The reset is asserted in both domains
// together (wrst and rrst may be the same signal synchronised to each clock).
// The structure is this design's own; only the need for clock-crossing FIFOs
// comes from the simulator's description.
module async_fifo #(
  parameter int unsigned DW = 8,
  parameter int unsigned AW = 9
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          full,
  input  logic          rclk,
  input  logic          rrst,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          empty
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0]   wbin, wgray, rbin, rgray;
  logic [AW:0]   rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]   wbin_n, rbin_n;

  function automatic logic [AW:0] b2g(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  assign wbin_n = wbin + (AW+1)'(wr_en && !full);
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= b2g(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk)
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;

  // read domain
  assign rbin_n = rbin + (AW+1)'(rd_en && !empty);
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= b2g(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

endmodule
