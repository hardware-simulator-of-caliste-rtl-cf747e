// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used as the fast event queue between memory storage and the event
// distributor, which smooths out irregular storage reads and lets short
// bursts of events exceed the average rate. The head word is visible on rdata
// whenever empty is low; rd_en pops it. A write to a full FIFO or a read from
// an empty one is ignored (and flagged by an assertion). count gives the
// fill level. Depth is a power of two; the default of 1024 words is this
// design's choice (the queue's size is not specified).
module sync_fifo #(
  parameter int unsigned DW = 32,
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          full,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          empty,
  output logic [AW:0]   count
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0]   wp, rp;

  assign count = wp - rp;
  assign full  = count[AW];
  assign empty = (count == '0);
  assign rdata = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0;
    end else begin
      if (wr_en && !full) wp <= wp + 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (wr_en && !full) mem[wp[AW-1:0]] <= wdata;

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));

endmodule
