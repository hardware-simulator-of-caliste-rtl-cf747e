// tb_async_fifo: self-checking test of the dual-clock FIFO between a 60 MHz
// writer and a 50 MHz reader (the USB-to-system crossing), with random
// stalls on both sides. Every word must arrive once, in order; full and
// empty must never let a word be lost or duplicated, and both flags must
// occur during the run.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst = 1;
  always #8.333 wclk = ~wclk;
  always #10 rclk = ~rclk;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_rx = 0;
  localparam int N = 4000;

  async_fifo #(.DW(8), .AW(4)) dut (.wclk, .wrst(rst), .wr_en, .wdata, .full,
    .rclk, .rrst(rst), .rd_en, .rdata, .empty);

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int sent;
    sent = 0;
    #50 rst = 0;
    while (sent < N) begin
      @(negedge wclk);
      if (full) n_full++;
      wr_en = !full && ($urandom_range(0, 99) < (((sent / 1000) % 2) ? 90 : 40));
      wdata = 8'($urandom);
      @(posedge wclk);
      if (wr_en) begin model.push_back(wdata); sent++; end
    end
    @(negedge wclk) wr_en = 0;
  end

  initial begin
    #50;
    while (n_rx < N) begin
      @(negedge rclk);
      if (empty) n_empty++;
      rd_en = !empty && ($urandom_range(0, 99) < (((n_rx / 1000) % 2) ? 40 : 90));
      if (rd_en) begin
        checks++;
        if (model.size() == 0 || rdata != model[0]) begin
          failures++; $display("FAIL: word %0d got %h", n_rx, rdata);
        end
        if (model.size() > 0) void'(model.pop_front());
        n_rx++;
      end
      @(posedge rclk);
    end
    rd_en = 0;
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL: full %0d empty %0d", n_full, n_empty); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
