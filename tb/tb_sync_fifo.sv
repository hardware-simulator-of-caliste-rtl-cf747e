// tb_sync_fifo: self-checking test of the single-clock FIFO with random
// writes and reads against a queue model; checks data order, count, full
// at 2**AW words and empty, and that the head word is visible at once.
module tb_sync_fifo;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [15:0] wdata = 0, rdata;
  logic [4:0] count;
  logic [15:0] model [$];
  int checks = 0, failures = 0;

  sync_fifo #(.DW(16), .AW(4)) dut (.clk, .rst, .wr_en, .wdata, .full, .rd_en, .rdata, .empty, .count);

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #45 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      bit w, r; int bias;
      bias = (i / 500) % 2 ? 70 : 30;
      @(negedge clk);
      checks++;
      if (count != 5'(model.size()) || full != (model.size() == 16) || empty != (model.size() == 0) ||
          (model.size() > 0 && rdata != model[0])) begin
        failures++; $display("FAIL: cycle %0d count %0d model %0d", i, count, model.size());
      end
      w = ($urandom_range(0, 99) < bias) && !full;
      r = ($urandom_range(0, 99) < 100 - bias) && !empty;
      wr_en = w; rd_en = r; wdata = 16'($urandom);
      @(posedge clk);
      if (r) void'(model.pop_front());
      if (w) model.push_back(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
