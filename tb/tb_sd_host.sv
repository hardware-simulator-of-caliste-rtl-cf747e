// tb_sd_host: self-checking test of the single-card SD controller against
// an SDHC card model: initialisation, a 3-block write, a 4-block read that
// spans written and unwritten blocks under random back-pressure (which
// stops the SD clock), an aborted 10-block read, and the read rate with no
// back-pressure (one 512-byte block in at most 1100 clocks, ~23 MB/s at
// 50 MHz per card).
module tb_sd_host;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  logic cmd_valid = 0, cmd_ready, cmd_write = 0, abort_req = 0;
  logic [31:0] cmd_addr = 0, cmd_count = 0;
  logic wvalid = 0, wready, rvalid, rready = 0, busy, init_done, error;
  logic [7:0] wdata = 0, rdata;
  logic sd_clk, h_cmd_o, h_cmd_oe, c_cmd_o, c_cmd_oe, h_dat_oe, c_dat_oe, cmd_line;
  logic [3:0] h_dat_o, c_dat_o, dat_line;
  int checks = 0, failures = 0;

  assign cmd_line = h_cmd_oe ? h_cmd_o : (c_cmd_oe ? c_cmd_o : 1'b1);
  assign dat_line = h_dat_oe ? h_dat_o : (c_dat_oe ? c_dat_o : 4'hF);

  sd_host #(.SLOW_DIV(2)) dut (.clk, .rst, .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr, .cmd_count,
    .abort_req, .wvalid, .wready, .wdata, .rvalid, .rready, .rdata, .busy, .init_done, .error,
    .sd_clk, .sd_cmd_o(h_cmd_o), .sd_cmd_oe(h_cmd_oe), .sd_cmd_i(cmd_line),
    .sd_dat_o(h_dat_o), .sd_dat_oe(h_dat_oe), .sd_dat_i(dat_line));
  sd_card_model #(.SEED(8'h11)) card (.sd_clk, .cmd_line, .cmd_out(c_cmd_o), .cmd_oe(c_cmd_oe),
    .dat_line, .dat_out(c_dat_o), .dat_oe(c_dat_oe));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic request(input bit w, input int a, input int n);
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    cmd_valid <= 1; cmd_write <= w; cmd_addr <= a; cmd_count <= n;
    @(posedge clk); cmd_valid <= 0;
  endtask

  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] wr_bytes [$];
  initial begin
    int n, bp, cyc;
    #45 rst = 0;
    wait (init_done || error);
    check(init_done && !error, "initialisation");
    check(card.n_bad_seq == 0 && card.n_cmd_crc_err == 0, "card saw a valid command sequence");
    // write 3 blocks at block 5
    for (int i = 0; i < 3 * 512; i++) wr_bytes.push_back(8'($urandom));
    request(1, 5, 3);
    n = 0;
    while (n < 3 * 512) begin
      @(posedge clk);
      if (wvalid && wready) n++;
      wvalid <= (n < 3 * 512) && !(wvalid && wready && n == 3 * 512);
      wdata <= wr_bytes[(wvalid && wready) ? n : n];
    end
    @(posedge clk) wvalid <= 0;
    wait (cmd_ready);
    check(card.n_blocks_wr == 3 && card.n_dat_crc_err == 0 && !error, "3 blocks written");
    n = 0;
    for (int i = 0; i < 3 * 512; i++) if (card.peek(5 * 512 + i) != wr_bytes[i]) n++;
    check(n == 0, $sformatf("written data on card (%0d mismatches)", n));
    // read 4 blocks from block 4 with back-pressure
    request(0, 4, 4);
    n = 0; bp = 0;
    while (n < 4 * 512) begin
      @(posedge clk);
      if (rvalid && rready) begin
        logic [7:0] e;
        e = card.peek(4 * 512 + n);
        if (rdata != e) bp++;
        n++;
      end
      rready <= ((n / 300) % 2 == 1) ? ($urandom_range(0, 9) == 0) : 1'b1;
    end
    rready <= 0;
    check(bp == 0, $sformatf("read data (%0d mismatches)", bp));
    wait (cmd_ready);
    check(!error && card.n_blocks_rd >= 4, "read completed");
    // aborted read
    request(0, 100, 10);
    rready <= 1;
    n = 0;
    while (busy) begin
      @(posedge clk);
      if (rvalid && rready) n++;
      abort_req <= (n >= 700);
    end
    abort_req <= 0;
    check(n >= 1024 && n < 10 * 512, $sformatf("abort ended the read after %0d bytes", n));
    // throughput: 8 blocks with no back-pressure
    repeat (10) @(posedge clk);
    while (rvalid) @(posedge clk);
    request(0, 0, 8);
    cyc = 0; n = 0;
    while (n < 8 * 512) begin @(posedge clk); cyc++; if (rvalid && rready) n++; end
    check(cyc <= 8 * 1100, $sformatf("8 blocks in %0d cycles", cyc));
    wait (cmd_ready);
    check(!error, "no error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
