// tb_sd_dual: self-checking test of the two-card storage controller with two
// SDHC card models: both cards initialise, a 2-block (2 KiB) write puts even
// bytes on card A and odd bytes on card B, the data read back in order, and
// 8 logical blocks (8 KiB) stream in at least at 44 MB/s with a 50 MHz
// clock, i.e. 1 KiB in at most 1160 cycles.
module tb_sd_dual;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  logic cmd_valid = 0, cmd_ready, cmd_write = 0, abort_req = 0;
  logic [31:0] cmd_addr = 0, cmd_count = 0;
  logic wvalid = 0, wready, rvalid, rready = 0, busy, init_done, error;
  logic [7:0] wdata = 0, rdata;
  logic [1:0] sd_clk, h_cmd_o, h_cmd_oe, c_cmd_o, c_cmd_oe, h_dat_oe, c_dat_oe, cmd_line;
  logic [3:0] h_dat_o [2], c_dat_o [2], dat_line [2];
  int checks = 0, failures = 0;

  sd_dual #(.SLOW_DIV(2)) dut (.clk, .rst, .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr, .cmd_count,
    .abort_req, .wvalid, .wready, .wdata, .rvalid, .rready, .rdata, .busy, .init_done, .error,
    .sd_clk, .sd_cmd_o(h_cmd_o), .sd_cmd_oe(h_cmd_oe), .sd_cmd_i(cmd_line),
    .sd_dat_o(h_dat_o), .sd_dat_oe(h_dat_oe), .sd_dat_i(dat_line));
  for (genvar i = 0; i < 2; i++) begin : g_card
    assign cmd_line[i] = h_cmd_oe[i] ? h_cmd_o[i] : (c_cmd_oe[i] ? c_cmd_o[i] : 1'b1);
    assign dat_line[i] = h_dat_oe[i] ? h_dat_o[i] : (c_dat_oe[i] ? c_dat_o[i] : 4'hF);
    sd_card_model #(.SEED(8'(8'h40 * i + 3)), .ACMD41_TRIES(2 + i)) card (.sd_clk(sd_clk[i]),
      .cmd_line(cmd_line[i]), .cmd_out(c_cmd_o[i]), .cmd_oe(c_cmd_oe[i]),
      .dat_line(dat_line[i]), .dat_out(c_dat_o[i]), .dat_oe(c_dat_oe[i]));
  end

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
  function automatic logic [7:0] expect_byte(input longint a);
    return (a % 2 == 0) ? g_card[0].card.peek((a / 1024) * 512 + (a % 1024) / 2)
                        : g_card[1].card.peek((a / 1024) * 512 + (a % 1024) / 2);
  endfunction

  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] wr_bytes [$];
  initial begin
    int n, bad, cyc;
    #45 rst = 0;
    wait (init_done || error);
    check(init_done && !error, "both cards initialised");
    for (int i = 0; i < 2048; i++) wr_bytes.push_back(8'($urandom));
    request(1, 7, 2);
    n = 0;
    while (n < 2048) begin
      @(posedge clk);
      if (wvalid && wready) n++;
      wvalid <= (n < 2048);
      wdata <= wr_bytes[n < 2048 ? n : 0];
    end
    wvalid <= 0;
    wait (cmd_ready);
    bad = 0;
    for (int i = 0; i < 2048; i++) begin
      logic [7:0] e;
      e = (i % 2 == 0) ? g_card[0].card.peek(7 * 512 + (i % 1024) / 2 + (i / 1024) * 512)
                       : g_card[1].card.peek(7 * 512 + (i % 1024) / 2 + (i / 1024) * 512);
      if (e != wr_bytes[i]) bad++;
    end
    check(bad == 0, $sformatf("interleaved write (%0d mismatches)", bad));
    // read back blocks 6..9 (one unwritten each side)
    request(0, 6, 4);
    rready <= 1;
    n = 0; bad = 0;
    while (n < 4096) begin
      @(posedge clk);
      if (rvalid && rready) begin
        if (rdata != expect_byte(6 * 1024 + n)) bad++;
        n++;
      end
    end
    check(bad == 0, $sformatf("read back (%0d mismatches)", bad));
    wait (cmd_ready);
    repeat (10) @(posedge clk);
    request(0, 20, 8);
    cyc = 0; n = 0;
    while (n < 8 * 1024) begin @(posedge clk); cyc++; if (rvalid && rready) n++; end
    check(cyc <= 8 * 1160, $sformatf("8 KiB in %0d cycles", cyc));
    $display("read rate %0d kB/s", (8 * 1024 * 50000) / cyc);
    wait (cmd_ready);
    check(!error && g_card[0].card.n_bad_seq == 0 && g_card[1].card.n_bad_seq == 0, "no errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
