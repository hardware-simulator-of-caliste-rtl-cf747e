// tb_main_sm: self-checking test of the command interpreter together with
// the event distributor and a storage model. Runs STATUS, LUT_WRITE, an
// unknown opcode, WRITE_MEM of a 512-event sequence, READ_MEM, START (the
// whole sequence must be released in order with the spacing of its arrival
// times) and START followed by STOP. Acknowledge bytes and status bytes
// are checked, as is the prefill before the time counter starts.
module tb_main_sm;
  import caliste_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  logic [7:0] rx_data, tx_data, st_wdata, st_rdata;
  logic rx_empty, rx_re, tx_we, tx_full = 0;
  logic st_cmd_valid, st_cmd_ready, st_cmd_write, st_abort, st_wvalid, st_wready, st_rvalid, st_rready, st_busy;
  logic [31:0] st_cmd_addr, st_cmd_count;
  logic d_clear, d_run, d_valid, d_full, lut_we;
  logic [31:0] d_word, d_rel, d_drop;
  logic [10:0] d_count;
  logic [7:0] lut_addr, now;
  logic [26:0] lut_wdata;
  logic [3:0] q_valid;
  event_t q_evt;
  logic ts_valid; logic [2:0] ts_sel; logic [7:0] ts_temp;
  int checks = 0, failures = 0;

  main_sm #(.PREFILL(64)) dut (.clk, .rst, .rx_data, .rx_empty, .rx_re, .tx_we, .tx_data, .tx_full,
    .st_cmd_valid, .st_cmd_ready, .st_cmd_write, .st_cmd_addr, .st_cmd_count, .st_abort,
    .st_wvalid, .st_wready, .st_wdata, .st_rvalid, .st_rready, .st_rdata, .st_busy, .st_error(1'b0),
    .dist_clear(d_clear), .dist_run(d_run), .dist_valid(d_valid), .dist_word(d_word), .dist_full(d_full),
    .dist_count(d_count), .dist_released(d_rel), .lut_we, .lut_addr, .lut_wdata);
  event_distributor u_dist (.clk, .rst, .clear(d_clear), .run(d_run), .in_valid(d_valid), .in_word(d_word),
    .in_full(d_full), .q_count(d_count), .q_power(4'hF), .q_valid, .q_evt, .ts_valid, .ts_sel, .ts_temp,
    .now, .n_released(d_rel), .n_dropped(d_drop));
  storage_model store (.clk, .cmd_valid(st_cmd_valid), .cmd_ready(st_cmd_ready), .cmd_write(st_cmd_write),
    .cmd_addr(st_cmd_addr), .cmd_count(st_cmd_count), .abort_req(st_abort), .wvalid(st_wvalid),
    .wready(st_wready), .wdata(st_wdata), .rvalid(st_rvalid), .rready(st_rready), .rdata(st_rdata), .busy(st_busy));

  // receive FIFO model (first word fall through) and transmit collector
  logic [7:0] rxq [$];
  int rx_idx = 0;
  logic [7:0] txq [$];
  assign rx_data  = (rx_idx < rxq.size()) ? rxq[rx_idx] : 8'h00;
  assign rx_empty = (rx_idx >= rxq.size());
  always @(posedge clk) begin
    if (rx_re && !rx_empty) rx_idx <= rx_idx + 1;
    if (tx_we && !tx_full) txq.push_back(tx_data);
    tx_full <= ($urandom_range(0, 9) == 0);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic put(input logic [7:0] b); rxq.push_back(b); endtask
  task automatic put32(input logic [31:0] w); for (int i = 3; i >= 0; i--) put(w[8*i +: 8]); endtask
  task automatic get(input int n);
    int t;
    t = 0;
    while (txq.size() < n && t < 2000000) begin @(posedge clk); t++; end
  endtask

  // released-event monitor
  int rel_cyc [$]; event_t rel_evt [$];
  int cyc = 0, lut_writes = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && q_valid != 0) begin rel_cyc.push_back(cyc); rel_evt.push_back(q_evt); end
    if (!rst && lut_we) begin
      lut_writes++;
      checks++;
      if (lut_addr != 8'h10 || lut_wdata != 27'h5ABCDEF) begin failures++; $display("FAIL: LUT write"); end
    end
  end

  initial begin
    #50000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  event_t seq [512]; int abs_t [512];
  initial begin
    int t;
    logic [7:0] b;
    #45 rst = 0;
    // STATUS
    put(OP_STATUS); get(5);
    check(txq.size() == 5 && txq[0] == 8'h08 && {txq[1], txq[2], txq[3], txq[4]} == 32'd0, "idle status");
    txq.delete();
    // LUT_WRITE
    put(OP_LUT_WRITE); put(8'h10); put32(32'h05AB_CDEF); get(1);
    check(txq[0] == 8'h86 && lut_writes == 1, "LUT write acknowledged");
    txq.delete();
    // unknown opcode
    put(8'h77); get(1);
    check(txq[0] == 8'hFF, "unknown opcode");
    txq.delete();
    // build and upload a 512-event sequence (2 blocks)
    t = 3;
    for (int i = 0; i < 512; i++) begin
      t += (i % 64 < 8) ? 1 : $urandom_range(1, 30);
      seq[i] = '{kind: EVT_DETECTOR, t: 8'(t), det: 5'($urandom), pixel: 4'($urandom_range(0, 11)), amp: 12'($urandom)};
      abs_t[i] = t;
    end
    put(OP_WRITE_MEM); put32(32'd3); put(8'h00); put(8'h02);
    for (int i = 0; i < 512; i++) put32(seq[i]);
    get(1);
    check(txq[0] == 8'h81, "write acknowledged");
    txq.delete();
    b = 0;
    for (int i = 0; i < 2048; i++) if (store.peek(3 * 1024 + i) != seq[i / 4][8 * (3 - i % 4) +: 8]) b++;
    check(b == 0, "sequence stored");
    // READ_MEM one block
    put(OP_READ_MEM); put32(32'd3); put(8'h00); put(8'h01);
    get(1024);
    b = 0;
    for (int i = 0; i < 1024; i++) if (txq[i] != seq[i / 4][8 * (3 - i % 4) +: 8]) b++;
    check(txq.size() == 1024 && b == 0, "read back");
    #1000;
    txq.delete();
    // START
    put(OP_START); put32(32'd3); put32(32'd2);
    get(1);
    check(txq[0] == 8'h83, "start acknowledged");
    txq.delete();
    wait (d_run);
    check(d_count >= 64, "queue prefilled before the clock starts");
    wait (!d_run);
    #200;
    check(rel_evt.size() == 512, $sformatf("%0d events released", rel_evt.size()));
    b = 0;
    for (int i = 0; i < rel_evt.size() && i < 512; i++) begin
      if (rel_evt[i] != seq[i]) b++;
      if (i > 0 && rel_cyc[i] - rel_cyc[i-1] != abs_t[i] - abs_t[i-1]) b++;
    end
    check(b == 0, $sformatf("order and spacing of releases (%0d errors)", b));
    put(OP_STATUS); get(5);
    check(txq[0] == 8'h08 && {txq[1], txq[2], txq[3], txq[4]} == 32'd512, "status after run");
    txq.delete();
    // START then STOP
    rel_evt.delete(); rel_cyc.delete();
    put(OP_START); put32(32'd3); put32(32'd2);
    get(1);
    wait (rel_evt.size() >= 50);
    put(OP_STOP); get(2);
    check(txq[0] == 8'h83 && txq[1] == 8'h84, "start and stop acknowledged");
    #2000;
    check(!d_run && rel_evt.size() < 512, $sformatf("stopped after %0d events", rel_evt.size()));
    wait (!st_busy);
    #200;
    check(store.n_cmds == 4, "storage commands");
    txq.delete();
    put(OP_STATUS); get(5);
    check(txq[0][2:0] == 3'b000, "idle after stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
