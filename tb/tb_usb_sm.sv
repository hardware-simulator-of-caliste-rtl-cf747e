// tb_usb_sm: self-checking test of the USB state machine between a chip
// model and FIFO models with random back-pressure. 2000 bytes in each
// direction must pass in order with none lost, read strobes must only occur
// with the bus turned around (oe_n low), and the data bus must be driven only
// while writing.
module tb_usb_sm;
  logic clk = 0, rst = 1;
  always #8.333 clk = ~clk;
  logic [7:0] d_in, d_out, rx_data, tx_data;
  logic d_oe, rxf_n, txe_n, rd_n, wr_n, oe_n, rx_we, tx_re;
  logic rx_full = 0, tx_empty = 1;
  logic [7:0] rx_got [$], tx_q [$];
  int checks = 0, failures = 0, bus_clash = 0;
  localparam int N = 2000;

  usb_sm dut (.clk, .rst, .data_i(d_in), .data_o(d_out), .data_oe(d_oe), .rxf_n, .txe_n, .rd_n, .wr_n, .oe_n,
    .rx_we, .rx_data, .rx_full, .tx_re, .tx_data, .tx_empty);
  usb_chip_model chip (.clk, .data_to_fpga(d_in), .data_from_fpga(d_out), .rxf_dummy(1'b0),
    .rxf_n, .txe_n, .rd_n, .wr_n, .oe_n);

  int tx_idx = 0, tx_n = 0, rx_overrun = 0;
  assign tx_data = (tx_idx < tx_n) ? tx_q[tx_idx] : 8'h00;
  always @(posedge clk) begin
    if (rx_we && rx_full) rx_overrun++;        // a real FIFO would lose this byte
    else if (rx_we) rx_got.push_back(rx_data);
    if (tx_re) tx_idx <= tx_idx + 1;
    if (d_oe && !oe_n) bus_clash++;
    rx_full  <= ($urandom_range(0, 99) < 15);
  end
  always @(negedge clk) tx_empty = (tx_idx >= tx_n);

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] sent_rx [$], sent_tx [$];
  initial begin
    #50 rst = 0;
    for (int i = 0; i < N; i++) begin
      logic [7:0] b;
      b = 8'($urandom); chip.host_send(b); sent_rx.push_back(b);
      b = 8'($urandom); tx_q.push_back(b); sent_tx.push_back(b);
    end
    tx_n = N;
    wait ((rx_got.size() + rx_overrun >= N) && chip.got.size() == N);
    #100;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (rx_got[i] != sent_rx[i] || chip.got[i] != sent_tx[i]) begin
        failures++; if (failures < 5) $display("FAIL: byte %0d rx %h/%h tx %h/%h", i, rx_got[i], sent_rx[i], chip.got[i], sent_tx[i]);
      end
    end
    checks++;
    if (chip.n_oe_viol != 0 || bus_clash != 0) begin failures++; $display("FAIL: bus protocol"); end
    checks++;
    if (rx_overrun != 0) begin failures++; $display("FAIL: %0d writes to a full receive FIFO", rx_overrun); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
