// tb_sim_top: end-to-end test of the whole detector simulator at its default
// parameters. A workstation model (USB chip model) loads two temperature
// table entries, uploads an 8-block (8 KiB, 2048-event) detector event
// sequence to two SD card models and starts the replay. Sixteen host link
// models play the IDPU: on each TRIG they wait 1 us, read both ASIC models of
// the group through the serial link and the ADC, and log every (detector,
// pixel, amplitude). The log must equal the sequence's expected hits: the
// largest amplitude per pixel of each burst, nothing for the unpowered
// quarter 3. Also checked: auxiliary temperature events reach the
// potentiometer models of sensors 0 and 5, an ASIC temperature event, a test
// pulse event used by a host test-charge injection, an SEU event, and the
// final STATUS count, and a second replay stopped half-way by STOP. Every mechanism (multi-event burst, lower-amplitude
// rejection, dropped event, dummy gap bridging, queue prefill, SD clock stop
// under back-pressure, test pulse, SEU, temperature updates) is counted and
// must occur at least once.
module tb_sim_top;
  import caliste_pkg::*;
  logic clk = 0, usb_clk = 0, q_clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  always #8.333 usb_clk = ~usb_clk;
  always #5 q_clk = ~q_clk;

  logic [7:0] u_d_in, u_d_out;
  logic u_oe_d, u_rxf_n, u_txe_n, u_rd_n, u_wr_n, u_oe_n;
  logic [1:0] sd_clk, h_cmd_o, h_cmd_oe, c_cmd_o, c_cmd_oe, h_dat_oe, c_dat_oe, cmd_line;
  logic [3:0] h_dat_o [2], c_dat_o [2], dat_line [2];
  logic [3:0] q_power = 4'b0111;
  logic [3:0][3:0] q_strobe, q_din, q_dout, q_trig, q_cs_n, q_sclk, q_sdo;
  logic [3:0] q_test_pulse = 0, q_seu;
  logic [7:0] ts_scl, ts_sda_oe, ts_sda_i;
  logic storage_ready, storage_error, sim_running;
  int checks = 0, failures = 0;

  sim_top dut (
    .clk, .usb_clk, .q_clk, .rst_n,
    .usb_data_i(u_d_in), .usb_data_o(u_d_out), .usb_data_oe(u_oe_d), .usb_rxf_n(u_rxf_n), .usb_txe_n(u_txe_n),
    .usb_rd_n(u_rd_n), .usb_wr_n(u_wr_n), .usb_oe_n(u_oe_n),
    .sd_clk, .sd_cmd_o(h_cmd_o), .sd_cmd_oe(h_cmd_oe), .sd_cmd_i(cmd_line),
    .sd_dat_o(h_dat_o), .sd_dat_oe(h_dat_oe), .sd_dat_i(dat_line),
    .q_power, .q_strobe, .q_din, .q_dout, .q_trig, .q_adc_cs_n(q_cs_n), .q_adc_sclk(q_sclk), .q_adc_sdo(q_sdo),
    .q_test_pulse, .q_seu, .ts_scl, .ts_sda_oe, .ts_sda_i,
    .storage_ready, .storage_error, .sim_running
  );

  usb_chip_model #(.THROTTLE(10)) chip (.clk(usb_clk), .data_to_fpga(u_d_in), .data_from_fpga(u_d_out),
    .rxf_dummy(1'b0), .rxf_n(u_rxf_n), .txe_n(u_txe_n), .rd_n(u_rd_n), .wr_n(u_wr_n), .oe_n(u_oe_n));

  for (genvar i = 0; i < 2; i++) begin : g_card
    assign cmd_line[i] = h_cmd_oe[i] ? h_cmd_o[i] : (c_cmd_oe[i] ? c_cmd_o[i] : 1'b1);
    assign dat_line[i] = h_dat_oe[i] ? h_dat_o[i] : (c_dat_oe[i] ? c_dat_o[i] : 4'hF);
    sd_card_model #(.SEED(8'(i))) card (.sd_clk(sd_clk[i]), .cmd_line(cmd_line[i]), .cmd_out(c_cmd_o[i]),
      .cmd_oe(c_cmd_oe[i]), .dat_line(dat_line[i]), .dat_out(c_dat_o[i]), .dat_oe(c_dat_oe[i]));
  end

  // temperature sensors 0 and 5 have potentiometer models; the others idle
  logic [2:0] p_oe [8];
  logic [7:0] wiper [8][3];
  logic       shdn [8][3];
  int         nw [8][3];
  for (genvar s = 0; s < 8; s++) begin : g_ts
    if (s == 0 || s == 5) begin : g_pots
      for (genvar k = 0; k < 3; k++) begin : g_pot
        logic [7:0] w; logic sh; int n;
        i2c_pot_model #(.ADDR(7'h2C + 7'(k))) pot (.scl(ts_scl[s]), .sda(ts_sda_i[s]), .sda_oe(p_oe[s][k]),
          .wiper(w), .shdn(sh), .n_writes(n));
        assign wiper[s][k] = w; assign shdn[s][k] = sh; assign nw[s][k] = n;
      end
      assign ts_sda_i[s] = !(ts_sda_oe[s] || (|p_oe[s]));
    end else begin : g_none
      assign ts_sda_i[s] = !ts_sda_oe[s];
      assign p_oe[s] = '0;
      for (genvar k = 0; k < 3; k++) begin : g_z
        assign wiper[s][k] = 0; assign shdn[s][k] = 0; assign nw[s][k] = 0;
      end
    end
  end

  // ---------------------------------------------------------- IDPU model
  typedef struct packed { logic [4:0] det; logic [4:0] ch; logic [11:0] amp; } hit_t;
  hit_t got [$];
  int   n_multi = 0;
  for (genvar q = 0; q < 4; q++) begin : g_q
    for (genvar g = 0; g < 4; g++) begin : g_g
      idpu_link_bfm host (.strobe(q_strobe[q][g]), .din(q_din[q][g]), .dout(q_dout[q][g]),
        .adc_cs_n(q_cs_n[q][g]), .adc_sclk(q_sclk[q][g]), .adc_sdo(q_sdo[q][g]));
      initial begin
        logic [31:0] ev; logic [11:0] v; logic [3:0] lead; int n;
        forever begin
          wait (q_trig[q][g] === 1'b1);
          #1000;
          for (int m = 0; m < 2; m++) begin
            host.readout_start(3'(m), ev);
            n = $countones(ev);
            if (n > 1) n_multi++;
            for (int c = 0; c < 32; c++) if (ev[c]) begin
              host.adc_read(v, lead);
              got.push_back('{det: 5'(q * 8 + g * 2 + m), ch: 5'(c), amp: v});
              n--;
              if (n > 0) host.readout_next();
            end
            host.readout_end();
          end
        end
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic put(input logic [7:0] b); chip.host_send(b); endtask
  task automatic put32(input logic [31:0] w); for (int i = 3; i >= 0; i--) put(w[8*i +: 8]); endtask
  task automatic get(input int n);
    int t;
    t = 0;
    while (chip.got.size() < n && t < 1000000) begin @(posedge clk); t++; end
  endtask

  // ---------------------------------------------------------- sequence
  localparam int NWORDS = 8 * 256;
  event_t seq [$];
  hit_t   expect_q [$];
  int     n_bursts = 0, n_rejected = 0, n_dropped_exp = 0, n_dummy = 0;
  int     t_now = 0;

  function automatic void add(input event_t e);
    seq.push_back(e);
  endfunction
  function automatic void dummy_to(input int t_end);
    // dummies every 32 steps (also bridges gaps longer than the 8-bit time field)
    while (t_now + 32 < t_end) begin
      event_t e;
      t_now += 32;
      e = '0; e.kind = EVT_DUMMY; e.t = 8'(t_now);
      add(e); n_dummy++;
    end
  endfunction

  initial begin
    event_t e;
    int used [32];
    for (int r = 0; r < 8; r++) begin
      int base;
      base = 200 + r * 1250;
      dummy_to(base);
      for (int i = 0; i < 32; i++) used[i] = 0;
      for (int k = 0; k < 6; k++) begin
        int d, npix, pix [3], amp [3], mx [16];
        do d = $urandom_range(0, 31); while (used[d] || (k == 0 && d / 8 != 3 && r == 0));
        used[d] = 1;
        npix = (k < 2) ? 3 : 1;
        if (npix > 1) n_bursts++;
        for (int p = 0; p < 16; p++) mx[p] = 0;
        for (int j = 0; j < npix; j++) begin
          pix[j] = (j == 2 && k == 0) ? pix[0] : $urandom_range(0, 12);
          if (j == 1 && pix[1] == pix[0]) pix[1] = (pix[0] + 1) % 13;
          amp[j] = (j == 2 && k == 0) ? 1 + amp[0] / 2 : $urandom_range(1, 4095);   // lower: rejected
          t_now += 1;
          e = '{kind: EVT_DETECTOR, t: 8'(t_now), det: 5'(d), pixel: 4'(pix[j]), amp: 12'(amp[j])};
          add(e);
          if (d / 8 == 3) n_dropped_exp++;
          else if (amp[j] > mx[pix[j]]) mx[pix[j]] = amp[j];
          else n_rejected++;
        end
        if (d / 8 != 3)
          for (int p = 0; p < 16; p++) if (mx[p] > 0) expect_q.push_back('{det: 5'(d), ch: 5'(p), amp: 12'(mx[p])});
        t_now += 20;
      end
      if (r == 1) begin t_now += 2; e = '0; e.kind = EVT_AUX_T; e.t = 8'(t_now); e.det = 5'd0; e.amp = 12'd25; add(e); end
      if (r == 2) begin t_now += 2; e = '0; e.kind = EVT_AUX_T; e.t = 8'(t_now); e.det = 5'd5; e.amp = 12'd30; add(e); end
      if (r == 3) begin t_now += 2; e = '0; e.kind = EVT_ASIC_T; e.t = 8'(t_now); e.det = 5'd3; e.amp = 12'h2A5; add(e); end
      if (r == 4) begin t_now += 2; e = '0; e.kind = EVT_TEST; e.t = 8'(t_now); e.amp = 12'd3000; add(e); n_dropped_exp++; end  // also sent to the unpowered quarter
      if (r == 5) begin t_now += 2; e = '0; e.kind = EVT_SEU; e.t = 8'(t_now); e.det = 5'd9; add(e); end
    end
    while (seq.size() < NWORDS) begin
      t_now += 32; e = '0; e.kind = EVT_DUMMY; e.t = 8'(t_now); add(e); n_dummy++;
    end
  end

  // ---------------------------------------------------------- mechanism probes
  int n_sd_stall = 0, prefill_seen = 0;
  always @(posedge clk) begin
    if (storage_ready && !dut.u_storage.g_card[0].u_host.clk_run) n_sd_stall++;
    if (dut.u_main.ss == 2'd2 && dut.u_dist.run == 0 && dut.d_count >= 11'd512) prefill_seen = 1;
  end

  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [191:0] rd;
    int bad;
    #100 rst_n = 1;
    wait (storage_ready || storage_error);
    check(storage_ready && !storage_error, "storage initialised");
    // temperature table entries for 25 and 30 degrees
    put(OP_LUT_WRITE); put(8'd25); put32({5'b0, 3'b001, 8'h12, 8'h34, 8'h56});
    put(OP_LUT_WRITE); put(8'd30); put32({5'b0, 3'b100, 8'hA1, 8'hB2, 8'hC3});
    get(2);
    check(chip.got.size() == 2 && chip.got[0] == 8'h86 && chip.got[1] == 8'h86, "LUT writes acknowledged");
    chip.got.delete();
    // upload
    put(OP_WRITE_MEM); put32(32'd40); put(8'h00); put(8'h08);
    for (int i = 0; i < NWORDS; i++) put32(seq[i]);
    get(1);
    check(chip.got.size() == 1 && chip.got[0] == 8'h81, "upload acknowledged");
    chip.got.delete();
    // replay
    put(OP_START); put32(32'd40); put32(32'd8);
    get(1);
    check(chip.got[0] == 8'h83, "start acknowledged");
    chip.got.delete();
    wait (sim_running);
    wait (!sim_running);
    #30000;
    // hits seen by the IDPU model
    bad = 0;
    check(got.size() == expect_q.size(), $sformatf("hits read %0d expected %0d", got.size(), expect_q.size()));
    foreach (expect_q[i]) begin
      int f;
      f = -1;
      foreach (got[j]) if (got[j] == expect_q[i]) f = j;
      if (f < 0) begin bad++; if (bad < 5) $display("missing det %0d ch %0d amp %0d", expect_q[i].det, expect_q[i].ch, expect_q[i].amp); end
      else got.delete(f);
    end
    check(bad == 0, $sformatf("%0d expected hits missing", bad));
    // housekeeping
    check(wiper[0][0] == 8'h12 && wiper[0][1] == 8'h34 && wiper[0][2] == 8'h56 &&
          !shdn[0][0] && !shdn[0][1] && shdn[0][2], "sensor 0 set for 25 C");
    check(wiper[5][0] == 8'hA1 && wiper[5][1] == 8'hB2 && wiper[5][2] == 8'hC3 &&
          shdn[5][0] && !shdn[5][1] && !shdn[5][2], "sensor 5 set for 30 C");
    g_q[0].g_g[1].host.sc_read(3'd1, REG_TEMP, 12, rd);
    check(rd[11:0] == 12'h2A5, "ASIC temperature of detector 3");
    check(q_seu == 4'b0010, "SEU on quarter 1");
    // host test-charge injection on detector 0, channel 4
    got.delete();
    g_q[0].g_g[0].host.sc_write(3'd0, REG_TESTEN, 192'(32'h10), 32);
    q_test_pulse[0] = 1; #200; q_test_pulse[0] = 0;
    #20000;
    check(got.size() == 1 && got[0] == '{det: 5'd0, ch: 5'd4, amp: 12'd3000}, "test pulse amplitude read out");
    // status
    chip.got.delete();
    put(OP_STATUS); get(5);
    check({chip.got[1], chip.got[2], chip.got[3], chip.got[4]} == 32'(NWORDS), "released count in status");
    // mechanisms
    check(n_bursts > 0 && n_multi > 0, $sformatf("multi-event bursts %0d read as %0d multi-hit readouts", n_bursts, n_multi));
    check(n_rejected > 0, "lower-amplitude events rejected");
    check(dut.u_dist.n_dropped == 32'(n_dropped_exp) && n_dropped_exp > 0,
          $sformatf("dropped %0d expected %0d", dut.u_dist.n_dropped, n_dropped_exp));
    check(n_dummy > 0, "dummy events");
    check(prefill_seen == 1, "queue prefill");
    check(n_sd_stall > 0, $sformatf("SD clock stopped for %0d cycles", n_sd_stall));
    check(nw[0][0] > 0 && nw[5][0] > 0, "temperature sensor updates");
    // stop a second replay half-way
    chip.got.delete();
    put(OP_START); put32(32'd40); put32(32'd8);
    get(1);
    wait (sim_running);
    #50000;
    chip.got.delete();
    put(OP_STOP); get(1);
    check(chip.got.size() == 1 && chip.got[0] == 8'h84, "stop acknowledged");
    #2000;
    check(!sim_running && dut.d_count == 0, "replay stopped and queue cleared");
    wait (!dut.st_busy);
    chip.got.delete();
    put(OP_STATUS); get(5);
    check(chip.got[0][2:0] == 3'b000 && {chip.got[1], chip.got[2], chip.got[3], chip.got[4]} < 32'(NWORDS),
          $sformatf("idle after stop, %0d events released", {chip.got[1], chip.got[2], chip.got[3], chip.got[4]}));
    $display("mechanisms: bursts=%0d multi_readouts=%0d rejected=%0d dropped=%0d dummies=%0d sd_stall=%0d",
             n_bursts, n_multi, n_rejected, n_dropped_exp, n_dummy, n_sd_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
