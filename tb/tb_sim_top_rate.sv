// tb_sim_top_rate: event-rate workload on the whole simulator at its default
// parameters. 32 detectors at 20 000 events/s each is 640 000 events/s in all,
// one event every 1.56 us or 78 steps of 20 ns on average. A 16-block
// (16 KiB, 4096-event) sequence with random spacing of 40 to 114 steps
// (mean 77, slightly above the target rate) is uploaded and replayed; the detectors are taken in an order
// that gives each ASIC group a new event every 16 events, so each readout
// sees exactly one hit. Checked: every event is released exactly on its
// arrival step (release-to-release spacing equals the sequence spacing), the
// event queue never runs empty while the sequence is still being read, every
// hit reaches the IDPU model with its amplitude, and the achieved rate is at
// least 640 000 events/s. The sequence then ends with a burst of 768 ASIC
// temperature events on consecutive steps (50 million events/s, far above
// what the storage delivers), which the queue must absorb without a late
// release; after it every ASIC must hold the temperature of its last event.
module tb_sim_top_rate;
  import caliste_pkg::*;
  logic clk = 0, usb_clk = 0, q_clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  always #8.333 usb_clk = ~usb_clk;
  always #5 q_clk = ~q_clk;

  logic [7:0] u_d_in, u_d_out;
  logic u_oe_d, u_rxf_n, u_txe_n, u_rd_n, u_wr_n, u_oe_n;
  logic [1:0] sd_clk, h_cmd_o, h_cmd_oe, c_cmd_o, c_cmd_oe, h_dat_oe, c_dat_oe, cmd_line;
  logic [3:0] h_dat_o [2], c_dat_o [2], dat_line [2];
  logic [3:0] q_power = 4'b1111;
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
  localparam int NRATE  = 16 * 256;
  localparam int NBURST = 3 * 256;
  localparam int NWORDS = NRATE + NBURST;
  logic [11:0] last_temp [32] = '{default: 0};
  event_t seq [$];
  int     abs_t [$];
  hit_t   expect_q [$];

  initial begin
    int t;
    event_t e;
    t = 100;
    for (int i = 0; i < NRATE; i++) begin
      int d;
      d = (i * 2) % 32 + (i / 16) % 2;
      t += $urandom_range(40, 114);
      e = '{kind: EVT_DETECTOR, t: 8'(t), det: 5'(d), pixel: 4'($urandom_range(0, 12)),
            amp: 12'($urandom_range(1, 4095))};
      seq.push_back(e); abs_t.push_back(t);
      expect_q.push_back('{det: e.det, ch: 5'(e.pixel), amp: e.amp});
    end
    t += 50;
    for (int i = 0; i < NBURST; i++) begin
      t += 1;
      e = '0; e.kind = EVT_ASIC_T; e.t = 8'(t); e.det = 5'($urandom); e.amp = 12'($urandom);
      last_temp[e.det] = e.amp;
      seq.push_back(e); abs_t.push_back(t);
    end
  end

  // ---------------------------------------------------------- release monitor
  longint pop_cyc [$];
  longint cyc = 0;
  int     q_empty_cycles = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.u_dist.pop) pop_cyc.push_back(cyc);
    if (dut.d_run && dut.u_storage.busy && dut.d_count == 0) q_empty_cycles++;
  end

  initial begin
    #30000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int bad;
    real rate;
    #100 rst_n = 1;
    wait (storage_ready || storage_error);
    check(storage_ready && !storage_error, "storage initialised");
    put(OP_WRITE_MEM); put32(32'd100); put(8'h00); put(8'd19);
    for (int i = 0; i < NWORDS; i++) put32(seq[i]);
    get(1);
    check(chip.got.size() == 1 && chip.got[0] == 8'h81, "upload acknowledged");
    chip.got.delete();
    put(OP_START); put32(32'd100); put32(32'd19);
    get(1);
    check(chip.got[0] == 8'h83, "start acknowledged");
    wait (sim_running);
    wait (!sim_running);
    #30000;
    check(pop_cyc.size() == NWORDS, $sformatf("%0d events released", pop_cyc.size()));
    bad = 0;
    for (int i = 1; i < pop_cyc.size() && i < NWORDS; i++)
      if (pop_cyc[i] - pop_cyc[0] != longint'(abs_t[i] - abs_t[0])) bad++;
    check(bad == 0, $sformatf("%0d events released off their arrival step", bad));
    check(q_empty_cycles == 0, $sformatf("queue empty for %0d cycles during replay", q_empty_cycles));
    bad = 0;
    check(got.size() == NRATE, $sformatf("hits read %0d expected %0d", got.size(), NRATE));
    foreach (expect_q[i]) begin
      int f;
      f = -1;
      foreach (got[j]) if (got[j] == expect_q[i]) begin f = j; break; end
      if (f < 0) bad++; else got.delete(f);
    end
    check(bad == 0, $sformatf("%0d expected hits missing", bad));
    rate = real'(NRATE - 1) / (real'(pop_cyc[NRATE-1] - pop_cyc[0]) * 20.0e-9);
    check(rate >= 640000.0, $sformatf("rate %0.0f events/s", rate));
    bad = 0;
    for (int d = 0; d < 32; d++) begin
      logic [191:0] rd;
      case ((d / 2) % 4)
        0: case (d / 8) 0: g_q[0].g_g[0].host.sc_read(3'(d % 2), REG_TEMP, 12, rd); 1: g_q[1].g_g[0].host.sc_read(3'(d % 2), REG_TEMP, 12, rd);
                        2: g_q[2].g_g[0].host.sc_read(3'(d % 2), REG_TEMP, 12, rd); default: g_q[3].g_g[0].host.sc_read(3'(d % 2), REG_TEMP, 12, rd); endcase
        1: case (d / 8) 0: g_q[0].g_g[1].host.sc_read(3'(d % 2), REG_TEMP, 12, rd); 1: g_q[1].g_g[1].host.sc_read(3'(d % 2), REG_TEMP, 12, rd);
                        2: g_q[2].g_g[1].host.sc_read(3'(d % 2), REG_TEMP, 12, rd); default: g_q[3].g_g[1].host.sc_read(3'(d % 2), REG_TEMP, 12, rd); endcase
        2: case (d / 8) 0: g_q[0].g_g[2].host.sc_read(3'(d % 2), REG_TEMP, 12, rd); 1: g_q[1].g_g[2].host.sc_read(3'(d % 2), REG_TEMP, 12, rd);
                        2: g_q[2].g_g[2].host.sc_read(3'(d % 2), REG_TEMP, 12, rd); default: g_q[3].g_g[2].host.sc_read(3'(d % 2), REG_TEMP, 12, rd); endcase
        default: case (d / 8) 0: g_q[0].g_g[3].host.sc_read(3'(d % 2), REG_TEMP, 12, rd); 1: g_q[1].g_g[3].host.sc_read(3'(d % 2), REG_TEMP, 12, rd);
                        2: g_q[2].g_g[3].host.sc_read(3'(d % 2), REG_TEMP, 12, rd); default: g_q[3].g_g[3].host.sc_read(3'(d % 2), REG_TEMP, 12, rd); endcase
      endcase
      if (rd[11:0] != last_temp[d]) bad++;
    end
    check(bad == 0, $sformatf("%0d ASICs with a wrong temperature after the burst", bad));
    $display("released %0d events at %0.0f events/s (%0.2f MB/s), queue never empty: %0d",
             pop_cyc.size(), rate, rate * 4.0e-6, q_empty_cycles == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
