// tb_detector_quarter: self-checking test of one detector quarter. Event
// words are sent on a 50 MHz controller clock into a quarter running at
// 100 MHz. Checks routing of detector events to the right group and ASIC
// model (by reading them out through each group's link and ADC), the
// release-to-TRIG latency, ASIC temperature events, test-pulse amplitude
// events, SEU latching and the power-off reset.
module tb_detector_quarter;
  import caliste_pkg::*;
  logic clk = 0, eclk = 0, rst = 1, erst = 1, power = 1;
  always #5 clk = ~clk;
  always #10 eclk = ~eclk;
  logic evt_valid = 0;
  event_t evt = '0;
  logic [3:0] strobe, din, dout, trig, cs_n, sclk, sdo;
  logic test_pulse = 0, seu;
  int checks = 0, failures = 0;

  detector_quarter dut (.clk, .rst, .power, .evt_clk(eclk), .evt_rst(erst), .evt_valid, .evt,
    .strobe, .din, .dout, .trig, .adc_cs_n(cs_n), .adc_sclk(sclk), .adc_sdo(sdo), .test_pulse, .seu);
  for (genvar g = 0; g < 4; g++) begin : g_host
    idpu_link_bfm host (.strobe(strobe[g]), .din(din[g]), .dout(dout[g]), .adc_cs_n(cs_n[g]),
      .adc_sclk(sclk[g]), .adc_sdo(sdo[g]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic send(input evt_kind_e k, input int det, input int pix, input int a);
    @(posedge eclk);
    evt_valid <= 1; evt <= '{kind: k, t: 8'd0, det: 5'(det), pixel: 4'(pix), amp: 12'(a)};
    @(posedge eclk);
    evt_valid <= 0;
  endtask

  // readout of one model, returns event register and amplitudes of hit channels
  logic [31:0] ev; logic [11:0] amps [32]; logic [11:0] v; logic [3:0] lead;
  task automatic read_model(input int g, input int m);
    int n;
    case (g)
      0: g_host[0].host.readout_start(3'(m), ev);
      1: g_host[1].host.readout_start(3'(m), ev);
      2: g_host[2].host.readout_start(3'(m), ev);
      default: g_host[3].host.readout_start(3'(m), ev);
    endcase
    n = $countones(ev);
    for (int c = 0; c < 32; c++) amps[c] = 0;
    for (int c = 0; c < 32; c++) if (ev[c]) begin
      case (g)
        0: g_host[0].host.adc_read(v, lead);
        1: g_host[1].host.adc_read(v, lead);
        2: g_host[2].host.adc_read(v, lead);
        default: g_host[3].host.adc_read(v, lead);
      endcase
      amps[c] = v; n--;
      if (n > 0) case (g)
        0: g_host[0].host.readout_next();
        1: g_host[1].host.readout_next();
        2: g_host[2].host.readout_next();
        default: g_host[3].host.readout_next();
      endcase
    end
    case (g)
      0: g_host[0].host.readout_end();
      1: g_host[1].host.readout_end();
      2: g_host[2].host.readout_end();
      default: g_host[3].host.readout_end();
    endcase
  endtask

  initial begin
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [191:0] rd; time t0;
  initial begin
    #55 rst = 0; erst = 0; #200;
    check(trig == 0 && seu == 0, "idle after reset");
    // detector 5 = group 2, model 1, pixel 3; measure latency to trig
    @(posedge eclk); t0 = $time;
    evt_valid <= 1; evt <= '{kind: EVT_DETECTOR, t: 8'd0, det: 5'd5, pixel: 4'd3, amp: 12'd1500};
    @(posedge eclk); evt_valid <= 0;
    wait (trig[2]);
    check($time - t0 <= 120, $sformatf("release to trig latency %0t", $time - t0));
    check(trig == 4'b0100, "only group 2 triggered");
    // back-to-back events one step apart to group 0 model 0 and group 3 model 0
    @(posedge eclk);
    evt_valid <= 1; evt <= '{kind: EVT_DETECTOR, t: 8'd1, det: 5'd0, pixel: 4'd11, amp: 12'd77};
    @(posedge eclk);
    evt <= '{kind: EVT_DETECTOR, t: 8'd2, det: 5'd6, pixel: 4'd0, amp: 12'd4095};
    @(posedge eclk);
    evt <= '{kind: EVT_DETECTOR, t: 8'd3, det: 5'd0, pixel: 4'd2, amp: 12'd900};
    @(posedge eclk); evt_valid <= 0;
    #200;
    check(trig == 4'b1101, $sformatf("trig pattern %b", trig));
    read_model(2, 1);
    check(ev == 32'h8 && amps[3] == 1500, "group 2 model 1 readout");
    read_model(0, 0);
    check(ev == 32'h804 && amps[11] == 77 && amps[2] == 900, $sformatf("group 0 model 0 readout %h", ev));
    read_model(3, 0);
    check(ev == 32'h1 && amps[0] == 4095, "group 3 model 0 readout");
    check(trig == 0, "all read");
    // ASIC temperature event to detector 7 (group 3, model 1)
    send(EVT_ASIC_T, 7, 0, 12'h3C4);
    #200;
    g_host[3].host.sc_read(3'd1, REG_TEMP, 12, rd);
    check(rd[11:0] == 12'h3C4, "ASIC temperature event");
    // test pulse amplitude, channel 4 of group 1 model 0 enabled for test
    g_host[1].host.sc_write(3'd0, REG_TESTEN, 192'(32'h10), 32);
    send(EVT_TEST, 0, 0, 2222);
    #200;
    test_pulse = 1; #100; test_pulse = 0; #100;
    check(trig == 4'b0010, "test pulse triggers group 1");
    read_model(1, 0);
    check(ev == 32'h10 && amps[4] == 2222, "test pulse amplitude");
    // SEU
    send(EVT_SEU, 2, 0, 0);
    #200;
    check(seu == 1, "SEU raised");
    // power off resets the quarter
    send(EVT_DETECTOR, 1, 1, 100);
    #200;
    check(trig == 4'b0001, "trig before power off");
    power = 0; #200;
    check(trig == 0 && seu == 0, "power off clears models");
    send(EVT_DETECTOR, 1, 1, 100);
    #200;
    check(trig == 0, "unpowered quarter ignores events");
    power = 1; #200;
    send(EVT_DETECTOR, 1, 1, 100);
    #200;
    check(trig == 4'b0001, "powered again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
