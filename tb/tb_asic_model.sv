// tb_asic_model: self-checking test of one ASIC model.
// Covers slow-control write/read of ALIMON, TH and ID, address filtering,
// each of the five injection rules, the event register, TRIG, the readout
// sequence through the analogue-output multiplexer, the test pulse, the
// temperature register and the asynchronous reset. The link runs at the
// nominal 20 MHz STROBE with a 100 MHz model clock (periods 50 and 10).
module tb_asic_model;
  import caliste_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic strobe, din, dout, trig, aout_valid, readout_phase;
  logic [AMP_W-1:0] aout;
  logic hit = 0, test_pulse = 0, temp_we = 0;
  logic [AMP_W-1:0] amp = 0, test_amp = 0;
  logic [CHAN_W-1:0] chan = 0;
  logic [TEMP_W-1:0] temp_val = 0;
  logic cs_n, sclk;

  asic_model #(.CHIP_ID(8'hC5)) dut (
    .clk, .rst, .numasic(3'd2), .strobe, .din, .dout, .trig,
    .aout, .aout_valid, .readout_phase,
    .hit, .amp, .chan, .test_pulse, .test_amp, .temp_we, .temp_val
  );
  idpu_link_bfm #(.SHALF(25)) host (.strobe, .din, .dout, .adc_cs_n(cs_n), .adc_sclk(sclk), .adc_sdo(1'b0));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic inject(input int c, input int a);
    @(posedge clk); hit <= 1; chan <= CHAN_W'(c); amp <= AMP_W'(a);
    @(posedge clk); hit <= 0;
    @(posedge clk);
  endtask

  logic [191:0] rd, thv;
  logic [31:0]  ev;
  int           t0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #33 rst = 0;
    #100;
    host.sc_read(3'd2, REG_ALIMON, 32, rd); check(rd[31:0] == 32'hFFFF_FFFF, "ALIMON default");
    host.sc_read(3'd2, REG_ID, 8, rd);     check(rd[7:0] == 8'hC5, "ID");
    host.sc_read(3'd2, REG_TH, 192, rd);   check(rd == '0, "TH default");
    // TH: channel 3 disabled, channel 5 threshold code 10 (640 LSB)
    thv = '0; thv[3*6 +: 6] = 6'd63; thv[5*6 +: 6] = 6'd10;
    host.sc_write(3'd2, REG_TH, thv, 192);
    host.sc_write(3'd2, REG_ALIMON, 192'(32'hFFFF_FF7F), 32);   // channel 7 off
    host.sc_write(3'd5, REG_ALIMON, 192'(32'h0), 32);           // other address
    host.sc_read(3'd2, REG_TH, 192, rd);     check(rd == thv, "TH write/read");
    host.sc_read(3'd2, REG_ALIMON, 32, rd);  check(rd[31:0] == 32'hFFFF_FF7F, "ALIMON write, address filter");
    host.sc_write(3'd2, REG_GAIN, 192'(8'h5A), 8);
    host.sc_read(3'd2, REG_GAIN, 8, rd);     check(rd[7:0] == 8'h5A, "GAIN register");
    check(trig == 0, "no trig before events");
    // injection rules
    @(posedge clk); hit <= 1; chan <= 5'd1; amp <= 12'd100;
    @(posedge clk); hit <= 0; t0 = $time;
    @(posedge clk); check(trig == 1, "trig one cycle after accepted hit");
    inject(3, 4000);   // disabled discriminator
    inject(5, 600);    // below threshold 640
    inject(5, 700);    // accepted
    inject(7, 500);    // channel not powered
    inject(1, 200);    // replaces 100
    inject(1, 50);     // below stored amplitude 200: ignored
    inject(9, 0);      // zero does not exceed threshold 0
    host.sc_read(3'd2, REG_EVENT, 32, rd);
    check(rd[31:0] == 32'h0000_0022, $sformatf("event register %h", rd[31:0]));
    // readout
    host.readout_start(3'd2, ev);
    check(ev == 32'h0000_0022, "readout event register");
    check(trig == 0, "trig drops in readout phase");
    inject(12, 1000);  // not in detection phase: ignored
    #50;
    check(aout_valid && aout == 12'd200, $sformatf("first channel amp %0d", aout));
    host.readout_next(); #50;
    check(aout_valid && aout == 12'd700, $sformatf("second channel amp %0d", aout));
    host.readout_next(); #50;
    check(!aout_valid, "no more channels");
    host.readout_end(); #50;
    check(!readout_phase && trig == 0, "back to detection");
    host.sc_read(3'd2, REG_EVENT, 32, rd); check(rd[31:0] == 0, "event register cleared");
    // after readout, amplitude registers are cleared: a small amp is accepted
    inject(1, 20);
    host.sc_read(3'd2, REG_EVENT, 32, rd); check(rd[31:0] == 32'h2, "amplitude cleared by readout");
    host.readout_start(3'd2, ev); #50;
    check(aout == 12'd20, "small amplitude stored");
    host.readout_end();
    // test pulse on channels 2 and 9
    host.sc_write(3'd2, REG_TESTEN, 192'(32'h0000_0204), 32);
    test_amp = 12'd1234;
    test_pulse = 1; #100; test_pulse = 0; #100;
    host.readout_start(3'd2, ev); #50;
    check(ev == 32'h0000_0204, $sformatf("test pulse events %h", ev));
    check(aout == 12'd1234, "test pulse amplitude");
    host.readout_end();
    // temperature
    @(posedge clk); temp_we <= 1; temp_val <= 12'hABC; @(posedge clk); temp_we <= 0;
    host.sc_read(3'd2, REG_TEMP, 12, rd); check(rd[11:0] == 12'hABC, "temperature register");
    // reset
    inject(4, 300);
    rst = 1; #20; rst = 0; #50;
    check(trig == 0, "reset clears events");
    host.sc_read(3'd2, REG_TH, 192, rd); check(rd == '0, "reset restores TH");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
