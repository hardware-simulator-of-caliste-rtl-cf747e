// tb_asic_group: self-checking test of a group of two ASIC models sharing
// one serial link and one ADC model. Events are injected into both models;
// each is read out in turn through the link and the ADC, as the host does.
// Checks the shared TRIG, that only the addressed model answers on DOUT,
// and that every amplitude reaches the ADC in channel order.
module tb_asic_group;
  import caliste_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic strobe, din, dout, trig, cs_n, sclk, sdo;
  logic test_pulse = 0;
  logic [1:0] hit = 0, temp_we = 0;
  logic [AMP_W-1:0] amp = 0;
  logic [CHAN_W-1:0] chan = 0;
  int checks = 0, failures = 0;

  asic_group dut (.clk, .rst, .strobe, .din, .dout, .trig, .adc_cs_n(cs_n), .adc_sclk(sclk),
    .adc_sdo(sdo), .test_pulse, .hit, .amp, .chan, .test_amp(12'd0), .temp_we, .temp_val(12'd0));
  idpu_link_bfm host (.strobe, .din, .dout, .adc_cs_n(cs_n), .adc_sclk(sclk), .adc_sdo(sdo));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic inject(input int m, input int c, input int a);
    @(posedge clk); hit[m] <= 1; chan <= CHAN_W'(c); amp <= AMP_W'(a);
    @(posedge clk); hit <= 0;
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [191:0] rd; logic [31:0] ev; logic [11:0] v; logic [3:0] lead;
  int exp_amp [2][32];
  initial begin
    #33 rst = 0; #50;
    host.sc_read(3'd0, REG_ID, 8, rd); check(rd[7:0] == 8'hC0, "model 0 answers at address 0");
    host.sc_read(3'd1, REG_ID, 8, rd); check(rd[7:0] == 8'hC1, "model 1 answers at address 1");
    host.sc_read(3'd4, REG_ID, 8, rd); check(rd[7:0] == 8'h00, "no answer at address 4");
    check(trig == 0, "no trig");
    for (int m = 0; m < 2; m++) for (int c = 0; c < 32; c++) exp_amp[m][c] = 0;
    for (int k = 0; k < 12; k++) begin
      int m, c, a;
      m = k % 2; c = $urandom_range(0, 12); a = $urandom_range(1, 4095);
      inject(m, c, a);
      if (a > exp_amp[m][c]) exp_amp[m][c] = a;
    end
    #20;
    check(trig == 1, "shared trig");
    for (int m = 0; m < 2; m++) begin
      logic [31:0] exp_ev;
      int n;
      exp_ev = 0;
      for (int c = 0; c < 32; c++) if (exp_amp[m][c] > 0) exp_ev[c] = 1;
      host.readout_start(3'(m), ev);
      check(ev == exp_ev, $sformatf("model %0d event register %h exp %h", m, ev, exp_ev));
      n = $countones(exp_ev);
      for (int c = 0; c < 32; c++) if (exp_ev[c]) begin
        host.adc_read(v, lead);
        check(v == 12'(exp_amp[m][c]) && lead == 0,
              $sformatf("model %0d ch %0d adc %0d exp %0d", m, c, v, exp_amp[m][c]));
        n--;
        if (n > 0) host.readout_next();
      end
      host.readout_end();
    end
    #100;
    check(trig == 0, "trig cleared after both readouts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
