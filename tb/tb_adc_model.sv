// tb_adc_model: self-checking test of the ADC model. Random 12-bit values
// are presented on the parallel input, converted by a CS_N falling edge and
// read back over the serial port (4 leading zeros, then MSB first). Also
// checks that an invalid input converts to zero, that the value is held
// while the input changes after the conversion, and the sample pulse count.
module tb_adc_model;
  import caliste_pkg::*;
  logic clk = 0, rst = 0;
  always #5 clk = ~clk;
  logic [AMP_W-1:0] ain = 0;
  logic ain_valid = 0, cs_n, sclk, sdo, sample, strobe, din;
  int checks = 0, failures = 0, samples = 0;

  adc_model dut (.clk, .rst, .ain, .ain_valid, .cs_n, .sclk, .sdo, .sample);
  idpu_link_bfm #(.AHALF(40)) host (.strobe, .din, .dout(1'b0), .adc_cs_n(cs_n), .adc_sclk(sclk), .adc_sdo(sdo));

  always @(posedge clk) if (sample) samples++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [11:0] v, exp_v; logic [3:0] lead;
  initial begin
    #1 rst = 1;   // rising edge for the asynchronous reset
    #32 rst = 0; #50;
    for (int i = 0; i < 20; i++) begin
      exp_v = 12'($urandom);
      if (i == 0) exp_v = 12'hFFF;
      if (i == 1) exp_v = 12'h801;
      ain = exp_v; ain_valid = 1;
      fork
        host.adc_read(v, lead);
        begin #400; ain = ~exp_v; end   // input changes after the conversion
      join
      check(v == exp_v && lead == 4'h0, $sformatf("value %h expected %h lead %h", v, exp_v, lead));
    end
    ain_valid = 0; ain = 12'h555;
    host.adc_read(v, lead);
    check(v == 12'h000, "invalid input converts to zero");
    check(sdo == 0, "sdo low while deselected");
    check(samples == 21, $sformatf("sample pulses %0d", samples));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
