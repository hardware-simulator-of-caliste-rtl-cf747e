// idpu_link_bfm: testbench model of the host side of one detector group:
// the ASIC serial link (STROBE, DIN, DOUT) and the ADC serial port
// (CS_N, SCLK, SDO). DIN changes while STROBE is low and is sampled by the
// ASIC on the rising edge; DOUT is sampled here on each rising edge.
// SHALF is the STROBE half period, AHALF the SCLK half period, in time units.
module idpu_link_bfm #(
  parameter int SHALF = 25,
  parameter int AHALF = 40
) (
  output logic strobe,
  output logic din,
  input  logic dout,
  output logic adc_cs_n,
  output logic adc_sclk,
  input  logic adc_sdo
);
  initial begin
    strobe = 1'b0; din = 1'b0; adc_cs_n = 1'b1; adc_sclk = 1'b0;
  end

  task automatic bit_cycle(input logic b, output logic s);
    din = b;
    #SHALF;
    strobe = 1'b1;
    s = dout;
    #SHALF;
    strobe = 1'b0;
  endtask

  task automatic send(input logic [255:0] bits, input int n);
    logic s;
    for (int i = n - 1; i >= 0; i--) bit_cycle(bits[i], s);
  endtask

  task automatic idle(input int n);
    logic s;
    repeat (n) bit_cycle(1'b0, s);
  endtask

  task automatic sc_write(input logic [2:0] a, input logic [3:0] r,
                          input logic [191:0] data, input int w);
    send({247'b0, 1'b1, a, 2'b00, r}, 10);
    send({64'b0, data}, w);
    idle(2);
  endtask

  task automatic sc_read(input logic [2:0] a, input logic [3:0] r, input int w,
                         output logic [191:0] data);
    logic s;
    send({247'b0, 1'b1, a, 2'b01, r}, 10);
    data = '0;
    for (int i = 0; i < w; i++) begin
      bit_cycle(1'b0, s);
      data = {data[190:0], s};
    end
    idle(2);
  endtask

  // Readout command; returns the 32-bit event register. The ASIC is left in
  // its readout phase with the first hit channel on its analogue output.
  task automatic readout_start(input logic [2:0] a, output logic [31:0] ev);
    logic s;
    send({247'b0, 1'b1, a, 2'b10}, 6);
    ev = '0;
    for (int i = 0; i < 32; i++) begin
      bit_cycle(1'b0, s);
      ev = {ev[30:0], s};
    end
  endtask

  task automatic readout_next();
    logic s;
    bit_cycle(1'b0, s);
  endtask

  task automatic readout_end();
    logic s;
    bit_cycle(1'b1, s);
    idle(2);
  endtask

  // One ADC conversion and 16-bit serial read; lead holds the 4 leading bits.
  task automatic adc_read(output logic [11:0] v, output logic [3:0] lead);
    logic [15:0] sh;
    #(4 * AHALF);
    adc_cs_n = 1'b0;
    #(2 * AHALF);
    sh = '0;
    for (int i = 0; i < 16; i++) begin
      adc_sclk = 1'b1;
      sh = {sh[14:0], adc_sdo};
      #AHALF;
      adc_sclk = 1'b0;
      #AHALF;
    end
    adc_cs_n = 1'b1;
    #(2 * AHALF);
    v = sh[11:0];
    lead = sh[15:12];
  endtask
endmodule
