// asic_group: one detector group of the simulator, two ASIC models on a
// shared serial link with one common ADC model, as two Caliste-SO units are
// wired in parallel on the real detector module.
//
// The two models share STROBE and DIN; their DOUT and TRIG are wire-ORed (a
// model only drives dout when addressed, see asic_model). The models' address
// pins are fixed at 0 and 1 (the BASE_ADDR parameter moves the pair). The
// injection bus (amp, chan) is shared and each model has its own hit pulse,
// so one event reaches one channel of one model at a time. During readout
// the model in its readout phase drives the ADC model's parallel input.
// Wiring follows the simulator's group diagram; the OR of the shared outputs
// and the address choice are this design's own.
module asic_group
  import caliste_pkg::*;
#(
  parameter logic [2:0] BASE_ADDR = 3'd0
) (
  input  logic              clk,
  input  logic              rst,
  // host side
  input  logic              strobe,
  input  logic              din,
  output logic              dout,
  output logic              trig,
  input  logic              adc_cs_n,
  input  logic              adc_sclk,
  output logic              adc_sdo,
  input  logic              test_pulse,
  // simulator side
  input  logic [1:0]        hit,
  input  logic [AMP_W-1:0]  amp,
  input  logic [CHAN_W-1:0] chan,
  input  logic [AMP_W-1:0]  test_amp,
  input  logic [1:0]        temp_we,
  input  logic [TEMP_W-1:0] temp_val
);
  logic [1:0]       d, t, av, rp;
  logic [AMP_W-1:0] ao [2];
  logic [AMP_W-1:0] ain;
  logic             ain_valid;

  for (genvar i = 0; i < 2; i++) begin : g_asic
    asic_model #(.CHIP_ID(8'hC0 + 8'(i))) u_asic (
      .clk, .rst,
      .numasic(BASE_ADDR + 3'(i)),
      .strobe, .din, .dout(d[i]), .trig(t[i]),
      .aout(ao[i]), .aout_valid(av[i]), .readout_phase(rp[i]),
      .hit(hit[i]), .amp, .chan,
      .test_pulse, .test_amp,
      .temp_we(temp_we[i]), .temp_val
    );
  end

  assign dout      = |d;
  assign trig      = |t;
  assign ain       = av[1] ? ao[1] : ao[0];
  assign ain_valid = |av;

  adc_model u_adc (
    .clk, .rst, .ain, .ain_valid,
    .cs_n(adc_cs_n), .sclk(adc_sclk), .sdo(adc_sdo), .sample()
  );

  // Only one model can be in its readout phase at a time on a shared link.
  a_one_readout: assert property (@(posedge clk) disable iff (rst) !(rp[0] && rp[1]))
    else $error("two ASIC models in readout");

endmodule
