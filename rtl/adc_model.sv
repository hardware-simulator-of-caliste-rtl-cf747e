// adc_model: model of the 12-bit A/D converter shared by two ASIC models.
//
// The real converter digitises the ASIC's multiplexed analogue output. Here
// the ASIC model already provides that value as a 12-bit word, so the model
// is a 12-bit register with a parallel input and a serial output, as the
// simulator's specification describes. The serial framing is this design's
// own choice, modelled on common 12-bit SPI converters:
//   - the falling edge of cs_n samples ain into the register (the
//     "conversion"); ain_valid low samples zero,
//   - sdo then shows 4 leading zeros followed by the 12 data bits, MSB first,
//     one bit per sclk period: sdo changes after each falling edge of sclk
//     and the host samples it on the rising edge, 16 rising edges in all,
//   - with cs_n high, sdo is 0.
// cs_n and sclk are brought in through two-flop synchronisers on clk, which
// must run at least four times faster than sclk.
module adc_model
  import caliste_pkg::*;
(
  input  logic             clk,
  input  logic             rst,        // asynchronous, active high
  input  logic [AMP_W-1:0] ain,
  input  logic             ain_valid,
  input  logic             cs_n,
  input  logic             sclk,
  output logic             sdo,
  output logic             sample      // one-cycle pulse: ain was captured
);
  logic [2:0]  cs_s, sclk_s;
  logic [15:0] sr;
  logic        cs_fall, sclk_fall;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cs_s <= '1; sclk_s <= '0;
    end else begin
      cs_s   <= {cs_s[1:0], cs_n};
      sclk_s <= {sclk_s[1:0], sclk};
    end
  end
  assign cs_fall   = ~cs_s[1] &  cs_s[2];
  assign sclk_fall = ~sclk_s[1] & sclk_s[2];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sr <= '0;
    end else if (cs_fall) begin
      sr <= {4'b0000, ain_valid ? ain : AMP_W'(0)};
    end else if (!cs_s[1] && sclk_fall) begin
      sr <= {sr[14:0], 1'b0};
    end
  end

  assign sample = cs_fall;
  assign sdo    = ~cs_s[1] & sr[15];

endmodule
