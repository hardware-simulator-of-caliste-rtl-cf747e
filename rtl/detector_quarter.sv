// detector_quarter: one detector quarter of the simulator (one quarter FPGA).
//
// A quarter stands in for eight Caliste-SO units: four groups, each of two
// ASIC models sharing a serial link and one ADC model. Events released by the
// controller's event distributor arrive as 32-bit words in the controller's
// clock domain (evt_clk) and cross into the quarter clock through a small
// dual-clock FIFO; the quarter then decodes each word within a cycle:
//   detector event   -> one-cycle hit to ASIC det[2:0] (group det[2:1], model
//                       det[0]) with channel = pixel number and the amplitude
//   ASIC temperature -> temperature register of that ASIC model
//   test pulse       -> the quarter's test-charge amplitude, used by all eight
//                       models when the host pulses test_pulse
//   SEU              -> latches the SEU flag of that unit; seu is their OR
//   dummy            -> nothing (the distributor already drops these)
// When the host's power signal for the quarter is low, all models are held in
// reset and the SEU flags clear. The event decoding and the SEU latch are this
// design's own choices; the event kinds and their meaning come from the
// simulator's description.
// Timing: an event reaches its ASIC model about 4 quarter-clock cycles plus 2
// controller-clock cycles after it is released, the same for every event, so
// the spacing between events is kept as long as clk is not slower than
// evt_clk.
// The internal reset (rst or power low, registered) is used synchronously by
// the quarter's own logic and as the asynchronous reset of the ASIC and ADC
// models, which mirror the real chip's asynchronous RESET pin; it is released
// from a flip-flop, so both uses are safe. The time field of a released event
// is not needed here any more and is left unused.
module detector_quarter
  import caliste_pkg::*;
(
  input  logic               clk,        // quarter clock, >= 4x STROBE
  input  logic               rst,        // synchronous to clk
  input  logic               power,      // host power signal, 1 = powered
  // events from the controller
  input  logic               evt_clk,
  input  logic               evt_rst,
  input  logic               evt_valid,
  input  event_t             evt,
  // host (IDPU) side, one link and one ADC per group
  input  logic [3:0]         strobe,
  input  logic [3:0]         din,
  output logic [3:0]         dout,
  output logic [3:0]         trig,
  input  logic [3:0]         adc_cs_n,
  input  logic [3:0]         adc_sclk,
  output logic [3:0]         adc_sdo,
  input  logic               test_pulse,
  output logic               seu
);
  // -------- event crossing --------
  logic   fifo_empty, fifo_full;
  event_t head;
  async_fifo #(.DW(EVT_W), .AW(4)) u_xfifo (
    .wclk(evt_clk), .wrst(evt_rst), .wr_en(evt_valid), .wdata(evt), .full(fifo_full),
    .rclk(clk), .rrst(rst), .rd_en(!fifo_empty), .rdata(head), .empty(fifo_empty)
  );

  // -------- power --------
  logic [1:0] pwr_s;
  logic       mrst;
  always_ff @(posedge clk) begin
    if (rst) pwr_s <= '0;
    else     pwr_s <= {pwr_s[0], power};
  end
  assign mrst = rst | ~pwr_s[1];

  // -------- decode --------
  logic [7:0]        hit, temp_we, seu_flag;
  logic [AMP_W-1:0]  amp, test_amp;
  logic [CHAN_W-1:0] chan;
  logic [TEMP_W-1:0] temp_val;

  always_ff @(posedge clk) begin
    if (mrst) begin
      hit <= '0; temp_we <= '0; seu_flag <= '0;
      amp <= '0; chan <= '0; test_amp <= '0; temp_val <= '0;
    end else begin
      hit     <= '0;
      temp_we <= '0;
      if (!fifo_empty) begin
        unique case (head.kind)
          EVT_DETECTOR: begin
            hit[head.det[2:0]] <= 1'b1;
            amp  <= head.amp;
            chan <= CHAN_W'(head.pixel);
          end
          EVT_ASIC_T: begin
            temp_we[head.det[2:0]] <= 1'b1;
            temp_val <= head.amp;
          end
          EVT_TEST: test_amp <= head.amp;
          EVT_SEU:  seu_flag[head.det[2:0]] <= 1'b1;
          default: ;
        endcase
      end
    end
  end
  assign seu = |seu_flag;

  // -------- four groups --------
  for (genvar g = 0; g < 4; g++) begin : g_grp
    asic_group u_grp (
      .clk, .rst(mrst),
      .strobe(strobe[g]), .din(din[g]), .dout(dout[g]), .trig(trig[g]),
      .adc_cs_n(adc_cs_n[g]), .adc_sclk(adc_sclk[g]), .adc_sdo(adc_sdo[g]),
      .test_pulse,
      .hit(hit[2*g +: 2]), .amp, .chan, .test_amp,
      .temp_we(temp_we[2*g +: 2]), .temp_val
    );
  end

  a_no_xfifo_overflow: assert property (@(posedge evt_clk) disable iff (evt_rst) !(evt_valid && fifo_full));

endmodule
