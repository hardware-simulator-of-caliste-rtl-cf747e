// asic_model: digital model of one IDeF-X HD front-end ASIC as seen by the
// instrument's data processing unit (the "host" below).
//
// What it does. The model keeps the chip's digital side only: the serial
// link, the 13 configuration registers, the 32-bit event register and one
// 12-bit amplitude register per channel. The analogue chain is replaced by
// the amplitude registers, which hold the value the host's ADC would read.
// An event is injected by a one-cycle pulse on hit with amp/chan valid; it
// is written only when all five rules hold: the model is in its detection
// phase, the channel is powered (ALIMON), the channel's discriminator is not
// disabled (TH != 63), amp exceeds the threshold, and amp exceeds the value
// already stored. A write sets the channel's event bit and raises trig.
// These rules and the register roles follow the simulator's specification;
// the serial framing and register map below are this design's own.
//
// Serial link (all on rising edges of STROBE, driven by the host):
//   start bit '1', 3-bit ASIC address (MSB first), 2-bit command:
//   SC_WRITE : 4-bit register address, then the register's bits, MSB first
//   SC_READ  : 4-bit register address, then the model shifts the register out
//              on dout, one bit per STROBE edge (dout changes just after a
//              rising edge; the host samples it on the next rising edge)
//   READOUT  : the addressed model leaves detection, shifts out the event
//              register (bit 31 first) on the next 32 edges with din = 0,
//              then puts the lowest hit channel's amplitude on aout with
//              aout_valid. Each further edge with din = 0 steps to the next
//              hit channel; an edge with din = 1 ends the readout, clears the
//              event and amplitude registers and returns to detection.
//   NOP      : nothing.
// A model not addressed follows the frame silently (it waits for the din = 1
// edge that ends someone else's readout).
//
// Timing. Everything runs on clk; STROBE and DIN are brought in through
// two-flop synchronisers, so clk must be at least four times the STROBE
// rate (100 MHz for the nominal 20 MHz STROBE). trig follows an injection by
// one clk cycle. rst is asynchronous, as on the real chip, and restores every
// register to its default.
module asic_model
  import caliste_pkg::*;
#(
  parameter logic [7:0] CHIP_ID = 8'hC5
) (
  input  logic                 clk,
  input  logic                 rst,          // asynchronous, active high
  input  logic [2:0]           numasic,      // address pins
  // host serial link
  input  logic                 strobe,
  input  logic                 din,
  output logic                 dout,
  output logic                 trig,
  // readout multiplexer to the ADC model
  output logic [AMP_W-1:0]     aout,
  output logic                 aout_valid,
  output logic                 readout_phase,
  // event injection by the simulator engine
  input  logic                 hit,
  input  logic [AMP_W-1:0]     amp,
  input  logic [CHAN_W-1:0]    chan,
  input  logic                 test_pulse,   // host test-charge injection
  input  logic [AMP_W-1:0]     test_amp,
  input  logic                 temp_we,
  input  logic [TEMP_W-1:0]    temp_val
);

  typedef enum logic [3:0] {
    L_IDLE, L_ADDR, L_CMD, L_REGA, L_WDATA, L_RDATA, L_RO_EVT, L_RO_CHAN, L_SKIP_RO
  } lstate_e;

  // ---------------- registers ----------------
  logic [N_CHAN-1:0]         alimon, testen, event_reg;
  logic [REG_MAXW-1:0]       th;                  // channel c at [c*6 +: 6]
  logic [7:0]                misc [8];            // GAIN..LEAK, meaningless here
  logic [TEMP_W-1:0]         temp;
  logic [AMP_W-1:0]          amp_reg [N_CHAN];

  // ---------------- link synchronisers ----------------
  logic [2:0] strobe_s;
  logic [1:0] din_s;
  logic [2:0] tp_s;
  logic       rise, din_b, tp_rise;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      strobe_s <= '0; din_s <= '0; tp_s <= '0;
    end else begin
      strobe_s <= {strobe_s[1:0], strobe};
      din_s    <= {din_s[0], din};
      tp_s     <= {tp_s[1:0], test_pulse};
    end
  end
  assign rise    = strobe_s[1] & ~strobe_s[2];
  assign din_b   = din_s[1];
  assign tp_rise = tp_s[1] & ~tp_s[2];

  // ---------------- link state machine ----------------
  lstate_e              ls;
  logic [7:0]           cnt;
  logic [1:0]           addr_sr;
  logic [1:0]           cmd_sr;
  logic [3:0]           rega;
  logic [REG_MAXW-1:0]  sr;
  logic                 me;          // this frame addresses this model
  logic [N_CHAN-1:0]    ro_mask;     // hit channels not yet multiplexed out
  logic                 ro_clear;    // end of readout: clear event data

  // misc index: GAIN..BLH -> 0..3, MODE..LEAK -> 4..6
  function automatic logic [2:0] misc_idx(logic [3:0] a);
    return (a < REG_TESTEN) ? 3'(a - 4'd2) : 3'(a - 4'd3);
  endfunction

  function automatic logic [REG_MAXW-1:0] reg_read(logic [3:0] a);
    logic [REG_MAXW-1:0] v;
    v = '0;
    case (a)
      REG_ALIMON: v[31:0] = alimon;
      REG_TH:     v       = th;
      REG_TESTEN: v[31:0] = testen;
      REG_TEMP:   v[TEMP_W-1:0] = temp;
      REG_EVENT:  v[31:0] = event_reg;
      REG_ID:     v[7:0]  = CHIP_ID;
      REG_GAIN, REG_SHAPING, REG_PZ, REG_BLH,
      REG_MODE, REG_DAC, REG_LEAK: v[7:0] = misc[misc_idx(a)];
      default:    v = '0;
    endcase
    return v;
  endfunction


  logic [N_CHAN-1:0] lowest;
  logic [CHAN_W-1:0] cur_chan;
  always_comb begin
    lowest   = ro_mask & (~ro_mask + 1'b1);
    cur_chan = '0;
    for (int c = 0; c < N_CHAN; c++) if (lowest[c]) cur_chan = CHAN_W'(c);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ls <= L_IDLE; cnt <= '0; addr_sr <= '0; cmd_sr <= '0; rega <= '0; sr <= '0;
      me <= 1'b0; ro_mask <= '0; readout_phase <= 1'b0; dout <= 1'b0; ro_clear <= 1'b0;
      alimon <= '1; testen <= '0; th <= '0;
      for (int i = 0; i < 8; i++) misc[i] <= 8'h00;
    end else begin
      ro_clear <= 1'b0;
      if (rise) begin
        unique case (ls)
          L_IDLE: begin
            dout <= 1'b0;
            if (din_b) begin ls <= L_ADDR; cnt <= '0; end
          end
          L_ADDR: begin
            addr_sr <= {addr_sr[0], din_b};
            cnt     <= cnt + 1'b1;
            if (cnt == 8'd2) begin
              ls <= L_CMD; cnt <= '0;
              me <= ({addr_sr[1:0], din_b} == numasic);
            end
          end
          L_CMD: begin
            cmd_sr <= {cmd_sr[0], din_b};
            cnt    <= cnt + 1'b1;
            if (cnt == 8'd1) begin
              cnt <= '0;
              unique case (link_cmd_e'({cmd_sr[0], din_b}))
                CMD_SC_WRITE, CMD_SC_READ: ls <= L_REGA;
                CMD_READOUT: begin
                  if (me) begin
                    ls <= L_RO_EVT; readout_phase <= 1'b1;
                    sr <= REG_MAXW'(event_reg);
                    dout <= event_reg[N_CHAN-1];
                  end else ls <= L_SKIP_RO;
                end
                CMD_NOP: ls <= L_IDLE;
              endcase
            end
          end
          L_REGA: begin
            rega <= {rega[2:0], din_b};
            cnt  <= cnt + 1'b1;
            if (cnt == 8'd3) begin
              cnt <= '0;
              if (cmd_sr == CMD_SC_READ) begin
                ls   <= L_RDATA;
                sr   <= reg_read({rega[2:0], din_b});
                dout <= me & reg_read({rega[2:0], din_b})[reg_width({rega[2:0], din_b}) - 1];
              end else begin
                ls <= L_WDATA;
              end
            end
          end
          L_WDATA: begin
            sr  <= {sr[REG_MAXW-2:0], din_b};
            cnt <= cnt + 1'b1;
            if (32'(cnt) == reg_width(rega) - 1) begin
              ls <= L_IDLE;
              if (me) begin
                case (rega)
                  REG_ALIMON: alimon <= {sr[30:0], din_b};
                  REG_TH:     th     <= {sr[REG_MAXW-2:0], din_b};
                  REG_TESTEN: testen <= {sr[30:0], din_b};
                  REG_GAIN, REG_SHAPING, REG_PZ, REG_BLH,
                  REG_MODE, REG_DAC, REG_LEAK: misc[misc_idx(rega)] <= {sr[6:0], din_b};
                  default: ;  // read-only registers ignore writes
                endcase
              end
            end
          end
          L_RDATA: begin
            cnt <= cnt + 1'b1;
            if (32'(cnt) == reg_width(rega) - 1) begin
              ls <= L_IDLE; dout <= 1'b0;
            end else begin
              dout <= me & sr[reg_width(rega) - 2 - 32'(cnt)];
            end
          end
          L_RO_EVT: begin
            cnt <= cnt + 1'b1;
            if (cnt == 8'(N_CHAN - 1)) begin
              ls <= L_RO_CHAN; dout <= 1'b0;
              ro_mask <= sr[N_CHAN-1:0];
            end else begin
              dout <= sr[N_CHAN - 2 - 32'(cnt)];
            end
          end
          L_RO_CHAN: begin
            if (din_b) begin
              ls <= L_IDLE; readout_phase <= 1'b0; ro_mask <= '0; ro_clear <= 1'b1;
            end else begin
              ro_mask <= ro_mask & ~lowest;
            end
          end
          L_SKIP_RO: if (din_b) ls <= L_IDLE;
          default: ls <= L_IDLE;
        endcase
      end
    end
  end

  assign aout       = amp_reg[cur_chan];
  assign aout_valid = (ls == L_RO_CHAN) && (ro_mask != '0);

  // ---------------- event injection ----------------
  function automatic logic accept(logic [CHAN_W-1:0] c, logic [AMP_W-1:0] a);
    logic [TH_W-1:0] t;
    t = th[c*TH_W +: TH_W];
    return !readout_phase && alimon[c] && (t != TH_DISABLED) &&
           (a > {t, 6'b0}) && (a > amp_reg[c]);
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      event_reg <= '0;
      temp      <= '0;
      for (int c = 0; c < N_CHAN; c++) amp_reg[c] <= '0;
    end else begin
      if (temp_we) temp <= temp_val;
      if (ro_clear) begin
        event_reg <= '0;
        for (int c = 0; c < N_CHAN; c++) amp_reg[c] <= '0;
      end else begin
        if (hit && accept(chan, amp)) begin
          amp_reg[chan]   <= amp;
          event_reg[chan] <= 1'b1;
        end
        if (tp_rise) begin
          for (int c = 0; c < N_CHAN; c++)
            if (testen[c] && accept(CHAN_W'(c), test_amp)) begin
              amp_reg[c]   <= test_amp;
              event_reg[c] <= 1'b1;
            end
        end
      end
    end
  end

  assign trig = (event_reg != '0) && !readout_phase;

endmodule
