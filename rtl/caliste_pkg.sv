// caliste_pkg: types and constants shared by the Caliste-SO detector simulator.
//
// The simulator replays a detector event sequence in which each event is one
// 32-bit word. The sequence has six event kinds: detector hit, ASIC temperature,
// test-pulse amplitude, auxiliary temperature, SEU and dummy. The
// bit layout below is this design's own; it only keeps the rule that every
// event, whatever its kind, fits in 32 bits:
//
//   [31:29] kind      (evt_kind_e)
//   [28:21] arrival time, low 8 bits of the time in 20 ns steps from start
//   [20:16] detector number 0..31 (quarter = [20:19], group = [18:17],
//           ASIC in group = [16]); for auxiliary temperature, sensor = [18:16]
//   [15:12] pixel number 0..12 (12 = guard ring), detector events only
//   [11:0]  amplitude (detector, test pulse) or temperature code
//
// Since the time field is modular, a gap of 256 steps or more between two
// events needs a dummy event in between.
//
// The ASIC register map (13 registers) is also the design's own: the
// simulated chip's register list is not public here, apart from ALIMON
// (channel power) and TH (discriminator threshold, 63 = disabled).
package caliste_pkg;

  localparam int unsigned EVT_W      = 32;
  localparam int unsigned TIME_W     = 8;
  localparam int unsigned AMP_W      = 12;
  localparam int unsigned N_CHAN     = 32;
  localparam int unsigned CHAN_W     = 5;
  localparam int unsigned N_DET      = 32;
  localparam int unsigned DET_W      = 5;
  localparam int unsigned N_QUARTER  = 4;
  localparam int unsigned N_TSENS    = 8;
  localparam int unsigned TH_W       = 6;
  localparam int unsigned TEMP_W     = 12;

  typedef enum logic [2:0] {
    EVT_DUMMY    = 3'd0,
    EVT_DETECTOR = 3'd1,
    EVT_ASIC_T   = 3'd2,
    EVT_TEST     = 3'd3,
    EVT_AUX_T    = 3'd4,
    EVT_SEU      = 3'd5
  } evt_kind_e;

  typedef struct packed {
    evt_kind_e          kind;
    logic [TIME_W-1:0]  t;
    logic [DET_W-1:0]   det;
    logic [3:0]         pixel;
    logic [AMP_W-1:0]   amp;
  } event_t;

  // Serial-link command codes sent after the start bit and ASIC address.
  typedef enum logic [1:0] {
    CMD_SC_WRITE = 2'd0,
    CMD_SC_READ  = 2'd1,
    CMD_READOUT  = 2'd2,
    CMD_NOP      = 2'd3
  } link_cmd_e;

  // ASIC configuration registers.
  typedef enum logic [3:0] {
    REG_ALIMON  = 4'd0,   // 32 b, channel power, 1 = powered
    REG_TH      = 4'd1,   // 6 b per channel, 192 b, channel 31 first
    REG_GAIN    = 4'd2,
    REG_SHAPING = 4'd3,
    REG_PZ      = 4'd4,
    REG_BLH     = 4'd5,
    REG_TESTEN  = 4'd6,   // 32 b, channels that receive the test pulse
    REG_MODE    = 4'd7,
    REG_DAC     = 4'd8,
    REG_LEAK    = 4'd9,
    REG_TEMP    = 4'd10,  // read only, set by ASIC temperature events
    REG_EVENT   = 4'd11,  // read only, event register
    REG_ID      = 4'd12   // read only, chip identifier
  } reg_addr_e;

  localparam int unsigned N_REGS   = 13;
  localparam int unsigned REG_MAXW = N_CHAN * TH_W;  // 192

  function automatic int unsigned reg_width(logic [3:0] a);
    case (a)
      REG_ALIMON, REG_TESTEN, REG_EVENT: return 32;
      REG_TH:                            return REG_MAXW;
      REG_TEMP:                          return TEMP_W;
      REG_GAIN, REG_SHAPING, REG_PZ,
      REG_BLH, REG_MODE, REG_DAC,
      REG_LEAK, REG_ID:                  return 8;
      default:                           return 8;
    endcase
  endfunction

  // Discriminator: a 6-bit threshold code compares against the top six
  // amplitude bits, i.e. threshold = TH * 64 LSB.
  localparam logic [TH_W-1:0] TH_DISABLED = 6'd63;

  // Workstation commands understood by the main state machine.
  typedef enum logic [7:0] {
    OP_WRITE_MEM = 8'h01,  // addr[4] count[2] data[count*1024]
    OP_READ_MEM  = 8'h02,  // addr[4] count[2] -> data[count*1024]
    OP_START     = 8'h03,  // addr[4] count[4]
    OP_STOP      = 8'h04,
    OP_STATUS    = 8'h05,  // -> 4 status bytes
    OP_LUT_WRITE = 8'h06   // index[1] settings[4]
  } opcode_e;

  // One logical storage block: 512 bytes on each of the two cards.
  localparam int unsigned BLOCK_BYTES = 1024;

endpackage
