// temp_sensor_sim: one auxiliary temperature sensor simulator.
//
// The simulated thermistor is three rheostat-mode digital potentiometers
// wired in parallel on one I2C bus. On a new setting (set_valid, with the
// 27-bit table entry {shdn[2:0], code_1M, code_100k, code_10k}) the
// simulator writes the three potentiometers in turn, 1 MOhm part first.
// Each write is one I2C transaction: device address POT_ADDR0 + k, an
// instruction byte whose bit 5 is the shutdown flag (other bits 0), and the
// 8-bit wiper code. A setting that arrives while the bus is busy is kept
// and sent after the current one; only the newest waiting setting is kept.
// nack_seen records a missing acknowledge. The three-potentiometer structure
// and the SHDN flags follow the simulator's description; the instruction
// byte layout, the addresses and the write order are this design's own.
module temp_sensor_sim #(
  parameter logic [6:0]  POT_ADDR0 = 7'h2C,
  parameter int unsigned I2C_DIV   = 31
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        set_valid,
  input  logic [26:0] set_data,
  output logic        busy,
  output logic        nack_seen,
  output logic [31:0] n_updates,
  output logic        scl,
  output logic        sda_oe,
  input  logic        sda_i
);
  typedef enum logic [1:0] {T_IDLE, T_LAUNCH, T_WAIT} state_e;
  state_e      st;
  logic [26:0] cur, pending;
  logic        have_pending;
  logic [1:0]  k;
  logic        m_start, m_busy, m_done, m_nack;
  logic [7:0]  code;
  logic        shdn;

  always_comb begin
    case (k)
      2'd0:    begin code = cur[23:16]; shdn = cur[26]; end
      2'd1:    begin code = cur[15:8];  shdn = cur[25]; end
      default: begin code = cur[7:0];   shdn = cur[24]; end
    endcase
  end

  i2c_master #(.DIV(I2C_DIV)) u_i2c (
    .clk, .rst, .start(m_start),
    .dev_addr(POT_ADDR0 + 7'(k)), .byte1({2'b00, shdn, 5'b00000}), .byte2(code),
    .busy(m_busy), .done(m_done), .nack(m_nack),
    .scl, .sda_oe, .sda_i
  );

  assign m_start = (st == T_LAUNCH);
  assign busy    = (st != T_IDLE) || have_pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= T_IDLE; cur <= '0; pending <= '0; have_pending <= 1'b0; k <= '0;
      nack_seen <= 1'b0; n_updates <= '0;
    end else begin
      if (set_valid) begin pending <= set_data; have_pending <= 1'b1; end
      unique case (st)
        T_IDLE: if (have_pending || set_valid) begin
          cur <= set_valid ? set_data : pending;
          have_pending <= 1'b0;
          k <= '0; st <= T_LAUNCH;
        end
        T_LAUNCH: st <= T_WAIT;
        T_WAIT: if (m_done) begin
          if (m_nack) nack_seen <= 1'b1;
          if (k == 2'd2) begin st <= T_IDLE; n_updates <= n_updates + 1'b1; end
          else begin k <= k + 1'b1; st <= T_LAUNCH; end
        end
        default: st <= T_IDLE;
      endcase
    end
  end
  // m_busy is implied by st == T_WAIT; kept for the assertion below.
  a_launch_idle: assert property (@(posedge clk) disable iff (rst) m_start |-> !m_busy);
endmodule
