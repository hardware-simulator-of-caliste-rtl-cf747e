// sim_top: hardware simulator of the 32 Caliste-SO detectors of the STIX
// spectrometer, as seen by the instrument's data processing unit (IDPU).
//
// A workstation uploads a detector event sequence over USB; the simulator
// keeps it on two SDHC cards and, on command, replays it in real time so the
// IDPU sees the same triggers, serial-link answers and ADC data that the real
// detector module would give. The design has two halves:
//   controller (clk, 50 MHz): USB state machine on the chip's 60 MHz clock,
//     clock-crossing FIFOs, the main state machine that executes workstation
//     commands, the dual SD card storage controller, the event distributor
//     with its queue, time counter and comparator, and eight auxiliary
//     temperature sensor simulators with their shared look-up table;
//   four detector quarters (q_clk): each with four groups of two ASIC models
//     and one ADC model, receiving released events from the distributor.
// Each quarter has its own IDPU interface: per group a STROBE/DIN/DOUT/TRIG
// link and an ADC CS/SCLK/SDO port, plus test pulse, SEU and a power signal.
// A quarter whose power signal is low is held in reset and the distributor
// drops its events. The partitioning follows the simulator's architecture;
// the quarter clock (q_clk, 100 MHz suggested, at least four times the 20 MHz
// STROBE) and the reset scheme are this design's own choices.
// Reset: rst_n is asynchronous and is synchronised into each clock domain.
// The distributor's drop counter and step counter, and the temperature
// simulators' status outputs, are diagnostics for simulation and stay
// unconnected here.
module sim_top
  import caliste_pkg::*;
#(
  parameter int unsigned QAW      = 10,    // event queue depth 2**QAW
  parameter int unsigned PREFILL  = 512,   // words queued before the clock starts
  parameter int unsigned SD_SLOW_DIV = 63, // SD identification clock divider
  parameter int unsigned I2C_DIV  = 31     // I2C quarter-bit divider
) (
  input  logic              clk,           // 50 MHz system clock
  input  logic              usb_clk,       // 60 MHz from the USB chip
  input  logic              q_clk,         // detector quarter clock
  input  logic              rst_n,
  // USB chip synchronous FIFO bus
  input  logic [7:0]        usb_data_i,
  output logic [7:0]        usb_data_o,
  output logic              usb_data_oe,
  input  logic              usb_rxf_n,
  input  logic              usb_txe_n,
  output logic              usb_rd_n,
  output logic              usb_wr_n,
  output logic              usb_oe_n,
  // two SD cards
  output logic [1:0]        sd_clk,
  output logic [1:0]        sd_cmd_o,
  output logic [1:0]        sd_cmd_oe,
  input  logic [1:0]        sd_cmd_i,
  output logic [3:0]        sd_dat_o [2],
  output logic [1:0]        sd_dat_oe,
  input  logic [3:0]        sd_dat_i [2],
  // IDPU interfaces, [quarter][group]
  input  logic [3:0]        q_power,
  input  logic [3:0][3:0]   q_strobe,
  input  logic [3:0][3:0]   q_din,
  output logic [3:0][3:0]   q_dout,
  output logic [3:0][3:0]   q_trig,
  input  logic [3:0][3:0]   q_adc_cs_n,
  input  logic [3:0][3:0]   q_adc_sclk,
  output logic [3:0][3:0]   q_adc_sdo,
  input  logic [3:0]        q_test_pulse,
  output logic [3:0]        q_seu,
  // auxiliary temperature sensor simulators (digital potentiometer buses)
  output logic [7:0]        ts_scl,
  output logic [7:0]        ts_sda_oe,
  input  logic [7:0]        ts_sda_i,
  // status
  output logic              storage_ready,
  output logic              storage_error,
  output logic              sim_running
);
  // ------------------------------------------------ resets
  logic [1:0] rs_sys, rs_usb, rs_q;
  logic       rst, usb_rst, q_rst;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rs_sys <= '0; else rs_sys <= {rs_sys[0], 1'b1};
  always_ff @(posedge usb_clk or negedge rst_n)
    if (!rst_n) rs_usb <= '0; else rs_usb <= {rs_usb[0], 1'b1};
  always_ff @(posedge q_clk or negedge rst_n)
    if (!rst_n) rs_q <= '0; else rs_q <= {rs_q[0], 1'b1};
  assign rst     = ~rs_sys[1];
  assign usb_rst = ~rs_usb[1];
  assign q_rst   = ~rs_q[1];

  // ------------------------------------------------ USB and its FIFOs
  logic       u_rx_we, u_rx_full, u_tx_re, u_tx_empty;
  logic [7:0] u_rx_data, u_tx_data;
  logic       m_rx_re, m_rx_empty, m_tx_we, m_tx_full;
  logic [7:0] m_rx_data, m_tx_data;

  usb_sm u_usb (
    .clk(usb_clk), .rst(usb_rst),
    .data_i(usb_data_i), .data_o(usb_data_o), .data_oe(usb_data_oe),
    .rxf_n(usb_rxf_n), .txe_n(usb_txe_n), .rd_n(usb_rd_n), .wr_n(usb_wr_n), .oe_n(usb_oe_n),
    .rx_we(u_rx_we), .rx_data(u_rx_data), .rx_full(u_rx_full),
    .tx_re(u_tx_re), .tx_data(u_tx_data), .tx_empty(u_tx_empty)
  );
  async_fifo #(.DW(8), .AW(9)) u_rx_fifo (
    .wclk(usb_clk), .wrst(usb_rst), .wr_en(u_rx_we), .wdata(u_rx_data), .full(u_rx_full),
    .rclk(clk), .rrst(rst), .rd_en(m_rx_re), .rdata(m_rx_data), .empty(m_rx_empty)
  );
  async_fifo #(.DW(8), .AW(9)) u_tx_fifo (
    .wclk(clk), .wrst(rst), .wr_en(m_tx_we), .wdata(m_tx_data), .full(m_tx_full),
    .rclk(usb_clk), .rrst(usb_rst), .rd_en(u_tx_re), .rdata(u_tx_data), .empty(u_tx_empty)
  );

  // ------------------------------------------------ main state machine
  logic        st_cmd_valid, st_cmd_ready, st_cmd_write, st_abort;
  logic [31:0] st_cmd_addr, st_cmd_count;
  logic        st_wvalid, st_wready, st_rvalid, st_rready, st_busy;
  logic [7:0]  st_wdata, st_rdata;
  logic        d_clear, d_run, d_valid, d_full;
  logic [EVT_W-1:0] d_word;
  logic [QAW:0] d_count;
  logic [31:0] d_released, d_dropped;
  logic        lut_we;
  logic [7:0]  lut_addr;
  logic [26:0] lut_wdata;

  main_sm #(.QAW(QAW), .PREFILL(PREFILL)) u_main (
    .clk, .rst,
    .rx_data(m_rx_data), .rx_empty(m_rx_empty), .rx_re(m_rx_re),
    .tx_we(m_tx_we), .tx_data(m_tx_data), .tx_full(m_tx_full),
    .st_cmd_valid, .st_cmd_ready, .st_cmd_write, .st_cmd_addr, .st_cmd_count, .st_abort,
    .st_wvalid, .st_wready, .st_wdata, .st_rvalid, .st_rready, .st_rdata,
    .st_busy, .st_error(storage_error),
    .dist_clear(d_clear), .dist_run(d_run), .dist_valid(d_valid), .dist_word(d_word),
    .dist_full(d_full), .dist_count(d_count), .dist_released(d_released),
    .lut_we, .lut_addr, .lut_wdata
  );
  assign sim_running = d_run;

  // ------------------------------------------------ memory storage
  sd_dual #(.SLOW_DIV(SD_SLOW_DIV)) u_storage (
    .clk, .rst,
    .cmd_valid(st_cmd_valid), .cmd_ready(st_cmd_ready), .cmd_write(st_cmd_write),
    .cmd_addr(st_cmd_addr), .cmd_count(st_cmd_count), .abort_req(st_abort),
    .wvalid(st_wvalid), .wready(st_wready), .wdata(st_wdata),
    .rvalid(st_rvalid), .rready(st_rready), .rdata(st_rdata),
    .busy(st_busy), .init_done(storage_ready), .error(storage_error),
    .sd_clk, .sd_cmd_o, .sd_cmd_oe, .sd_cmd_i, .sd_dat_o, .sd_dat_oe, .sd_dat_i
  );

  // ------------------------------------------------ event distributor
  logic [3:0] pwr_s1, pwr_s2;
  always_ff @(posedge clk) begin
    if (rst) begin pwr_s1 <= '0; pwr_s2 <= '0; end
    else     begin pwr_s1 <= q_power; pwr_s2 <= pwr_s1; end
  end

  logic [3:0] q_valid;
  event_t     q_evt;
  logic       ts_valid;
  logic [2:0] ts_sel;
  logic [7:0] ts_temp;
  logic [TIME_W-1:0] now;

  event_distributor #(.QAW(QAW)) u_dist (
    .clk, .rst, .clear(d_clear), .run(d_run),
    .in_valid(d_valid), .in_word(d_word), .in_full(d_full), .q_count(d_count),
    .q_power(pwr_s2), .q_valid, .q_evt,
    .ts_valid, .ts_sel, .ts_temp,
    .now, .n_released(d_released), .n_dropped(d_dropped)
  );

  // ------------------------------------------------ temperature sensors
  logic        lk_valid;
  logic [2:0]  lk_sel;
  logic [26:0] lk_set;
  temp_lut u_lut (
    .clk, .rst, .we(lut_we), .waddr(lut_addr), .wdata(lut_wdata),
    .in_valid(ts_valid), .in_sel(ts_sel), .in_temp(ts_temp),
    .out_valid(lk_valid), .out_sel(lk_sel), .out_set(lk_set)
  );
  for (genvar s = 0; s < 8; s++) begin : g_ts
    temp_sensor_sim #(.I2C_DIV(I2C_DIV)) u_ts (
      .clk, .rst,
      .set_valid(lk_valid && lk_sel == 3'(s)), .set_data(lk_set),
      .busy(), .nack_seen(), .n_updates(),
      .scl(ts_scl[s]), .sda_oe(ts_sda_oe[s]), .sda_i(ts_sda_i[s])
    );
  end

  // ------------------------------------------------ detector quarters
  for (genvar q = 0; q < 4; q++) begin : g_q
    detector_quarter u_q (
      .clk(q_clk), .rst(q_rst), .power(q_power[q]),
      .evt_clk(clk), .evt_rst(rst), .evt_valid(q_valid[q]), .evt(q_evt),
      .strobe(q_strobe[q]), .din(q_din[q]), .dout(q_dout[q]), .trig(q_trig[q]),
      .adc_cs_n(q_adc_cs_n[q]), .adc_sclk(q_adc_sclk[q]), .adc_sdo(q_adc_sdo[q]),
      .test_pulse(q_test_pulse[q]), .seu(q_seu[q])
    );
  end

endmodule
