// temp_lut: temperature to rheostat-settings look-up table, shared by the
// eight auxiliary temperature sensor simulators.
//
// A thermistor's resistance is strongly non-linear in temperature, so each
// simulated sensor is a parallel combination of three rheostat-mode digital
// potentiometers (1 MOhm, 100 kOhm, 10 kOhm), each set by an 8-bit code or
// shut down (open circuit). One table entry per 1 degree C step holds
//   {shdn[2:0], code_1M[7:0], code_100k[7:0], code_10k[7:0]}  (27 bits)
// and is addressed by the 8-bit temperature code of an auxiliary temperature
// event. Table lookup in the main FPGA follows the simulator's
// description. The table's values depend on the thermistor and on the
// parts' calibration and are not fixed here, so the table is a RAM that the
// workstation loads through the write port; after reset every entry is all
// shutdown (open circuit). Lookup latency: one clock cycle.
module temp_lut #(
  parameter int unsigned ENTRIES = 256
) (
  input  logic        clk,
  input  logic        rst,
  // write port (workstation)
  input  logic        we,
  input  logic [7:0]  waddr,
  input  logic [26:0] wdata,
  // lookup
  input  logic        in_valid,
  input  logic [2:0]  in_sel,
  input  logic [7:0]  in_temp,
  output logic        out_valid,
  output logic [2:0]  out_sel,
  output logic [26:0] out_set
);
  logic [26:0] mem [ENTRIES];
  logic        init_done;
  logic [7:0]  init_addr;

  // After reset the RAM is walked once to load the all-shutdown value.
  always_ff @(posedge clk) begin
    if (rst) begin
      init_done <= 1'b0; init_addr <= '0;
    end else if (!init_done) begin
      init_addr <= init_addr + 1'b1;
      if (32'(init_addr) == ENTRIES - 1) init_done <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!init_done)  mem[init_addr] <= {3'b111, 24'h0};
    else if (we)     mem[waddr]     <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; out_sel <= '0; out_set <= '0;
    end else begin
      out_valid <= in_valid;
      out_sel   <= in_sel;
      out_set   <= mem[in_temp];
    end
  end
endmodule
