// sd_dual: memory storage controller built from two SDHC cards driven at
// the same time.
//
// One SD card on a 4-bit bus at 50 MHz gives about 22 MB/s of real
// throughput; two identical cards side by side double it. A logical storage
// block is 1024 bytes: even bytes live in the 512-byte block of the same
// number on card A, odd bytes on card B. Every request goes to both card
// controllers at once (cmd_ready when both are ready), and the byte streams
// are split and merged alternately, so the external interface looks like one
// card with twice the block size and twice the rate. busy, error and
// init_done combine both cards. Driving two cards together follows the
// simulator's description; the byte interleaving is this design's own.
module sd_dual #(
  parameter int unsigned SLOW_DIV = 63
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_write,
  input  logic [31:0] cmd_addr,
  input  logic [31:0] cmd_count,
  input  logic        abort_req,
  input  logic        wvalid,
  output logic        wready,
  input  logic [7:0]  wdata,
  output logic        rvalid,
  input  logic        rready,
  output logic [7:0]  rdata,
  output logic        busy,
  output logic        init_done,
  output logic        error,
  // two SD buses, index 0 = card A, 1 = card B
  output logic [1:0]  sd_clk,
  output logic [1:0]  sd_cmd_o,
  output logic [1:0]  sd_cmd_oe,
  input  logic [1:0]  sd_cmd_i,
  output logic [3:0]  sd_dat_o [2],
  output logic [1:0]  sd_dat_oe,
  input  logic [3:0]  sd_dat_i [2]
);
  logic [1:0] c_ready, w_ready, r_valid, r_ready, w_valid, h_busy, h_init, h_err;
  logic [7:0] r_data [2];
  logic       wsel, rsel;

  assign cmd_ready = &c_ready;
  assign busy      = |h_busy;
  assign init_done = &h_init;
  assign error     = |h_err;

  assign w_valid = {wvalid & wsel, wvalid & ~wsel};
  assign wready  = wsel ? w_ready[1] : w_ready[0];
  assign rvalid  = rsel ? r_valid[1] : r_valid[0];
  assign rdata   = rsel ? r_data[1]  : r_data[0];
  assign r_ready = {rready & rsel, rready & ~rsel};

  always_ff @(posedge clk) begin
    if (rst || (cmd_valid && cmd_ready)) begin
      wsel <= 1'b0; rsel <= 1'b0;
    end else begin
      if (wvalid && wready) wsel <= ~wsel;
      if (rvalid && rready) rsel <= ~rsel;
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_card
    sd_host #(.SLOW_DIV(SLOW_DIV)) u_host (
      .clk, .rst,
      .cmd_valid(cmd_valid && cmd_ready), .cmd_ready(c_ready[i]),
      .cmd_write, .cmd_addr, .cmd_count, .abort_req,
      .wvalid(w_valid[i]), .wready(w_ready[i]), .wdata,
      .rvalid(r_valid[i]), .rready(r_ready[i]), .rdata(r_data[i]),
      .busy(h_busy[i]), .init_done(h_init[i]), .error(h_err[i]),
      .sd_clk(sd_clk[i]), .sd_cmd_o(sd_cmd_o[i]), .sd_cmd_oe(sd_cmd_oe[i]), .sd_cmd_i(sd_cmd_i[i]),
      .sd_dat_o(sd_dat_o[i]), .sd_dat_oe(sd_dat_oe[i]), .sd_dat_i(sd_dat_i[i])
    );
  end
endmodule
