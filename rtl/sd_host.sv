// sd_host: SDHC memory card controller for one card, 4-bit SD bus.
//
// The card is used as raw storage: there is no file system, only direct,
// sequential access to 512-byte blocks, which is what keeps the data rate
// high. After reset the controller initialises the card at the slow
// identification clock (clk / (2*SLOW_DIV), about 400 kHz at 50 MHz):
//   80 clocks idle, CMD0, CMD8 (0x1AA), CMD55+ACMD41 (HCS) until ready, CMD2,
//   CMD3 (gets the RCA), CMD7 (select), CMD55+ACMD6 (4-bit bus),
//   CMD6 (switch to High Speed, 64-byte status block read and dropped),
// then moves the SD clock to the full controller clock (clk forwarded, 50 MHz)
// and raises init_done. A request (cmd_valid/cmd_ready) then reads or writes
// cmd_count blocks from block address cmd_addr with CMD18 / CMD25 and ends
// with CMD12. Read data leave on the rvalid/rready byte stream, write data
// enter on wvalid/wready; bytes go to the bus high nibble first. A write
// block starts only once all 512 of its bytes are buffered; on reads the SD
// clock is stopped while the 1 KiB receive buffer is nearly full, which the
// SD bus allows. CRC7 is checked on R1/R6/R7 responses and CRC16 on every data
// line; a mismatch, a missing response or a rejected write sets error. abort_req
// ends a transfer after the current block.
// Bus timing: the host changes CMD/DAT after each falling SD clock edge and
// samples the card's lines on the next falling edge; the card samples on the
// rising edge. sd_clk is clk inverted and gated in fast mode.
// The card type, bus width, clock and block access come from the
// simulator's description; the initialisation order, the buffering and the
// flow control are this design's own.
module sd_host #(
  parameter int unsigned SLOW_DIV = 63,
  parameter int unsigned TIMEOUT  = 255
) (
  input  logic        clk,
  input  logic        rst,
  // block requests
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
  // SD bus
  output logic        sd_clk,
  output logic        sd_cmd_o,
  output logic        sd_cmd_oe,
  input  logic        sd_cmd_i,
  output logic [3:0]  sd_dat_o,
  output logic        sd_dat_oe,
  input  logic [3:0]  sd_dat_i
);
  // ------------------------------------------------------------ CRC helpers
  function automatic logic [6:0] crc7_step(logic [6:0] c, logic b);
    logic fb;
    fb = c[6] ^ b;
    return {c[5:0], 1'b0} ^ (fb ? 7'h09 : 7'h00);
  endfunction
  function automatic logic [15:0] crc16_step(logic [15:0] c, logic b);
    logic fb;
    fb = c[15] ^ b;
    return {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
  endfunction
  function automatic logic [47:0] cmd_frame(logic [5:0] idx, logic [31:0] arg);
    logic [39:0] body;
    logic [6:0]  c;
    body = {2'b01, idx, arg};
    c = '0;
    for (int i = 39; i >= 0; i--) c = crc7_step(c, body[i]);
    return {body, c, 1'b1};
  endfunction

  // ------------------------------------------------------------ SD clock
  logic        fast, clk_run, slow_q, adv;
  logic [15:0] div;
  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0; slow_q <= 1'b0;
    end else if (!fast && clk_run) begin
      if (div == 16'(SLOW_DIV - 1)) begin div <= '0; slow_q <= ~slow_q; end
      else div <= div + 1'b1;
    end
  end
  assign adv    = clk_run && (fast || (slow_q && div == 16'(SLOW_DIV - 1)));
  assign sd_clk = fast ? (~clk & clk_run) : slow_q;

  // ------------------------------------------------------------ command engine
  typedef enum logic [2:0] {C_IDLE, C_SEND, C_WAIT, C_RESP, C_BUSY, C_DONE} cstate_e;
  cstate_e     cs;
  logic        c_start;
  logic [5:0]  c_idx;
  logic [31:0] c_arg;
  logic [1:0]  c_rtype;      // 0 none, 1 48-bit, 2 136-bit
  logic        c_crc_chk, c_wbusy;
  logic [47:0] c_sr;
  logic [7:0]  c_cnt, c_tmo;
  logic [6:0]  c_crc;
  logic        c_timeout, c_crc_err;
  logic [47:0] resp;

  always_ff @(posedge clk) begin
    if (rst) begin
      cs <= C_IDLE; c_sr <= '1; c_cnt <= '0; c_tmo <= '0; c_crc <= '0;
      c_timeout <= 1'b0; c_crc_err <= 1'b0; resp <= '0;
      sd_cmd_o <= 1'b1; sd_cmd_oe <= 1'b0;
    end else begin
      unique case (cs)
        C_IDLE: if (c_start) begin
          c_sr <= cmd_frame(c_idx, c_arg); c_cnt <= '0; cs <= C_SEND;
          c_timeout <= 1'b0; c_crc_err <= 1'b0;
        end
        C_SEND: if (adv) begin
          sd_cmd_oe <= 1'b1; sd_cmd_o <= c_sr[47];
          c_sr  <= {c_sr[46:0], 1'b1};
          c_cnt <= c_cnt + 1'b1;
          if (c_cnt == 8'd48) begin
            sd_cmd_oe <= 1'b0; sd_cmd_o <= 1'b1; c_tmo <= '0;
            cs <= (c_rtype == 2'd0) ? C_DONE : C_WAIT;
          end
        end
        C_WAIT: if (adv) begin
          c_tmo <= c_tmo + 1'b1;
          if (!sd_cmd_i) begin
            c_cnt <= 8'd1; c_crc <= crc7_step(7'h00, 1'b0); resp <= 48'h0; cs <= C_RESP;
          end else if (c_tmo == 8'(TIMEOUT)) begin
            c_timeout <= 1'b1; cs <= C_DONE;
          end
        end
        C_RESP: if (adv) begin
          resp  <= {resp[46:0], sd_cmd_i};
          c_cnt <= c_cnt + 1'b1;
          if (c_cnt < 8'd40) c_crc <= crc7_step(c_crc, sd_cmd_i);
          if (c_cnt == ((c_rtype == 2'd2) ? 8'd135 : 8'd47)) begin
            if (c_crc_chk && c_crc != resp[6:0]) c_crc_err <= 1'b1;
            c_cnt <= '0;
            cs <= c_wbusy ? C_BUSY : C_DONE;
          end
        end
        C_BUSY: if (adv) begin
          c_cnt <= c_cnt + 1'b1;
          if (c_cnt > 8'd2 && sd_dat_i[0]) cs <= C_DONE;
        end
        C_DONE: cs <= C_IDLE;
        default: cs <= C_IDLE;
      endcase
    end
  end
  logic c_done;
  assign c_done = (cs == C_DONE);

  // ------------------------------------------------------------ buffers
  logic       rxf_we, rxf_full, rxf_empty;
  logic [7:0] rxf_wdata;
  logic [10:0] rxf_count;
  sync_fifo #(.DW(8), .AW(10)) u_rxf (
    .clk, .rst, .wr_en(rxf_we), .wdata(rxf_wdata), .full(rxf_full),
    .rd_en(rready && !rxf_empty), .rdata(rdata), .empty(rxf_empty), .count(rxf_count)
  );
  assign rvalid = !rxf_empty;

  logic       txf_re, txf_full, txf_empty;
  logic [7:0] txf_rdata;
  logic [10:0] txf_count;
  sync_fifo #(.DW(8), .AW(10)) u_txf (
    .clk, .rst, .wr_en(wvalid && !txf_full), .wdata(wdata), .full(txf_full),
    .rd_en(txf_re), .rdata(txf_rdata), .empty(txf_empty), .count(txf_count)
  );
  assign wready = !txf_full;

  // ------------------------------------------------------------ data engine
  typedef enum logic [3:0] {
    D_IDLE, D_RX_WAIT, D_RX, D_RX_CRC, D_TX_WAIT, D_TX, D_TX_CRC, D_TX_END,
    D_TX_STAT_WAIT, D_TX_STAT, D_TX_BUSY, D_DONE
  } dstate_e;
  dstate_e     ds;
  logic        d_rx_start, d_tx_start, d_discard;
  logic [10:0] d_nib, d_len;
  logic [15:0] crc [4];
  logic [15:0] crc_sr [4];
  logic [4:0]  d_cnt;
  logic [3:0]  hi_nib;
  logic [2:0]  stat;
  logic        d_crc_err, d_wr_err;

  assign rxf_wdata = {hi_nib, sd_dat_i};
  assign rxf_we    = (ds == D_RX) && adv && d_nib[0] && !d_discard;
  assign txf_re    = (ds == D_TX) && adv && d_nib[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      ds <= D_IDLE; d_nib <= '0; d_cnt <= '0; hi_nib <= '0; stat <= '0;
      d_crc_err <= 1'b0; d_wr_err <= 1'b0;
      sd_dat_o <= 4'hF; sd_dat_oe <= 1'b0;
      for (int l = 0; l < 4; l++) begin crc[l] <= '0; crc_sr[l] <= '0; end
    end else begin
      unique case (ds)
        D_IDLE: begin
          if (d_rx_start) ds <= D_RX_WAIT;
          else if (d_tx_start) ds <= D_TX_WAIT;
        end
        // ---- receive one block
        D_RX_WAIT: if (adv && !sd_dat_i[0]) begin
          ds <= D_RX; d_nib <= '0;
          for (int l = 0; l < 4; l++) crc[l] <= '0;
        end
        D_RX: if (adv) begin
          for (int l = 0; l < 4; l++) crc[l] <= crc16_step(crc[l], sd_dat_i[l]);
          hi_nib <= sd_dat_i;
          d_nib  <= d_nib + 1'b1;
          if (d_nib == d_len - 1'b1) begin ds <= D_RX_CRC; d_cnt <= '0; end
        end
        D_RX_CRC: if (adv) begin
          for (int l = 0; l < 4; l++) crc_sr[l] <= {crc_sr[l][14:0], sd_dat_i[l]};
          d_cnt <= d_cnt + 1'b1;
          if (d_cnt == 5'd16) begin          // 16 CRC bits then the end bit
            for (int l = 0; l < 4; l++) if (crc_sr[l] != crc[l]) d_crc_err <= 1'b1;
            if (sd_dat_i != 4'hF) d_crc_err <= 1'b1;
            ds <= D_DONE;
          end
        end
        // ---- transmit one block
        D_TX_WAIT: if (adv && txf_count >= 11'd512) begin
          sd_dat_oe <= 1'b1; sd_dat_o <= 4'h0;    // start bit
          ds <= D_TX; d_nib <= '0;
          for (int l = 0; l < 4; l++) crc[l] <= '0;
        end
        D_TX: if (adv) begin
          logic [3:0] n;
          n = d_nib[0] ? txf_rdata[3:0] : txf_rdata[7:4];
          sd_dat_o <= n;
          for (int l = 0; l < 4; l++) crc[l] <= crc16_step(crc[l], n[l]);
          d_nib <= d_nib + 1'b1;
          if (d_nib == 11'd1023) begin ds <= D_TX_CRC; d_cnt <= '0; end
        end
        D_TX_CRC: if (adv) begin
          for (int l = 0; l < 4; l++) begin
            sd_dat_o[l] <= crc[l][15];
            crc[l] <= {crc[l][14:0], 1'b0};
          end
          d_cnt <= d_cnt + 1'b1;
          if (d_cnt == 5'd15) ds <= D_TX_END;
        end
        D_TX_END: if (adv) begin
          sd_dat_o <= 4'hF;                    // end bit
          ds <= D_TX_STAT_WAIT; d_cnt <= '0;
        end
        D_TX_STAT_WAIT: if (adv) begin
          sd_dat_oe <= 1'b0;
          if (sd_dat_oe == 1'b0 && !sd_dat_i[0]) begin ds <= D_TX_STAT; d_cnt <= '0; end
        end
        D_TX_STAT: if (adv) begin
          stat  <= {stat[1:0], sd_dat_i[0]};
          d_cnt <= d_cnt + 1'b1;
          if (d_cnt == 5'd3) begin               // 3 status bits then the end bit
            if (stat != 3'b010) d_wr_err <= 1'b1;
            ds <= D_TX_BUSY; d_cnt <= '0;
          end
        end
        D_TX_BUSY: if (adv) begin
          d_cnt <= d_cnt + 1'b1;
          if (d_cnt > 5'd1 && sd_dat_i[0]) ds <= D_DONE;
        end
        D_DONE: ds <= D_IDLE;
        default: ds <= D_IDLE;
      endcase
    end
  end
  logic d_done;
  assign d_done = (ds == D_DONE);

  // Stop the SD clock only while a read block would overflow the buffer.
  always_ff @(posedge clk) begin
    if (rst) clk_run <= 1'b1;
    else     clk_run <= !((ds == D_RX || ds == D_RX_WAIT) && rxf_count > 11'd1000);
  end

  // ------------------------------------------------------------ sequencer
  typedef enum logic [4:0] {
    Q_POWER, Q_CMD0, Q_CMD8, Q_CMD55, Q_ACMD41, Q_CMD2, Q_CMD3, Q_CMD7, Q_CMD55B,
    Q_ACMD6, Q_CMD6, Q_CMD6_DATA, Q_READY, Q_RD_CMD, Q_RD_DATA, Q_WR_CMD, Q_WR_DATA,
    Q_STOP, Q_ERROR
  } qstate_e;
  qstate_e     qs;
  logic        launched;
  logic [15:0] rca;
  logic [31:0] remaining, blk_addr;
  logic [7:0]  pwr_cnt;

  assign cmd_ready = (qs == Q_READY);
  assign busy      = (qs != Q_READY) || cmd_valid;

  // command parameters per state
  always_comb begin
    c_idx = 6'd0; c_arg = 32'h0; c_rtype = 2'd1; c_crc_chk = 1'b1; c_wbusy = 1'b0;
    unique case (qs)
      Q_CMD0:   begin c_idx = 6'd0;  c_rtype = 2'd0; end
      Q_CMD8:   begin c_idx = 6'd8;  c_arg = 32'h0000_01AA; end
      Q_CMD55:  begin c_idx = 6'd55; end
      Q_ACMD41: begin c_idx = 6'd41; c_arg = 32'h40FF_8000; c_crc_chk = 1'b0; end
      Q_CMD2:   begin c_idx = 6'd2;  c_rtype = 2'd2; c_crc_chk = 1'b0; end
      Q_CMD3:   begin c_idx = 6'd3;  end
      Q_CMD7:   begin c_idx = 6'd7;  c_arg = {rca, 16'h0}; c_wbusy = 1'b1; end
      Q_CMD55B: begin c_idx = 6'd55; c_arg = {rca, 16'h0}; end
      Q_ACMD6:  begin c_idx = 6'd6;  c_arg = 32'h0000_0002; end
      Q_CMD6:   begin c_idx = 6'd6;  c_arg = 32'h80FF_FFF1; end
      Q_RD_CMD: begin c_idx = 6'd18; c_arg = blk_addr; end
      Q_WR_CMD: begin c_idx = 6'd25; c_arg = blk_addr; end
      Q_STOP:   begin c_idx = 6'd12; c_wbusy = 1'b1; end
      default: ;
    endcase
  end

  logic cmd_state;
  assign cmd_state = qs inside {Q_CMD0, Q_CMD8, Q_CMD55, Q_ACMD41, Q_CMD2, Q_CMD3, Q_CMD7,
                                Q_CMD55B, Q_ACMD6, Q_CMD6, Q_RD_CMD, Q_WR_CMD, Q_STOP};
  assign c_start    = cmd_state && !launched && (cs == C_IDLE);
  assign d_rx_start = (qs == Q_CMD6 || qs == Q_RD_CMD) && c_start ||
                      (qs == Q_RD_DATA && ds == D_IDLE && remaining != 0);
  assign d_tx_start = (qs == Q_WR_DATA && ds == D_IDLE && remaining != 0);
  assign d_discard  = (qs == Q_CMD6 || qs == Q_CMD6_DATA);
  assign d_len      = d_discard ? 11'd128 : 11'd1024;

  logic resp_bad;
  assign resp_bad = c_timeout || c_crc_err;

  always_ff @(posedge clk) begin
    if (rst) begin
      qs <= Q_POWER; launched <= 1'b0; rca <= '0; remaining <= '0; blk_addr <= '0; pwr_cnt <= '0;
      fast <= 1'b0; init_done <= 1'b0; error <= 1'b0;
    end else begin
      if (c_start) launched <= 1'b1;
      if (c_done)  launched <= 1'b0;
      if (d_crc_err || d_wr_err) error <= 1'b1;
      if (abort_req && remaining > 32'd1 && (qs == Q_RD_DATA || qs == Q_WR_DATA || qs == Q_RD_CMD || qs == Q_WR_CMD))
        remaining <= 32'd1;
      unique case (qs)
        Q_POWER:  if (adv) begin pwr_cnt <= pwr_cnt + 1'b1; if (pwr_cnt == 8'd79) qs <= Q_CMD0; end
        Q_CMD0:   if (c_done) qs <= Q_CMD8;
        Q_CMD8:   if (c_done) qs <= resp_bad ? Q_ERROR : Q_CMD55;
        Q_CMD55:  if (c_done) qs <= resp_bad ? Q_ERROR : Q_ACMD41;
        Q_ACMD41: if (c_done) qs <= c_timeout ? Q_ERROR : (resp[39] ? Q_CMD2 : Q_CMD55);
        Q_CMD2:   if (c_done) qs <= c_timeout ? Q_ERROR : Q_CMD3;
        Q_CMD3:   if (c_done) begin rca <= resp[39:24]; qs <= resp_bad ? Q_ERROR : Q_CMD7; end
        Q_CMD7:   if (c_done) qs <= resp_bad ? Q_ERROR : Q_CMD55B;
        Q_CMD55B: if (c_done) qs <= resp_bad ? Q_ERROR : Q_ACMD6;
        Q_ACMD6:  if (c_done) qs <= resp_bad ? Q_ERROR : Q_CMD6;
        Q_CMD6:   if (c_done) qs <= resp_bad ? Q_ERROR : Q_CMD6_DATA;
        Q_CMD6_DATA: if (d_done) begin fast <= 1'b1; init_done <= 1'b1; qs <= Q_READY; end
        Q_READY: if (cmd_valid) begin
          remaining <= cmd_count;
          blk_addr  <= cmd_addr;
          if (cmd_count == 0) qs <= Q_READY;
          else qs <= cmd_write ? Q_WR_CMD : Q_RD_CMD;
        end
        Q_RD_CMD: if (c_done) qs <= resp_bad ? Q_ERROR : Q_RD_DATA;
        Q_WR_CMD: if (c_done) qs <= resp_bad ? Q_ERROR : Q_WR_DATA;
        Q_RD_DATA, Q_WR_DATA: if (d_done) begin
          remaining <= remaining - 1'b1;
          if (remaining == 32'd1) qs <= Q_STOP;
        end
        Q_STOP:  if (c_done) qs <= c_timeout ? Q_ERROR : Q_READY;
        Q_ERROR: error <= 1'b1;
        default: qs <= Q_ERROR;
      endcase
    end
  end

endmodule
