// sd_card_model: testbench model of an SDHC card on a 4-bit SD bus.
// It answers the commands the storage controller uses (CMD0, CMD8, CMD55,
// ACMD41, CMD2, CMD3, CMD7, ACMD6, CMD6, CMD18, CMD25, CMD12) with correctly
// framed responses and CRC7, streams 512-byte blocks with per-line CRC16 for
// reads, receives blocks with CRC16 check, CRC status token and busy for
// writes, and stops a multi-block transfer on CMD12. The card samples the
// bus and drives its outputs on rising edges of sd_clk. Unwritten bytes read
// as a pattern: byte(addr) = addr*7 + addr/512*13 + SEED (mod 256).
// Counters report protocol errors seen by the card.
module sd_card_model #(
  parameter logic [7:0] SEED = 8'h00,
  parameter int ACMD41_TRIES = 3
) (
  input  logic       sd_clk,
  input  logic       cmd_line,
  output logic       cmd_out,
  output logic       cmd_oe,
  input  logic [3:0] dat_line,
  output logic [3:0] dat_out,
  output logic       dat_oe
);
  logic [7:0] mem [longint];
  int n_cmd_crc_err = 0, n_dat_crc_err = 0, n_blocks_rd = 0, n_blocks_wr = 0, n_cmds = 0;
  int n_bad_seq = 0;
  bit wide = 0, hs = 0, selected = 0, ready = 0;
  int acmd41_count = 0;
  bit app = 0;
  bit rd_active = 0, wr_active = 0, stat_active = 0;
  longint rd_addr, wr_addr;

  initial begin cmd_out = 1; cmd_oe = 0; dat_out = 4'hF; dat_oe = 0; end

  function automatic logic [7:0] peek(input longint a);
    if (mem.exists(a)) return mem[a];
    return 8'(a * 7 + (a / 512) * 13) + SEED;
  endfunction

  function automatic logic [6:0] crc7(input logic [39:0] b);
    logic [6:0] c; logic fb;
    c = 0;
    for (int i = 39; i >= 0; i--) begin fb = c[6] ^ b[i]; c = {c[5:0], 1'b0}; if (fb) c ^= 7'h09; end
    return c;
  endfunction
  function automatic logic [15:0] crc16_upd(input logic [15:0] c, input logic b);
    logic fb;
    fb = c[15] ^ b; c = {c[14:0], 1'b0}; if (fb) c ^= 16'h1021;
    return c;
  endfunction

  task automatic send_resp48(input logic [5:0] idx, input logic [31:0] arg, input bit good_crc);
    logic [47:0] f;
    f = {2'b00, idx, arg, good_crc ? crc7({2'b00, idx, arg}) : 7'h7F, 1'b1};
    repeat (2) @(posedge sd_clk);
    for (int i = 47; i >= 0; i--) begin
      cmd_oe <= 1; cmd_out <= f[i];
      @(posedge sd_clk);
    end
    cmd_oe <= 0; cmd_out <= 1;
  endtask

  task automatic send_r2();
    logic [135:0] f;
    f = {2'b00, 6'h3F, 120'h0353_4453_4330_3847_8012_3456_7801_52, 7'h00, 1'b1};
    repeat (2) @(posedge sd_clk);
    for (int i = 135; i >= 0; i--) begin
      cmd_oe <= 1; cmd_out <= f[i];
      @(posedge sd_clk);
    end
    cmd_oe <= 0; cmd_out <= 1;
  endtask

  // busy on DAT0 after an R1b response
  task automatic busy(input int n);
    dat_oe <= 1; dat_out <= 4'hE;
    repeat (n) @(posedge sd_clk);
    dat_oe <= 0; dat_out <= 4'hF;
  endtask

  // one data block of nbytes, 4-bit bus, stops early when cont() is false
  task automatic send_block(input longint base, input int nbytes, input bit is_status, output bit aborted);
    logic [15:0] c [4];
    logic [3:0] n;
    aborted = 0;
    for (int l = 0; l < 4; l++) c[l] = 0;
    dat_oe <= 1; dat_out <= 4'h0;            // start bit
    @(posedge sd_clk);
    for (int i = 0; i < 2 * nbytes; i++) begin
      logic [7:0] b;
      if (!is_status && !rd_active) begin aborted = 1; break; end
      b = is_status ? 8'(i / 2 + 8'h80) : peek(base + i / 2);
      n = (i % 2 == 0) ? b[7:4] : b[3:0];
      for (int l = 0; l < 4; l++) c[l] = crc16_upd(c[l], n[l]);
      dat_out <= n;
      @(posedge sd_clk);
    end
    if (!aborted) begin
      for (int k = 15; k >= 0; k--) begin
        dat_out <= {c[3][k], c[2][k], c[1][k], c[0][k]};
        @(posedge sd_clk);
      end
      dat_out <= 4'hF;                       // end bit
      @(posedge sd_clk);
    end
    dat_oe <= 0; dat_out <= 4'hF;
  endtask

  // ---------------------------------------------------------- command loop
  initial begin
    logic [47:0] f;
    forever begin
      @(posedge sd_clk);
      if (cmd_line == 0 && !cmd_oe) begin
        f = 0;
        for (int i = 0; i < 47; i++) begin
          @(posedge sd_clk);
          f = {f[46:0], cmd_line};
        end
        // f[46:0] holds bits 46..0 of the frame
        n_cmds++;
        if (crc7({1'b0, f[46:8]}) != f[7:1] || f[0] != 1 || f[46] != 1) n_cmd_crc_err++;
        else handle(f[45:40], f[39:8]);
      end
    end
  end

  task automatic handle(input logic [5:0] idx, input logic [31:0] arg);
    bit was_app;
    was_app = app; app = 0;
    if (was_app && idx == 41) begin
      acmd41_count++;
      ready = (acmd41_count >= ACMD41_TRIES);
      fork send_resp48(6'h3F, {ready, 1'b1, 6'h00, 24'hFF8000}, 0); join_none
      return;
    end
    if (was_app && idx == 6) begin
      wide = (arg[1:0] == 2'b10);
      fork send_resp48(6'd6, 32'h0000_0920, 1); join_none
      return;
    end
    case (idx)
      0:  begin selected = 0; ready = 0; acmd41_count = 0; wide = 0; hs = 0; end
      8:  fork send_resp48(6'd8, arg, 1); join_none
      55: begin app = 1; fork send_resp48(6'd55, 32'h0000_0120, 1); join_none end
      2:  fork send_r2(); join_none
      3:  fork send_resp48(6'd3, 32'h1234_0500, 1); join_none
      7:  begin
            selected = (arg[31:16] == 16'h1234);
            if (!selected) n_bad_seq++;
            fork begin send_resp48(6'd7, 32'h0000_0700, 1); busy(6); end join_none
          end
      6:  begin
            hs = 1;
            if (!wide || !selected) n_bad_seq++;
            fork begin bit ab; send_resp48(6'd6, 32'h0000_0900, 1); repeat (4) @(posedge sd_clk);
                       send_block(0, 64, 1, ab); end join_none
          end
      18: begin
            if (!wide || !hs) n_bad_seq++;
            rd_addr = longint'(arg) * 512; rd_active = 1;
            fork begin send_resp48(6'd18, 32'h0000_0900, 1); read_stream(); end join_none
          end
      25: begin
            if (!wide || !hs) n_bad_seq++;
            wr_addr = longint'(arg) * 512; wr_active = 1;
            fork begin send_resp48(6'd25, 32'h0000_0900, 1); write_stream(); end join_none
          end
      12: begin
            rd_active = 0; wr_active = 0;
            fork begin send_resp48(6'd12, 32'h0000_0900, 1); busy(4); end join_none
          end
      default: n_bad_seq++;
    endcase
  endtask

  task automatic read_stream();
    bit ab;
    while (rd_active) begin
      repeat (8) @(posedge sd_clk);
      if (!rd_active) break;
      send_block(rd_addr, 512, 0, ab);
      if (ab) break;
      n_blocks_rd++;
      rd_addr += 512;
    end
  endtask

  task automatic write_stream();
    while (wr_active) begin
      @(posedge sd_clk);
      if (wr_active && dat_line[0] == 0) begin
        logic [15:0] c [4];
        logic [15:0] rc [4];
        logic [7:0] buf_b [512];
        logic [3:0] hi;
        bit ok;
        for (int l = 0; l < 4; l++) begin c[l] = 0; rc[l] = 0; end
        for (int i = 0; i < 1024; i++) begin
          @(posedge sd_clk);
          for (int l = 0; l < 4; l++) c[l] = crc16_upd(c[l], dat_line[l]);
          if (i % 2 == 0) hi = dat_line; else buf_b[i / 2] = {hi, dat_line};
        end
        for (int k = 0; k < 16; k++) begin
          @(posedge sd_clk);
          for (int l = 0; l < 4; l++) rc[l] = {rc[l][14:0], dat_line[l]};
        end
        @(posedge sd_clk);               // end bit
        ok = (dat_line == 4'hF);
        for (int l = 0; l < 4; l++) if (rc[l] != c[l]) ok = 0;
        if (!ok) n_dat_crc_err++;
        else begin
          for (int i = 0; i < 512; i++) mem[wr_addr + i] = buf_b[i];
          n_blocks_wr++;
          wr_addr += 512;
        end
        repeat (2) @(posedge sd_clk);
        // CRC status token: start, 3 status bits, end
        dat_oe <= 1; dat_out <= 4'hE;
        @(posedge sd_clk); dat_out <= {3'b111, 1'b0};
        @(posedge sd_clk); dat_out <= {3'b111, ok};
        @(posedge sd_clk); dat_out <= {3'b111, !ok};
        @(posedge sd_clk); dat_out <= 4'hF;
        @(posedge sd_clk);
        busy(10);
      end
    end
  endtask
endmodule
