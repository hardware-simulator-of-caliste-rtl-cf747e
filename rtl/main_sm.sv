// main_sm: command interpreter of the simulator controller.
//
// Bytes from the workstation arrive through the USB receive FIFO. The first
// byte of a command is an opcode; arguments follow, big-endian:
//   0x01 WRITE_MEM  addr[4] count[2], then count*1024 data bytes -> storage
//   0x02 READ_MEM   addr[4] count[2]; count*1024 bytes are sent back
//   0x03 START      addr[4] count[4]; replays the event sequence stored in
//                   count blocks from addr
//   0x04 STOP       ends a running simulation
//   0x05 STATUS     sends 5 bytes: flags, released-event count[4]
//                   flags = {3'b0, storage_error, queue_empty, running,
//                            sim_active, storage_busy}
//   0x06 LUT_WRITE  index[1] value[4]; loads one entry of the temperature
//                   look-up table (27 low bits used)
// Each command except STATUS and READ_MEM is answered with one byte,
// opcode | 0x80; an unknown opcode is answered with 0xFF.
// A simulation runs beside the command parser so that STOP and STATUS work
// while it runs: storage blocks are read in order, bytes are packed into
// 32-bit event words (first byte most significant) and queued in the event
// distributor; the distributor's clock starts once PREFILL words are queued
// or the whole sequence is read. The simulation ends by itself when the
// sequence is read and the queue has drained. Memory commands wait until no
// simulation is active. The command set (start/stop, memory read/write) is
// the one the simulator's description lists; the byte encoding, the
// acknowledgements, the status layout and the prefill rule are this design's
// own. After STOP, bytes still coming from storage are discarded until the
// storage controller has finished the aborted read.
// During WRITE_MEM the storage write data is the receive FIFO head itself
// (st_wdata = rx_data); only its valid/ready handshake is logic.
module main_sm
  import caliste_pkg::*;
#(
  parameter int unsigned QAW     = 10,
  parameter int unsigned PREFILL = 512
) (
  input  logic              clk,
  input  logic              rst,
  // USB receive FIFO (first word fall through)
  input  logic [7:0]        rx_data,
  input  logic              rx_empty,
  output logic              rx_re,
  // USB transmit FIFO
  output logic              tx_we,
  output logic [7:0]        tx_data,
  input  logic              tx_full,
  // memory storage
  output logic              st_cmd_valid,
  input  logic              st_cmd_ready,
  output logic              st_cmd_write,
  output logic [31:0]       st_cmd_addr,
  output logic [31:0]       st_cmd_count,
  output logic              st_abort,
  output logic              st_wvalid,
  input  logic              st_wready,
  output logic [7:0]        st_wdata,
  input  logic              st_rvalid,
  output logic              st_rready,
  input  logic [7:0]        st_rdata,
  input  logic              st_busy,
  input  logic              st_error,
  // event distributor
  output logic              dist_clear,
  output logic              dist_run,
  output logic              dist_valid,
  output logic [EVT_W-1:0]  dist_word,
  input  logic              dist_full,
  input  logic [QAW:0]      dist_count,
  input  logic [31:0]       dist_released,
  // temperature look-up table
  output logic              lut_we,
  output logic [7:0]        lut_addr,
  output logic [26:0]       lut_wdata
);
  typedef enum logic [3:0] {
    M_OP, M_ARGS, M_EXEC, M_MEM_CMD, M_WR_DATA, M_RD_DATA, M_MEM_WAIT, M_ACK, M_STATUS
  } mstate_e;
  typedef enum logic [1:0] {S_IDLE, S_CMD, S_FILL, S_RUN} sstate_e;

  mstate_e    ms;
  sstate_e    ss;
  opcode_e    op;
  logic [3:0] nargs;
  logic [63:0] args;
  logic [31:0] bytes_left;
  logic [7:0]  ack_byte;
  logic [39:0] status_sr;
  logic [2:0]  status_n;
  logic        sim_active, sim_cmd_req, stop_req;
  logic [23:0] wacc;
  logic [1:0]  wcnt;

  function automatic logic [3:0] arg_bytes(logic [7:0] o);
    case (o)
      OP_WRITE_MEM, OP_READ_MEM: return 4'd6;
      OP_START:                  return 4'd8;
      OP_LUT_WRITE:              return 4'd5;
      default:                   return 4'd0;
    endcase
  endfunction

  // -------- storage request arbitration --------
  // The parser's memory commands and the simulation's read share the port.
  logic        p_cmd_valid;
  logic        p_write;
  assign st_cmd_valid = p_cmd_valid | sim_cmd_req;
  assign st_cmd_write = sim_cmd_req ? 1'b0 : p_write;
  assign st_cmd_addr  = sim_cmd_req ? args[63:32] : args[47:16];
  assign st_cmd_count = sim_cmd_req ? args[31:0]  : {16'h0, args[15:0]};

  // -------- data paths --------
  assign st_wvalid = (ms == M_WR_DATA) && !rx_empty;
  assign st_wdata  = rx_data;
  assign st_rready = (ms == M_RD_DATA) ? !tx_full
                   : (ss == S_FILL || ss == S_RUN) ? !(wcnt == 2'd3 && dist_full)
                   : (ms != M_MEM_CMD);   // drain after STOP

  always_comb begin
    rx_re = 1'b0;
    tx_we = 1'b0;
    tx_data = 8'h00;
    unique case (ms)
      M_OP, M_ARGS: rx_re = !rx_empty;
      M_WR_DATA:    rx_re = !rx_empty && st_wready;
      M_RD_DATA:    begin tx_we = st_rvalid && !tx_full; tx_data = st_rdata; end
      M_ACK:        begin tx_we = !tx_full; tx_data = ack_byte; end
      M_STATUS:     begin tx_we = !tx_full; tx_data = status_sr[39:32]; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ms <= M_OP; op <= OP_STATUS; nargs <= '0; args <= '0; bytes_left <= '0;
      ack_byte <= '0; status_sr <= '0; status_n <= '0; p_cmd_valid <= 1'b0; p_write <= 1'b0;
      lut_we <= 1'b0; lut_addr <= '0; lut_wdata <= '0; stop_req <= 1'b0;
    end else begin
      lut_we   <= 1'b0;
      stop_req <= 1'b0;
      unique case (ms)
        M_OP: if (!rx_empty) begin
          op    <= opcode_e'(rx_data);
          nargs <= arg_bytes(rx_data);
          ms    <= (arg_bytes(rx_data) == 0) ? M_EXEC : M_ARGS;
        end
        M_ARGS: if (!rx_empty) begin
          args  <= {args[55:0], rx_data};
          nargs <= nargs - 1'b1;
          if (nargs == 4'd1) ms <= M_EXEC;
        end
        M_EXEC: begin
          unique case (op)
            OP_WRITE_MEM, OP_READ_MEM: if (!sim_active && !st_busy) begin
              p_cmd_valid <= 1'b1; p_write <= (op == OP_WRITE_MEM);
              bytes_left  <= {6'b0, args[15:0], 10'b0};   // count * 1024
              ms <= M_MEM_CMD;
            end
            OP_START: if (!sim_active && !st_busy) begin
              ack_byte <= {1'b1, op[6:0]}; ms <= M_ACK;
            end
            OP_STOP: begin
              stop_req <= 1'b1; ack_byte <= {1'b1, op[6:0]}; ms <= M_ACK;
            end
            OP_STATUS: begin
              status_sr <= {3'b000, st_error, (dist_count == '0), dist_run, sim_active, st_busy,
                            dist_released};
              status_n  <= 3'd5; ms <= M_STATUS;
            end
            OP_LUT_WRITE: begin
              lut_we <= 1'b1; lut_addr <= args[39:32]; lut_wdata <= args[26:0];
              ack_byte <= {1'b1, op[6:0]}; ms <= M_ACK;
            end
            default: begin ack_byte <= 8'hFF; ms <= M_ACK; end
          endcase
        end
        M_MEM_CMD: if (st_cmd_ready && !sim_cmd_req) begin
          p_cmd_valid <= 1'b0;
          ms <= (bytes_left == 0) ? M_MEM_WAIT : (p_write ? M_WR_DATA : M_RD_DATA);
        end
        M_WR_DATA: if (st_wvalid && st_wready) begin
          bytes_left <= bytes_left - 1'b1;
          if (bytes_left == 32'd1) ms <= M_MEM_WAIT;
        end
        M_RD_DATA: if (st_rvalid && st_rready) begin
          bytes_left <= bytes_left - 1'b1;
          if (bytes_left == 32'd1) ms <= M_MEM_WAIT;
        end
        M_MEM_WAIT: if (!st_busy) begin
          if (op == OP_WRITE_MEM) begin ack_byte <= {1'b1, op[6:0]}; ms <= M_ACK; end
          else ms <= M_OP;
        end
        M_ACK: if (!tx_full) ms <= M_OP;
        M_STATUS: if (!tx_full) begin
          status_sr <= {status_sr[31:0], 8'h00};
          status_n  <= status_n - 1'b1;
          if (status_n == 3'd1) ms <= M_OP;
        end
        default: ms <= M_OP;
      endcase
    end
  end

  // -------- simulation sequencer --------
  logic start_now;
  assign start_now = (ms == M_EXEC) && (op == OP_START) && !sim_active && !st_busy;
  assign sim_active = (ss != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      ss <= S_IDLE; sim_cmd_req <= 1'b0; dist_clear <= 1'b0; dist_run <= 1'b0;
      dist_valid <= 1'b0; dist_word <= '0; wacc <= '0; wcnt <= '0; st_abort <= 1'b0;
    end else begin
      dist_clear <= 1'b0;
      dist_valid <= 1'b0;
      if (!st_busy) st_abort <= 1'b0;
      unique case (ss)
        S_IDLE: if (start_now) begin
          dist_clear <= 1'b1; dist_run <= 1'b0; wcnt <= '0;
          sim_cmd_req <= 1'b1; ss <= S_CMD;
        end
        S_CMD: if (st_cmd_ready) begin
          sim_cmd_req <= 1'b0; ss <= S_FILL;
        end
        S_FILL: if (32'(dist_count) >= PREFILL || !st_busy) begin
          dist_run <= 1'b1; ss <= S_RUN;
        end
        S_RUN: if (!st_busy && dist_count == '0 && !dist_valid) begin
          dist_run <= 1'b0; ss <= S_IDLE;
        end
        default: ss <= S_IDLE;
      endcase
      if ((ss == S_FILL || ss == S_RUN) && st_rvalid && st_rready) begin
        wacc <= {wacc[15:0], st_rdata};
        wcnt <= wcnt + 1'b1;
        if (wcnt == 2'd3) begin
          dist_valid <= 1'b1;
          dist_word  <= {wacc, st_rdata};
        end
      end
      if (stop_req && sim_active) begin
        ss <= S_IDLE; dist_run <= 1'b0; sim_cmd_req <= 1'b0;
        dist_clear <= 1'b1;
        if (st_busy || ss == S_CMD) st_abort <= 1'b1;
      end
    end
  end

endmodule
