// event_distributor: releases the detector event sequence in real time.
//
// Event words read from memory storage are queued in a fast FIFO. While run
// is high a time counter advances once per clock (one 20 ns simulation step
// at the 50 MHz system clock). A comparator checks the arrival time of the
// event at the head of the queue against the counter; when they are equal the
// event is released and the next one is fetched, so the fastest rate is one
// event per step, the limit of the sequence format. Released events are routed
// by kind:
//   detector, ASIC temperature, SEU -> quarter det[4:3] (q_valid one-hot)
//   test pulse                       -> every quarter
//   auxiliary temperature            -> temperature sensor simulator det[2:0]
//   dummy                            -> nothing (used to bridge long gaps)
// Events for a quarter whose power input is low are dropped and counted.
// The counter, comparator, queue and routing follow the simulator's
// description. The 8-bit modular time field and the one-cycle-per-step clock
// are this design's own choices; with them, a dummy event must be placed at
// least every 255 steps.
// Timing: a released event appears on the outputs one cycle after the
// counter matches. clear empties the queue and zeroes the counter.
module event_distributor
  import caliste_pkg::*;
#(
  parameter int unsigned QAW = 10          // queue depth 2**QAW events
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  input  logic                 run,
  // from memory storage
  input  logic                 in_valid,
  input  logic [EVT_W-1:0]     in_word,
  output logic                 in_full,
  output logic [QAW:0]         q_count,
  // to the detector quarters
  input  logic [N_QUARTER-1:0] q_power,
  output logic [N_QUARTER-1:0] q_valid,
  output event_t               q_evt,
  // to the temperature sensor simulators
  output logic                 ts_valid,
  output logic [2:0]           ts_sel,
  output logic [7:0]           ts_temp,
  // status
  output logic [TIME_W-1:0]    now,
  output logic [31:0]          n_released,
  output logic [31:0]          n_dropped
);
  logic   q_empty, pop;
  event_t head;

  sync_fifo #(.DW(EVT_W), .AW(QAW)) u_queue (
    .clk, .rst(rst | clear),
    .wr_en(in_valid), .wdata(in_word), .full(in_full),
    .rd_en(pop), .rdata(head), .empty(q_empty), .count(q_count)
  );

  assign pop = run && !q_empty && (head.t == now);

  logic [N_QUARTER-1:0] target;
  always_comb begin
    target = '0;
    unique case (head.kind)
      EVT_DETECTOR, EVT_ASIC_T, EVT_SEU: target[head.det[4:3]] = 1'b1;
      EVT_TEST:                          target = '1;
      default:                           target = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      now <= '0; q_valid <= '0; q_evt <= '0; ts_valid <= 1'b0; ts_sel <= '0; ts_temp <= '0;
      n_released <= '0; n_dropped <= '0;
    end else begin
      q_valid  <= '0;
      ts_valid <= 1'b0;
      if (run) now <= now + 1'b1;
      if (pop) begin
        n_released <= n_released + 1'b1;
        q_evt      <= head;
        q_valid    <= target & q_power;
        if ((target & ~q_power) != '0) n_dropped <= n_dropped + 1'b1;
        if (head.kind == EVT_AUX_T) begin
          ts_valid <= 1'b1;
          ts_sel   <= head.det[2:0];
          ts_temp  <= head.amp[7:0];
        end
      end
    end
  end

endmodule
