// tb_event_distributor: self-checking test of the event distributor.
// A random sequence of all six event kinds, with gaps of 1 to 600 steps
// bridged by dummy events where needed and a burst of events on consecutive
// steps, is queued and replayed. Every released event must appear exactly
// one cycle after the time counter reaches its arrival time, on the right
// outputs (quarter one-hot, all quarters for a test pulse, the temperature
// sensor port for auxiliary temperature events); events for the unpowered
// quarter must be dropped and counted; dummy events must produce nothing.
module tb_event_distributor;
  import caliste_pkg::*;
  logic clk = 0, rst = 1, clear = 0, run = 0;
  always #10 clk = ~clk;
  logic in_valid = 0, in_full;
  logic [31:0] in_word = 0;
  logic [10:0] q_count;
  logic [3:0]  q_power = 4'b1011, q_valid;
  event_t      q_evt;
  logic        ts_valid;
  logic [2:0]  ts_sel;
  logic [7:0]  ts_temp, now;
  logic [31:0] n_released, n_dropped;
  int checks = 0, failures = 0;

  event_distributor dut (.clk, .rst, .clear, .run, .in_valid, .in_word, .in_full, .q_count,
    .q_power, .q_valid, .q_evt, .ts_valid, .ts_sel, .ts_temp, .now, .n_released, .n_dropped);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  event_t seq [$];
  int     abs_t [$];
  int     exp_drop = 0, n_real = 0;

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // build the sequence
  initial begin
    int t, gap;
    event_t e;
    t = 0;
    for (int i = 0; i < 400; i++) begin
      gap = (i >= 100 && i < 140) ? 1 : $urandom_range(1, 600);
      if (i == 0) gap = 0;
      while (gap > 200) begin       // bridge long gaps with dummy events
        t += 200; gap -= 200;
        e = '0; e.kind = EVT_DUMMY; e.t = 8'(t);
        seq.push_back(e); abs_t.push_back(t);
      end
      t += gap;
      e = '0;
      case ($urandom_range(0, 9))
        0: e.kind = EVT_TEST;
        1: e.kind = EVT_AUX_T;
        2: e.kind = EVT_SEU;
        3: e.kind = EVT_ASIC_T;
        default: e.kind = EVT_DETECTOR;
      endcase
      e.t = 8'(t); e.det = 5'($urandom); e.pixel = 4'($urandom_range(0, 12)); e.amp = 12'($urandom);
      seq.push_back(e); abs_t.push_back(t);
      n_real++;
      if (e.kind inside {EVT_DETECTOR, EVT_ASIC_T, EVT_SEU} && e.det[4:3] == 2'd2) exp_drop++;
      if (e.kind == EVT_TEST) exp_drop++;
    end
  end

  // feeder: keeps the queue topped up
  initial begin
    int i;
    i = 0;
    #45 rst = 0;
    @(posedge clk);
    while (i < seq.size()) begin
      @(posedge clk);
      if (!in_full) begin in_valid <= 1; in_word <= seq[i]; i++; end
      else in_valid <= 0;
      if (i == 300) run <= 1;
    end
    @(posedge clk) in_valid <= 0;
  end

  // checker
  int k = 0, idx = 0, n_q = 0, n_ts = 0, n_test = 0;
  always @(posedge clk) begin
    if (run) k <= k + 1;
    while (idx < seq.size() && seq[idx].kind == EVT_DUMMY) idx++;
    if (!rst && (q_valid != 0 || ts_valid)) begin
      event_t e;
      logic [3:0] expq;
      e = seq[idx];
      checks++;
      if (k != abs_t[idx] + 1) begin
        failures++; $display("FAIL: event %0d released at %0d expected %0d", idx, k, abs_t[idx] + 1);
      end
      expq = 0;
      if (e.kind inside {EVT_DETECTOR, EVT_ASIC_T, EVT_SEU}) expq[e.det[4:3]] = 1;
      if (e.kind == EVT_TEST) begin expq = 4'hF; n_test++; end
      expq &= q_power;
      checks++;
      if (q_valid != expq || q_evt != e || ts_valid != (e.kind == EVT_AUX_T) ||
          (ts_valid && (ts_sel != e.det[2:0] || ts_temp != e.amp[7:0]))) begin
        failures++; $display("FAIL: event %0d routing q=%b exp %b", idx, q_valid, expq);
      end
      if (ts_valid) n_ts++; else n_q++;
      idx++;
    end
  end

  // events routed only to the unpowered quarter give no output; skip them
  always @(negedge clk) begin
    while (idx < seq.size() && seq[idx].kind != EVT_DUMMY && seq[idx].kind != EVT_TEST &&
           seq[idx].kind != EVT_AUX_T && seq[idx].det[4:3] == 2'd2 && k > abs_t[idx] + 1) idx++;
  end

  initial begin
    wait (!rst);
    wait (run);
    wait (idx >= seq.size() || k > abs_t[abs_t.size()-1] + 20);
    repeat (5) @(posedge clk);
    check(idx == seq.size(), $sformatf("all events seen (%0d of %0d)", idx, seq.size()));
    check(n_released == 32'(seq.size()), $sformatf("released count %0d", n_released));
    check(n_dropped == 32'(exp_drop), $sformatf("dropped %0d expected %0d", n_dropped, exp_drop));
    check(n_ts > 0 && n_test > 0, "temperature and test-pulse events routed");
    // clear empties the queue and stops nothing else
    clear <= 1; @(posedge clk); clear <= 0; @(posedge clk);
    check(q_count == 0 && now == 0 && n_released == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
