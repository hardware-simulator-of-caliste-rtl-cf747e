// tb_temp_lut: self-checking test of the temperature look-up table: after
// reset every entry reads as all-shutdown; written entries read back with
// a latency of exactly one cycle, carrying the sensor index along.
module tb_temp_lut;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  logic we = 0, in_valid = 0, out_valid;
  logic [7:0] waddr = 0, in_temp = 0;
  logic [26:0] wdata = 0, out_set;
  logic [2:0] in_sel = 0, out_sel;
  logic [26:0] ref_mem [256];
  int checks = 0, failures = 0;

  temp_lut dut (.clk, .rst, .we, .waddr, .wdata, .in_valid, .in_sel, .in_temp, .out_valid, .out_sel, .out_set);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #45 rst = 0;
    repeat (260) @(posedge clk);
    for (int i = 0; i < 256; i++) ref_mem[i] = {3'b111, 24'h0};
    for (int i = 0; i < 100; i++) begin
      @(posedge clk); we <= 1; waddr <= 8'($urandom); wdata <= 27'($urandom);
      #1 ref_mem[waddr] = wdata;
    end
    @(posedge clk); we <= 0;
    for (int i = 0; i < 200; i++) begin
      logic [7:0] t; logic [2:0] s;
      t = (i < 4) ? 8'(i * 85) : 8'($urandom); s = 3'($urandom);
      @(posedge clk); in_valid <= 1; in_temp <= t; in_sel <= s;
      @(posedge clk); in_valid <= 0;
      #1 check(out_valid && out_sel == s && out_set == ref_mem[t], $sformatf("lookup %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
