// tb_i2c_master: self-checking test of the I2C write master against a
// potentiometer model: random writes to the model's address must update it,
// a write to an absent address must report a missing acknowledge, and one
// transaction must take the expected number of clock cycles
// (3 + 27*4 + 4 phases of DIV cycles, plus start-up).
module tb_i2c_master;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  logic start = 0, busy, done, nack, scl, m_oe, p_oe, sda, shdn;
  logic [6:0] dev_addr = 0;
  logic [7:0] byte1 = 0, byte2 = 0, wiper;
  int n_writes;
  int checks = 0, failures = 0;
  localparam int DIV = 5;

  assign sda = !(m_oe || p_oe);
  i2c_master #(.DIV(DIV)) dut (.clk, .rst, .start, .dev_addr, .byte1, .byte2, .busy, .done, .nack,
    .scl, .sda_oe(m_oe), .sda_i(sda));
  i2c_pot_model #(.ADDR(7'h2D)) pot (.scl, .sda, .sda_oe(p_oe), .wiper, .shdn, .n_writes);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(input logic [6:0] a, input logic [7:0] b1, input logic [7:0] b2, output int cyc);
    @(posedge clk); start <= 1; dev_addr <= a; byte1 <= b1; byte2 <= b2;
    @(posedge clk); start <= 0;
    cyc = 1;
    while (!done) begin @(posedge clk); cyc++; end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    logic [7:0] w; logic s;
    #45 rst = 0;
    for (int i = 0; i < 10; i++) begin
      w = 8'($urandom); s = 1'($urandom);
      write(7'h2D, {2'b00, s, 5'b0}, w, cyc);
      check(!nack && pot.wiper == w && pot.shdn == s, $sformatf("write %0d wiper %h exp %h", i, pot.wiper, w));
      check(cyc >= (3 + 27*4 + 3) * DIV && cyc <= (3 + 27*4 + 4) * DIV + 4, $sformatf("cycles %0d", cyc));
    end
    write(7'h10, 8'h00, 8'h55, cyc);
    check(nack, "missing acknowledge detected");
    check(n_writes == 10, "write count");
    check(!busy && scl && sda, "bus idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
