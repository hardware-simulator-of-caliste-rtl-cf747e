// tb_temp_sensor_sim: self-checking test of one auxiliary temperature
// sensor simulator driving three potentiometer models (1 MOhm, 100 kOhm,
// 10 kOhm parts at consecutive I2C addresses). Each new setting must reach
// all three parts with the right codes and shutdown flags; a setting that
// arrives while the bus is busy must be sent afterwards, the newest one
// winning.
module tb_temp_sensor_sim;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  logic set_valid = 0, busy, nack_seen, scl, m_oe, sda;
  logic [26:0] set_data = 0;
  logic [31:0] n_updates;
  logic [2:0] p_oe, shdn;
  logic [7:0] wiper [3];
  int nw [3];
  int checks = 0, failures = 0;

  assign sda = !(m_oe || (|p_oe));
  temp_sensor_sim #(.POT_ADDR0(7'h2C), .I2C_DIV(4)) dut (.clk, .rst, .set_valid, .set_data, .busy,
    .nack_seen, .n_updates, .scl, .sda_oe(m_oe), .sda_i(sda));
  for (genvar k = 0; k < 3; k++) begin : g_pot
    i2c_pot_model #(.ADDR(7'h2C + 7'(k))) pot (.scl, .sda, .sda_oe(p_oe[k]), .wiper(wiper[k]), .shdn(shdn[k]), .n_writes(nw[k]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic apply(input logic [26:0] s);
    @(posedge clk); set_valid <= 1; set_data <= s;
    @(posedge clk); set_valid <= 0;
  endtask
  function automatic bit pots_match(input logic [26:0] s);
    return wiper[0] == s[23:16] && wiper[1] == s[15:8] && wiper[2] == s[7:0] &&
           shdn[0] == s[26] && shdn[1] == s[25] && shdn[2] == s[24];
  endfunction

  initial begin
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [26:0] s, s2, s3;
    #45 rst = 0;
    for (int i = 0; i < 6; i++) begin
      s = 27'($urandom);
      apply(s);
      #20 wait (!busy);
      check(pots_match(s), $sformatf("setting %0d applied", i));
    end
    // three settings while busy: the first is sent, then only the newest
    s = 27'($urandom); s2 = 27'($urandom); s3 = 27'($urandom);
    apply(s); #2000 apply(s2); #2000 apply(s3);
    #20 wait (!busy);
    check(pots_match(s3), "newest waiting setting applied last");
    check(n_updates == 8, $sformatf("update count %0d", n_updates));
    check(nw[0] == 8 && nw[1] == 8 && nw[2] == 8, "every part written per update");
    check(!nack_seen, "all writes acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
