// i2c_pot_model: testbench model of a rheostat-mode digital potentiometer on
// I2C. It acknowledges its 7-bit address and two data bytes (an instruction
// byte with the shutdown flag in bit 5, then the wiper code), and on STOP
// updates wiper and shdn and counts the write. sda_oe = 1 pulls SDA low.
module i2c_pot_model #(
  parameter logic [6:0] ADDR = 7'h2C
) (
  input  logic scl,
  input  logic sda,
  output logic sda_oe,
  output logic [7:0] wiper,
  output logic shdn,
  output int   n_writes
);
  logic [7:0] sh;
  int         nbit, nbyte;
  logic       active, selected;
  logic [7:0] b [3];

  initial begin
    sda_oe = 0; wiper = 0; shdn = 1; n_writes = 0; active = 0; selected = 0; nbit = 0; nbyte = 0;
  end

  always @(negedge sda) if (scl) begin           // START
    active = 1; selected = 0; nbit = 0; nbyte = 0;
  end
  always @(posedge sda) if (scl && active) begin  // STOP
    active = 0;
    if (selected && nbyte == 3) begin
      shdn = b[1][5]; wiper = b[2]; n_writes++;
    end
  end
  always @(posedge scl) if (active) begin
    if (nbit < 8) sh = {sh[6:0], sda};
    nbit++;
  end
  always @(negedge scl) if (active) begin
    if (nbit == 8) begin
      if (nbyte < 3) b[nbyte] = sh;
      if (nbyte == 0) selected = (sh[7:1] == ADDR) && !sh[0];
      if (selected) sda_oe = 1;                   // acknowledge
      nbyte++;
    end else if (nbit == 9) begin
      sda_oe = 0; nbit = 0;
    end
  end
endmodule
