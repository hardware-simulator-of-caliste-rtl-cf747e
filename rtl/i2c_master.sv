// i2c_master: write-only I2C bus master for the digital potentiometers.
//
// One transaction writes three bytes: the 7-bit device address with the write
// bit, then two data bytes, each followed by an acknowledge slot. A pulse on
// start (while busy is low) launches it; done pulses at the end and nack
// reports a missing acknowledge in any slot. SCL is driven push-pull (the only
// master, and the targets do not stretch the clock); SDA is open drain:
// sda_oe = 1 pulls the line low, sda_i reads the line.
// Each bit takes four phases of DIV clock cycles; with the default DIV = 31 at
// 50 MHz, SCL runs at about 400 kHz. The bus speed and the transaction
// format are this design's choices; the simulator's description only
// says that the rheostats are set over I2C.
module i2c_master #(
  parameter int unsigned DIV = 31
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [6:0] dev_addr,
  input  logic [7:0] byte1,
  input  logic [7:0] byte2,
  output logic       busy,
  output logic       done,
  output logic       nack,
  output logic       scl,
  output logic       sda_oe,
  input  logic       sda_i
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_BITS, S_STOP} state_e;
  state_e      st;
  logic [15:0] tick;
  logic [1:0]  ph;
  logic [4:0]  bitn;      // 0..26
  logic [26:0] frame;     // data bits, with 1 (released) in the ack slots
  logic        step;

  assign step = (tick == 16'(DIV - 1));
  assign busy = (st != S_IDLE);

  // slot i is an acknowledge slot when i % 9 == 8
  function automatic logic is_ack(logic [4:0] i);
    return (i == 5'd8) || (i == 5'd17) || (i == 5'd26);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; tick <= '0; ph <= '0; bitn <= '0; frame <= '0;
      scl <= 1'b1; sda_oe <= 1'b0; done <= 1'b0; nack <= 1'b0;
    end else begin
      done <= 1'b0;
      tick <= (st == S_IDLE || step) ? '0 : tick + 1'b1;
      unique case (st)
        S_IDLE: begin
          scl <= 1'b1; sda_oe <= 1'b0;
          if (start) begin
            st    <= S_START; ph <= '0; nack <= 1'b0;
            frame <= {dev_addr, 1'b0, 1'b1, byte1, 1'b1, byte2, 1'b1};
          end
        end
        S_START: if (step) begin
          ph <= ph + 1'b1;
          case (ph)
            2'd0: sda_oe <= 1'b1;          // SDA falls while SCL high
            2'd1: scl    <= 1'b0;
            default: begin st <= S_BITS; ph <= '0; bitn <= '0; end
          endcase
        end
        S_BITS: if (step) begin
          ph <= ph + 1'b1;
          case (ph)
            2'd0: sda_oe <= ~frame[26];    // set data while SCL low
            2'd1: scl    <= 1'b1;
            2'd2: if (is_ack(bitn) && sda_i) nack <= 1'b1;
            2'd3: begin
              scl   <= 1'b0;
              frame <= {frame[25:0], 1'b1};
              bitn  <= bitn + 1'b1;
              if (bitn == 5'd26) begin st <= S_STOP; ph <= '0; end
            end
          endcase
        end
        S_STOP: if (step) begin
          ph <= ph + 1'b1;
          case (ph)
            2'd0: sda_oe <= 1'b1;
            2'd1: scl    <= 1'b1;
            2'd2: sda_oe <= 1'b0;          // SDA rises while SCL high
            2'd3: begin st <= S_IDLE; done <= 1'b1; end
          endcase
        end
      endcase
    end
  end
endmodule
