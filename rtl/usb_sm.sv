// usb_sm: state machine for the USB 2.0 interface chip's synchronous FIFO bus.
//
// It runs on the 60 MHz clock that the USB chip supplies and moves bytes
// between the chip and two clock-crossing FIFOs: received bytes go into the
// receive FIFO, bytes waiting in the transmit FIFO go out to the host. The
// bus is the common synchronous 245-style FIFO interface:
//   rxf_n low : the chip holds received data;  oe_n turns the data bus
//               around, then each clock with rd_n and rxf_n low moves a byte
//   txe_n low : the chip can accept data; each clock with wr_n and txe_n low
//               moves data_o into the chip
// rd_n and wr_n are decoded from the state and the FIFO flags in the same
// cycle, so no byte is lost when a FIFO fills or drains. The data buses
// are plain wires (data_o from the transmit FIFO head, rx_data from data_i);
// only the strobes carry logic. Reading and writing
// take turns when both are pending. The chip's bus protocol is this design's
// assumption; the simulator's description names only a USB interface chip
// and a dedicated state machine at 60 MHz.
module usb_sm (
  input  logic       clk,        // 60 MHz from the USB chip
  input  logic       rst,
  // chip side
  input  logic [7:0] data_i,
  output logic [7:0] data_o,
  output logic       data_oe,
  input  logic       rxf_n,
  input  logic       txe_n,
  output logic       rd_n,
  output logic       wr_n,
  output logic       oe_n,
  // receive FIFO (write side)
  output logic       rx_we,
  output logic [7:0] rx_data,
  input  logic       rx_full,
  // transmit FIFO (read side, first word fall through)
  output logic       tx_re,
  input  logic [7:0] tx_data,
  input  logic       tx_empty
);
  typedef enum logic [1:0] {U_IDLE, U_OE, U_RD, U_WR} state_e;
  state_e st;
  logic   prefer_tx;

  assign oe_n    = !(st == U_OE || st == U_RD);
  assign rd_n    = !(st == U_RD && !rx_full);
  assign wr_n    = !(st == U_WR && !tx_empty && !txe_n);
  assign data_oe = (st == U_WR);
  assign data_o  = tx_data;
  assign rx_we   = !rd_n && !rxf_n;
  assign rx_data = data_i;
  assign tx_re   = !wr_n;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= U_IDLE; prefer_tx <= 1'b0;
    end else begin
      unique case (st)
        U_IDLE: begin
          if (!txe_n && !tx_empty && (prefer_tx || rxf_n || rx_full)) st <= U_WR;
          else if (!rxf_n && !rx_full) st <= U_OE;
        end
        U_OE: st <= U_RD;
        U_RD: if (rxf_n || rx_full) begin st <= U_IDLE; prefer_tx <= 1'b1; end
        U_WR: if (txe_n || tx_empty) begin st <= U_IDLE; prefer_tx <= 1'b0; end
        default: st <= U_IDLE;
      endcase
    end
  end
endmodule
