// usb_chip_model: testbench model of a USB interface chip in synchronous
// FIFO mode. Bytes queued with host_send() are offered to the FPGA (rxf_n
// low, data driven while oe_n is low, one byte per clock with rd_n low);
// bytes the FPGA writes (wr_n low while txe_n low) collect in got[].
// THROTTLE sets the percentage of clocks on which the chip withholds data or
// refuses writes, to exercise the handshakes.
module usb_chip_model #(
  parameter int THROTTLE = 20
) (
  input  logic       clk,
  output logic [7:0] data_to_fpga,
  input  logic [7:0] data_from_fpga,
  input  logic       rxf_dummy,
  output logic       rxf_n,
  output logic       txe_n,
  input  logic       rd_n,
  input  logic       wr_n,
  input  logic       oe_n
);
  logic [7:0] to_fpga [$];
  logic [7:0] got [$];
  int         n_oe_viol = 0;
  initial begin rxf_n = 1; txe_n = 1; data_to_fpga = 0; end

  function automatic void host_send(input logic [7:0] b);
    to_fpga.push_back(b);
  endfunction

  always @(posedge clk) begin
    if (!rd_n && !rxf_n) begin
      if (oe_n) n_oe_viol++;
      void'(to_fpga.pop_front());
    end
    if (!wr_n && !txe_n) got.push_back(data_from_fpga);
    rxf_n <= (to_fpga.size() == 0) || ($urandom_range(0, 99) < THROTTLE);
    data_to_fpga <= (to_fpga.size() > 0) ? to_fpga[0] : 8'h00;
    txe_n <= ($urandom_range(0, 99) < THROTTLE);
  end
endmodule
