// storage_model: testbench model of the memory storage request port
// (1024-byte logical blocks). Writes fill a byte array, reads stream bytes
// out with random gaps; abort_req ends a read after the current block.
module storage_model (
  input  logic        clk,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_write,
  input  logic [31:0] cmd_addr,
  input  logic [31:0] cmd_count,
  input  logic        abort_req,
  input  logic        wvalid,
  output logic        wready,
  input  logic [7:0]  wdata,
  output logic        rvalid,
  input  logic        rready,
  output logic [7:0]  rdata,
  output logic        busy
);
  logic [7:0] mem [longint];
  longint ptr, endp;
  bit wr, active;
  int n_cmds = 0;
  initial begin cmd_ready = 1; wready = 0; rvalid = 0; rdata = 0; busy = 0; active = 0; end

  function automatic logic [7:0] peek(input longint a);
    return mem.exists(a) ? mem[a] : 8'(a ^ (a >> 8));
  endfunction

  always @(posedge clk) begin
    if (cmd_valid && cmd_ready) begin
      n_cmds++;
      ptr = longint'(cmd_addr) * 1024; endp = ptr + longint'(cmd_count) * 1024;
      wr = cmd_write; active = (cmd_count != 0);
      cmd_ready <= 0; busy <= 1;
    end else if (active) begin
      if (wr && wvalid && wready) begin mem[ptr] = wdata; ptr++; end
      if (!wr && rvalid && rready) ptr++;
      if (abort_req && !wr && endp > ((ptr + 1023) / 1024) * 1024) endp = ((ptr + 1023) / 1024) * 1024;
      if (ptr >= endp) active = 0;
    end else begin
      cmd_ready <= 1; busy <= 0;
    end
    wready <= active && wr;
    rvalid <= active && !wr && ($urandom_range(0, 3) != 0) && !(rvalid && rready && ptr >= endp);
    rdata  <= peek(ptr + ((rvalid && rready) ? 0 : 0));
  end
endmodule
