// key_mem: the round key memory, 11 words of 128 bits (K0..K10).
//
// It is organised one round key per location, so a whole key is read in one
// access, and is written as a distributed (LUT) RAM: one synchronous write
// port, used by the key scheduling unit, and two asynchronous read ports,
// used by the core for the pre-addition and the post-addition keys. A read
// of an address past the last key returns zero. The contents are not reset.
module key_mem
  import aes_pkg::*;
#(
  parameter int unsigned DEPTH = NR + 1
) (
  input  logic   clk,
  input  logic   we,
  input  kidx_t  waddr,
  input  block_t wdata,
  input  kidx_t  raddr_a,
  output block_t rdata_a,
  input  kidx_t  raddr_b,
  output block_t rdata_b
);

  block_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  assign rdata_a = (32'(raddr_a) < DEPTH) ? mem[raddr_a] : '0;
  assign rdata_b = (32'(raddr_b) < DEPTH) ? mem[raddr_b] : '0;

endmodule
