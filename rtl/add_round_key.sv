// add_round_key: the ADD_ROUND_KEY stage, a bitwise XOR of the 128-bit
// state with a 128-bit round key. Purely combinational. The core uses one
// copy as the pre-addition of the first round and one as the post-addition
// at the end of every round.
module add_round_key
  import aes_pkg::*;
(
  input  block_t state,
  input  block_t round_key,
  output block_t dout
);

  assign dout = state ^ round_key;

endmodule
