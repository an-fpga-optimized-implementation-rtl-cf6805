// key_sched: the key scheduling unit. It expands the 128-bit user key into
// the eleven round keys K0..K10 and writes them, one 128-bit word each, into
// the round key memory (key_mem).
//
// It works on two quad-word registers instead of re-reading the memory: the
// previous round key and the current one being built. Each new round key
// is made one 32-bit word per clock cycle from the previous key:
//   SUB : the S-box ROMs look up RotWord of the previous key's last word
//   W0  : w0 = prev.w0 ^ SubWord(RotWord(prev.w3)) ^ Rcon
//   W1  : w1 = prev.w1 ^ w0
//   W2  : w2 = prev.w2 ^ w1
//   W3  : w3 = prev.w3 ^ w2; the whole key is written to the memory and
//         becomes the previous key; Rcon is multiplied by x.
// So every round key takes five cycles. The cycle in which `start` is taken
// writes the user key as K0, so the whole expansion takes 1 + 10*5 = 51
// cycles: `keys_valid` rises after the 51st clock edge counted from the one
// that takes `start`. SubWord uses four 8x512 S-box ROMs (encryption half
// only), i.e. four byte lookups in parallel.
//
// Interface: `start` is taken while the unit is not busy; `busy` is high
// during the expansion; `keys_valid` is low from `start` until the last key
// has been written, then stays high. Reset (rst_n low, synchronous) clears
// `keys_valid` and returns to idle.
module key_sched
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t user_key,
  output logic   busy,
  output logic   keys_valid,
  // write port into the round key memory
  output logic   mem_we,
  output kidx_t  mem_waddr,
  output block_t mem_wdata
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_SUB,
    S_W0,
    S_W1,
    S_W2,
    S_W3
  } state_e;

  state_e state;
  block_t prev_key;
  word_t  cur_w0, cur_w1, cur_w2;
  word_t  cur_w3;
  byte_t  rcon;
  kidx_t  idx;
  word_t  sub_word;
  word_t  rot_word;

  word_t prev_w0, prev_w1, prev_w2, prev_w3;
  assign {prev_w0, prev_w1, prev_w2, prev_w3} = prev_key;

  // RotWord: left rotation by one byte, then four parallel S-box lookups.
  assign rot_word = {prev_w3[23:0], prev_w3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    sbox_rom u_rom (
      .clk  (clk),
      .addr ({1'b0, rot_word[31-8*i -: 8]}),
      .dout (sub_word[31-8*i -: 8])
    );
  end

  assign cur_w3 = prev_w3 ^ cur_w2;

  assign busy = (state != S_IDLE);

  always_comb begin
    mem_we    = 1'b0;
    mem_waddr = idx;
    mem_wdata = {cur_w0, cur_w1, cur_w2, cur_w3};
    if (state == S_IDLE && start) begin
      mem_we    = 1'b1;
      mem_waddr = '0;
      mem_wdata = user_key;
    end else if (state == S_W3) begin
      mem_we    = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      keys_valid <= 1'b0;
      idx        <= '0;
      rcon       <= 8'h01;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          prev_key   <= user_key;
          keys_valid <= 1'b0;
          idx        <= kidx_t'(1);
          rcon       <= 8'h01;
          state      <= S_SUB;
        end
        S_SUB: state <= S_W0;
        S_W0: begin
          cur_w0 <= prev_w0 ^ sub_word ^ {rcon, 24'h0};
          state  <= S_W1;
        end
        S_W1: begin
          cur_w1 <= prev_w1 ^ cur_w0;
          state  <= S_W2;
        end
        S_W2: begin
          cur_w2 <= prev_w2 ^ cur_w1;
          state  <= S_W3;
        end
        S_W3: begin
          prev_key <= {cur_w0, cur_w1, cur_w2, cur_w3};
          rcon     <= xtime(rcon);
          idx      <= idx + kidx_t'(1);
          if (32'(idx) == NR) begin
            keys_valid <= 1'b1;
            state      <= S_IDLE;
          end else begin
            state <= S_SUB;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
