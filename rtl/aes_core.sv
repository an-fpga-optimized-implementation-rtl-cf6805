// aes_core: the AES-128 algorithm core, a single-round architecture with a
// combined encryption/decryption datapath.
//
// One round is built once and the state loops through it ten times:
//
//   in_block ^ K(pre) ─┐
//                      ├─> BYTE_SUB ─> SHIFT_ROW ─┬───────────> XOR K(post) ─┐
//   loop-back ─────────┘   (S-box ROMs,           │                          │
//                           registered)           └─> MIX_COLUMN ────────────┘
//
// The pre-addition (K0 for encryption, K10 for decryption) is done once, as
// a block enters. In encryption a round is BYTE_SUB, SHIFT_ROW, MIX_COLUMN,
// then the post-addition with K1..K10. In decryption a round is the inverse
// BYTE_SUB and SHIFT_ROW, the post-addition with K9..K0, then the inverse
// MIX_COLUMN; this places the inverse MixColumn of each decryption round at
// the start of the next one, as in the standard inverse cipher. MIX_COLUMN
// is skipped in the tenth pass in both modes (the final encryption round,
// and the first decryption round). One XOR array serves as the
// post-addition in both modes: multiplexers put it after MIX_COLUMN for
// encryption and before it for decryption.
//
// Pipelining and interleaving. The S-box ROMs hold one register and
// MIX_COLUMN holds IMIX_REGS more, so one pass through the round takes
// D = 1 + IMIX_REGS clock cycles. The loop holds D independent blocks at
// once (ECB mode), one per register stage; each block needs 10*D cycles
// from entry to result, and when the loop is kept full a block leaves every
// 10 cycles on average, whatever D is. A new block can enter in any cycle in
// which the stage arriving at the loop entry is empty or is finishing.
//
// All blocks in the loop share one mode, because the post-addition XOR is
// used at different stages in the two modes. A block of the other mode
// waits (in_ready low) until the loop has drained. Blocks are also held off
// while `keys_valid` is low.
//
// Interface: in_valid/in_ready handshake with in_block and in_mode; the
// result appears on out_block for one cycle with out_valid high, with
// out_mode telling which operation it was. There is no output back-pressure.
// A block offered with in_valid must stay on the inputs until it is taken
// (an assertion checks this).
// Round keys are read asynchronously from the key memory through two read
// ports (kpre_idx/kpre for the pre-addition, kpost_idx/kpost for the
// post-addition). Reset (rst_n low, synchronous) empties the loop.
module aes_core
  import aes_pkg::*;
#(
  parameter int unsigned IMIX_REGS = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   keys_valid,
  // input blocks
  input  logic   in_valid,
  output logic   in_ready,
  input  mode_e  in_mode,
  input  block_t in_block,
  // results
  output logic   out_valid,
  output mode_e  out_mode,
  output block_t out_block,
  // round key memory read ports
  output kidx_t  kpre_idx,
  input  block_t kpre,
  output kidx_t  kpost_idx,
  input  block_t kpost,
  // status
  output logic   idle
);

  typedef struct packed {
    logic  valid;
    kidx_t round;   // 1..10
  } slot_t;

  mode_e  mode_q;           // mode of every block in the loop
  slot_t  meta_bs;          // block at the S-box ROM output
  slot_t  meta_mc [IMIX_REGS];  // blocks inside MIX_COLUMN; last = at output
  slot_t  meta_m;

  assign meta_m = meta_mc[IMIX_REGS-1];

  // ---------------------------------------------------------------------
  // Entry: new block (after the pre-addition) or loop-back.
  // ---------------------------------------------------------------------
  logic   loop_busy, finishing, loop_empty, mode_ok, accept;
  logic   round_sel;        // '0' first round (pre-addition), '1' otherwise
  mode_e  entry_mode;
  block_t pre_added, round_out, entry_data;
  slot_t  entry_meta;

  assign loop_busy = meta_m.valid && (32'(meta_m.round) != NR);
  assign finishing = meta_m.valid && (32'(meta_m.round) == NR);

  always_comb begin
    loop_empty = !meta_bs.valid;
    for (int s = 0; s < int'(IMIX_REGS); s++) begin
      if (meta_mc[s].valid) loop_empty = 1'b0;
    end
  end

  assign mode_ok  = (in_mode == mode_q) || loop_empty;
  assign in_ready = keys_valid && !loop_busy && mode_ok;
  assign accept   = in_valid && in_ready;
  assign idle     = loop_empty;

  assign kpre_idx = (in_mode == MODE_DEC) ? kidx_t'(NR) : kidx_t'(0);

  add_round_key u_pre_add (
    .state     (in_block),
    .round_key (kpre),
    .dout      (pre_added)
  );

  assign round_sel  = !accept;
  assign entry_mode = round_sel ? mode_q : in_mode;
  assign entry_data = round_sel ? round_out : pre_added;

  always_comb begin
    entry_meta = '0;
    if (accept) begin
      entry_meta.valid = 1'b1;
      entry_meta.round = kidx_t'(1);
    end else if (loop_busy) begin
      entry_meta.valid = 1'b1;
      entry_meta.round = meta_m.round + kidx_t'(1);
    end
  end

  // ---------------------------------------------------------------------
  // BYTE_SUB (registered S-box ROMs) and SHIFT_ROW.
  // ---------------------------------------------------------------------
  block_t bs_q, sr_out;

  byte_sub u_byte_sub (
    .clk  (clk),
    .inv  (entry_mode == MODE_DEC),
    .din  (entry_data),
    .dout (bs_q)
  );

  shift_row u_shift_row (
    .inv  (mode_q == MODE_DEC),
    .din  (bs_q),
    .dout (sr_out)
  );

  // ---------------------------------------------------------------------
  // Post-addition and MIX_COLUMN, ordered by mode.
  // ---------------------------------------------------------------------
  block_t mc_out, xor_in, xor_out, mc_in;

  // Decryption: post-add the SHIFT_ROW output, for the block at the S-box
  // stage. Encryption: post-add the MIX_COLUMN output, for the block there.
  assign xor_in    = (mode_q == MODE_DEC) ? sr_out : mc_out;
  assign kpost_idx = (mode_q == MODE_DEC) ? kidx_t'(NR) - meta_bs.round
                                          : meta_m.round;

  add_round_key u_post_add (
    .state     (xor_in),
    .round_key (kpost),
    .dout      (xor_out)
  );

  assign mc_in = (mode_q == MODE_DEC) ? xor_out : sr_out;

  mix_column #(
    .IMIX_REGS (IMIX_REGS)
  ) u_mix_column (
    .clk  (clk),
    .inv  (mode_q == MODE_DEC),
    .en   (32'(meta_bs.round) != NR),
    .din  (mc_in),
    .dout (mc_out)
  );

  assign round_out = (mode_q == MODE_DEC) ? mc_out : xor_out;

  assign out_valid = finishing;
  assign out_block = round_out;
  assign out_mode  = mode_q;

  // ---------------------------------------------------------------------
  // Control registers travelling with the data.
  // ---------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode_q  <= MODE_ENC;
      meta_bs <= '0;
      for (int s = 0; s < int'(IMIX_REGS); s++) meta_mc[s] <= '0;
    end else begin
      if (accept) mode_q <= in_mode;
      meta_bs    <= entry_meta;
      meta_mc[0] <= meta_bs;
      for (int s = 1; s < int'(IMIX_REGS); s++) meta_mc[s] <= meta_mc[s-1];
    end
  end

  // Input rule: a block offered and not yet taken stays on the inputs.
  a_in_stable: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid && !in_ready |=> in_valid && $stable(in_block) && $stable(in_mode));

  // A mode change may only happen on an empty loop.
  a_mode_change_empty: assert property (@(posedge clk) disable iff (!rst_n)
      accept && (in_mode != mode_q) |-> loop_empty);

endmodule
