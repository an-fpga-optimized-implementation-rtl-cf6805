// aes_top: the complete AES-128 encryption/decryption engine: the key
// scheduling unit, the round key memory and the algorithm core.
//
// Usage: load a key by pulsing `key_start` with `user_key` while
// `key_start_ready` is high (the core is empty and no expansion is
// running). The key scheduling unit writes K0..K10 into the key memory in
// 51 cycles and then raises `keys_valid`. After that, blocks are offered on
// in_block with in_mode (0 encrypt, 1 decrypt) and in_valid, and are taken
// when in_ready is high. Each result appears for one cycle on out_block with
// out_valid high, 10*(1+IMIX_REGS) cycles after its block was taken; with a
// full pipeline one result leaves every 10 cycles. Results leave in the
// order the blocks were taken. Keys stay valid until the next key load.
//
// The default IMIX_REGS = 3 is the most deeply pipelined MixColumn variant
// (registered input and output plus an internal register).
module aes_top
  import aes_pkg::*;
#(
  parameter int unsigned IMIX_REGS = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  // key loading
  input  logic   key_start,
  input  block_t user_key,
  output logic   key_start_ready,
  output logic   keys_valid,
  // input blocks
  input  logic   in_valid,
  output logic   in_ready,
  input  mode_e  in_mode,
  input  block_t in_block,
  // results
  output logic   out_valid,
  output mode_e  out_mode,
  output block_t out_block
);

  logic   ks_busy, ks_start, core_idle;
  logic   mem_we;
  kidx_t  mem_waddr;
  block_t mem_wdata;
  kidx_t  kpre_idx, kpost_idx;
  block_t kpre, kpost;

  assign key_start_ready = core_idle && !ks_busy;
  assign ks_start        = key_start && key_start_ready;

  key_sched u_key_sched (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (ks_start),
    .user_key   (user_key),
    .busy       (ks_busy),
    .keys_valid (keys_valid),
    .mem_we     (mem_we),
    .mem_waddr  (mem_waddr),
    .mem_wdata  (mem_wdata)
  );

  key_mem u_key_mem (
    .clk     (clk),
    .we      (mem_we),
    .waddr   (mem_waddr),
    .wdata   (mem_wdata),
    .raddr_a (kpre_idx),
    .rdata_a (kpre),
    .raddr_b (kpost_idx),
    .rdata_b (kpost)
  );

  aes_core #(
    .IMIX_REGS (IMIX_REGS)
  ) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .keys_valid (keys_valid && !ks_start),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_mode    (in_mode),
    .in_block   (in_block),
    .out_valid  (out_valid),
    .out_mode   (out_mode),
    .out_block  (out_block),
    .kpre_idx   (kpre_idx),
    .kpre       (kpre),
    .kpost_idx  (kpost_idx),
    .kpost      (kpost),
    .idle       (core_idle)
  );

endmodule
