// tb_aes_core: the algorithm core with its default pipelining (IMIX_REGS=3,
// four blocks in flight), fed with round keys from a behavioural key
// memory filled by the reference key expansion.
//
// Sequence: blocks offered while keys are not valid must wait; the AES
// standard's example vectors (encrypt and decrypt); a long back-to-back
// stream of encryptions, which must run at 10 cycles per block; a stream of
// decryptions right after it (the mode switch has to wait for the loop to
// drain); then random blocks with random modes and gaps. Every result is
// compared with the reference model, must come out in order with the right
// mode, and exactly 10*(1+IMIX_REGS) cycles after its block was taken.
module tb_aes_core;
  import aes_ref_pkg::*;
  import aes_pkg::*;

  localparam int unsigned IMIX_REGS = 3;
  localparam int LAT = 10 * (1 + IMIX_REGS);

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   keys_valid;
  logic   in_valid, in_ready;
  mode_e  in_mode, out_mode;
  block_t in_block, out_block;
  logic   out_valid;
  kidx_t  kpre_idx, kpost_idx;
  block_t kpre, kpost;
  logic   idle;

  rkeys_t rk;
  assign kpre  = (kpre_idx  < 11) ? rk[kpre_idx]  : '0;
  assign kpost = (kpost_idx < 11) ? rk[kpost_idx] : '0;

  aes_core dut (.clk(clk), .rst_n(rst_n), .keys_valid(keys_valid),
                .in_valid(in_valid), .in_ready(in_ready), .in_mode(in_mode), .in_block(in_block),
                .out_valid(out_valid), .out_mode(out_mode), .out_block(out_block),
                .kpre_idx(kpre_idx), .kpre(kpre), .kpost_idx(kpost_idx), .kpost(kpost),
                .idle(idle));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_acc = 0, n_out = 0, n_enc = 0, n_dec = 0;
  int stall_busy = 0, stall_mode = 0, stall_keys = 0, refill = 0;

  typedef struct { block_t res; mode_e mode; int t; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid && in_ready) begin
      exp_t e;
      e.res  = (in_mode == MODE_DEC) ? decrypt(rk, in_block) : encrypt(rk, in_block);
      e.mode = in_mode;
      e.t    = cycle;
      q.push_back(e);
      n_acc++;
      if (out_valid) refill++;
    end
    if (rst_n && in_valid && !in_ready) begin
      if (!keys_valid) stall_keys++;
      else if (!idle && in_mode != dut.mode_q) stall_mode++;
      else stall_busy++;
    end
    if (rst_n && out_valid) begin
      n_out++;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("unexpected result %h", out_block);
      end else begin
        exp_t e;
        e = q.pop_front();
        if (out_block !== e.res || out_mode != e.mode || cycle - e.t != LAT) begin
          failures++;
          $display("result %h mode %0d after %0d cycles; expected %h mode %0d after %0d",
                   out_block, out_mode, cycle - e.t, e.res, e.mode, LAT);
        end
        if (e.mode == MODE_DEC) n_dec++; else n_enc++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input block_t b, input mode_e m);
    in_valid = 1'b1; in_block = b; in_mode = m;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic drain();
    while (q.size() != 0) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    int t_first, t_last, nstream;
    int t_acc [40];
    in_valid = 0; in_block = '0; in_mode = MODE_ENC; keys_valid = 0;
    rk = key_expand(128'h000102030405060708090a0b0c0d0e0f);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (!idle) failures++;

    // no keys yet: the block must wait
    in_valid = 1'b1; in_block = 128'h00112233445566778899aabbccddeeff; in_mode = MODE_ENC;
    repeat (3) @(negedge clk);
    checks++;
    if (n_acc != 0) failures++;
    keys_valid = 1'b1;
    @(posedge clk); @(negedge clk);
    in_valid = 1'b0;
    drain();
    send(128'h69c4e0d86a7b0430d8cdb78070b4c55a, MODE_DEC);
    drain();

    // example of the AES standard's appendix B
    rk = key_expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    send(128'h3243f6a8885a308d313198a2e0370734, MODE_ENC);
    @(posedge out_valid); #1;
    checks++;
    if (out_block !== 128'h3925841d02dc09fbdc118597196a0b32) failures++;
    drain();

    // back-to-back stream: throughput one block per 10 cycles
    rk = key_expand({$urandom, $urandom, $urandom, $urandom});
    nstream = 40;
    t_first = cycle;
    in_valid = 1'b1; in_mode = MODE_ENC;
    for (int n = 0; n < nstream; n++) begin
      in_block = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      t_acc[n] = cycle;
      @(negedge clk);
    end
    // four blocks in flight: block n+4 is taken exactly when block n leaves,
    // i.e. 4 blocks per 10*(1+IMIX_REGS) cycles = one block per 10 cycles
    for (int n = 0; n + 4 < nstream; n++) begin
      checks++;
      if (t_acc[n+4] - t_acc[n] != LAT) begin
        failures++; $display("stream block %0d taken %0d cycles after block %0d", n+4, t_acc[n+4]-t_acc[n], n);
      end
    end
    // decryptions right behind: must wait for the loop to drain
    in_mode = MODE_DEC;
    for (int n = 0; n < 8; n++) begin
      in_block = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    drain();
    t_last = cycle;

    // random traffic
    for (int n = 0; n < 150; n++) begin
      repeat ($urandom % 3) @(negedge clk);
      send({$urandom, $urandom, $urandom, $urandom}, mode_e'($urandom % 4 == 0));
    end
    drain();

    checks++;
    if (n_out != n_acc) failures++;
    checks++;
    if (refill == 0) begin failures++; $display("no slot refilled in the cycle it finished"); end
    checks++;
    if (stall_busy == 0 || stall_mode == 0 || stall_keys == 0) begin
      failures++; $display("stalls: busy %0d mode %0d keys %0d", stall_busy, stall_mode, stall_keys);
    end
    checks++;
    if (n_enc == 0 || n_dec == 0) failures++;
    $display("blocks %0d (enc %0d dec %0d), stalls busy %0d mode %0d keys %0d, refills %0d",
             n_out, n_enc, n_dec, stall_busy, stall_mode, stall_keys, refill);
    $display("stream of %0d + 8 blocks took %0d cycles", nstream, t_last - t_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
