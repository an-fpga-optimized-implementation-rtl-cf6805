// aes_variant_check: drives one aes_top with the given IMIX_REGS through a
// key load, a back-to-back stream of encryptions and the decryption of the
// resulting ciphertexts, and checks results, latency (10*(1+IMIX_REGS)
// cycles) and stream rate (block n+D taken exactly 10*D cycles after block
// n, D = 1+IMIX_REGS, i.e. one block per 10 cycles). Used by
// tb_aes_variants; reports its counts when `done` rises.
module aes_variant_check
  import aes_ref_pkg::*;
  import aes_pkg::*;
#(
  parameter int unsigned IMIX_REGS = 1,
  parameter int          NBLK      = 24
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int D   = 1 + IMIX_REGS;
  localparam int LAT = 10 * D;

  logic   key_start, key_start_ready, keys_valid;
  block_t user_key;
  logic   in_valid, in_ready, out_valid;
  mode_e  in_mode, out_mode;
  block_t in_block, out_block;

  aes_top #(.IMIX_REGS(IMIX_REGS)) dut (
    .clk(clk), .rst_n(rst_n),
    .key_start(key_start), .user_key(user_key),
    .key_start_ready(key_start_ready), .keys_valid(keys_valid),
    .in_valid(in_valid), .in_ready(in_ready), .in_mode(in_mode), .in_block(in_block),
    .out_valid(out_valid), .out_mode(out_mode), .out_block(out_block));

  int cycle = 0;
  rkeys_t rk;
  block_t exp_q [$];
  int     t_q [$];
  block_t results [$];
  int     t_acc [NBLK];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid && in_ready) begin
      exp_q.push_back((in_mode == MODE_DEC) ? decrypt(rk, in_block) : encrypt(rk, in_block));
      t_q.push_back(cycle);
    end
    if (rst_n && out_valid) begin
      block_t e;
      int t;
      checks++;
      if (exp_q.size() == 0) failures++;
      else begin
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (out_block !== e || cycle - t != LAT) begin
          failures++;
          $display("IMIX_REGS=%0d: got %h after %0d, expected %h after %0d",
                   IMIX_REGS, out_block, cycle - t, e, LAT);
        end
      end
      results.push_back(out_block);
    end
  end

  task automatic stream(input block_t blks [NBLK], input mode_e m);
    in_valid = 1'b1; in_mode = m;
    for (int n = 0; n < NBLK; n++) begin
      in_block = blks[n];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      t_acc[n] = cycle;
      @(negedge clk);
    end
    in_valid = 1'b0;
    for (int n = 0; n + D < NBLK; n++) begin
      checks++;
      if (t_acc[n+D] - t_acc[n] != LAT) failures++;
    end
  endtask

  initial begin
    block_t pts [NBLK];
    block_t cts [NBLK];
    checks = 0; failures = 0; done = 1'b0;
    key_start = 0; user_key = '0; in_valid = 0; in_block = '0; in_mode = MODE_ENC;
    @(posedge rst_n);
    @(negedge clk);
    user_key = {$urandom, $urandom, $urandom, $urandom};
    rk = key_expand(user_key);
    key_start = 1'b1;
    @(negedge clk);
    key_start = 1'b0;
    while (!keys_valid) @(negedge clk);
    for (int n = 0; n < NBLK; n++) pts[n] = {$urandom, $urandom, $urandom, $urandom};
    stream(pts, MODE_ENC);
    while (results.size() < NBLK) @(negedge clk);
    for (int n = 0; n < NBLK; n++) cts[n] = results[n];
    results.delete();
    stream(cts, MODE_DEC);
    while (results.size() < NBLK) @(negedge clk);
    for (int n = 0; n < NBLK; n++) begin
      checks++;
      if (results[n] !== pts[n]) failures++;
    end
    done = 1'b1;
  end

endmodule
