// tb_aes_top: end-to-end test of the complete engine at its default
// parameters (IMIX_REGS = 3): key loading through the key scheduling unit
// and key memory, then encryption and decryption of blocks through the core.
//
// It runs: the AES standard's example vectors; a back-to-back encryption
// stream (10 cycles per block); decryption of that stream's results right
// behind it (mode switch, waits for the loop to drain), which must give back
// the plaintexts; a key reload requested while blocks are in flight (must
// wait until the core is empty); blocks offered during key expansion (must
// wait for keys_valid); and random traffic. Every result is checked against
// the reference model, for order, mode and a latency of exactly 40 cycles.
// Each mechanism is counted and a mechanism that never happened counts as a
// failure: key expansion (51 cycles), encryption, decryption, the MixColumn
// bypass of the tenth pass, a slot refilled in the cycle it finished, a
// stall for a busy loop slot, a stall for a mode switch, a stall for keys
// not yet valid, and a key reload held off by a busy core.
module tb_aes_top;
  import aes_ref_pkg::*;
  import aes_pkg::*;

  localparam int LAT = 40;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   key_start, key_start_ready, keys_valid;
  block_t user_key;
  logic   in_valid, in_ready, out_valid;
  mode_e  in_mode, out_mode;
  block_t in_block, out_block;

  aes_top dut (.clk(clk), .rst_n(rst_n),
               .key_start(key_start), .user_key(user_key),
               .key_start_ready(key_start_ready), .keys_valid(keys_valid),
               .in_valid(in_valid), .in_ready(in_ready), .in_mode(in_mode), .in_block(in_block),
               .out_valid(out_valid), .out_mode(out_mode), .out_block(out_block));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_keys = 0, n_enc = 0, n_dec = 0, n_bypass = 0, n_refill = 0;
  int st_busy = 0, st_mode = 0, st_keys = 0, st_rekey = 0;

  rkeys_t rk;   // keys the engine should be using
  typedef struct { block_t res; mode_e mode; int t; } exp_t;
  exp_t q [$];
  block_t results [$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        exp_t e;
        e.res  = (in_mode == MODE_DEC) ? decrypt(rk, in_block) : encrypt(rk, in_block);
        e.mode = in_mode;
        e.t    = cycle;
        q.push_back(e);
        if (out_valid) n_refill++;
      end
      if (in_valid && !in_ready) begin
        if (!keys_valid) st_keys++;
        else if (!dut.core_idle && in_mode != out_mode) st_mode++;
        else st_busy++;
      end
      if (key_start && !key_start_ready) st_rekey++;
      if (dut.u_core.meta_bs.valid && dut.u_core.meta_bs.round == 4'd10) n_bypass++;
      if (out_valid) begin
        checks++;
        if (q.size() == 0) begin
          failures++; $display("unexpected result %h", out_block);
        end else begin
          exp_t e;
          e = q.pop_front();
          if (out_block !== e.res || out_mode != e.mode || cycle - e.t != LAT) begin
            failures++;
            $display("got %h mode %0d after %0d; expected %h mode %0d after %0d",
                     out_block, out_mode, cycle - e.t, e.res, e.mode, LAT);
          end
          if (e.mode == MODE_DEC) n_dec++; else n_enc++;
          results.push_back(out_block);
        end
      end
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Load a key; check the 51-cycle expansion.
  task automatic load_key(input block_t k);
    int t0;
    @(negedge clk);
    key_start = 1'b1; user_key = k;
    @(posedge clk);
    while (!key_start_ready) @(posedge clk);
    t0 = cycle;
    rk = key_expand(k);
    @(negedge clk);
    key_start = 1'b0; user_key = '0;
    while (!keys_valid) @(negedge clk);
    checks++;
    if (cycle - t0 != 51) begin failures++; $display("key expansion took %0d cycles", cycle - t0); end
    n_keys++;
  endtask

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
    block_t pts [$];
    block_t cts [$];
    key_start = 0; user_key = '0; in_valid = 0; in_block = '0; in_mode = MODE_ENC;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // AES standard, appendix C.1
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    send(128'h00112233445566778899aabbccddeeff, MODE_ENC);
    drain();
    checks++;
    if (results[$] !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++;
    send(128'h69c4e0d86a7b0430d8cdb78070b4c55a, MODE_DEC);
    drain();
    checks++;
    if (results[$] !== 128'h00112233445566778899aabbccddeeff) failures++;

    // AES standard, appendix B; a block offered during the expansion waits
    fork
      load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
      begin
        repeat (5) @(negedge clk);
        send(128'h3243f6a8885a308d313198a2e0370734, MODE_ENC);
      end
    join
    drain();
    checks++;
    if (results[$] !== 128'h3925841d02dc09fbdc118597196a0b32) failures++;

    // encryption stream, then decryption of its results (mode switch)
    load_key({$urandom, $urandom, $urandom, $urandom});
    results.delete();
    for (int n = 0; n < 32; n++) pts.push_back({$urandom, $urandom, $urandom, $urandom});
    in_valid = 1'b1; in_mode = MODE_ENC;
    for (int n = 0; n < 32; n++) begin
      in_block = pts[n];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    // wait for the ciphertexts, then feed them back for decryption
    while (results.size() < 28) @(negedge clk);
    for (int n = 0; n < 32; n++) begin
      while (results.size() <= n) @(negedge clk);
      cts.push_back(results[n]);
    end
    results.delete();
    in_valid = 1'b1; in_mode = MODE_DEC;
    for (int n = 0; n < 32; n++) begin
      in_block = cts[n];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    drain();
    for (int n = 0; n < 32; n++) begin
      checks++;
      if (results[n] !== pts[n]) begin failures++; $display("round trip %0d failed", n); end
    end

    // key reload requested while blocks are in flight: must wait
    in_mode = MODE_ENC;
    fork
      for (int n = 0; n < 6; n++) send({$urandom, $urandom, $urandom, $urandom}, MODE_ENC);
      begin
        repeat (3) @(negedge clk);
        load_key({$urandom, $urandom, $urandom, $urandom});
      end
    join
    drain();

    // random traffic
    for (int n = 0; n < 200; n++) begin
      repeat ($urandom % 4) @(negedge clk);
      send({$urandom, $urandom, $urandom, $urandom}, mode_e'($urandom % 3 == 0));
    end
    drain();

    checks++; if (q.size() != 0) failures++;
    checks++; if (n_keys == 0)   begin failures++; $display("no key expansion"); end
    checks++; if (n_enc == 0)    begin failures++; $display("no encryption"); end
    checks++; if (n_dec == 0)    begin failures++; $display("no decryption"); end
    checks++; if (n_bypass == 0) begin failures++; $display("no MixColumn bypass"); end
    checks++; if (n_refill == 0) begin failures++; $display("no slot refill"); end
    checks++; if (st_busy == 0)  begin failures++; $display("no busy-slot stall"); end
    checks++; if (st_mode == 0)  begin failures++; $display("no mode-switch stall"); end
    checks++; if (st_keys == 0)  begin failures++; $display("no stall for keys"); end
    checks++; if (st_rekey == 0) begin failures++; $display("no held-off key reload"); end
    $display("key loads %0d, enc %0d, dec %0d, bypass passes %0d, refills %0d",
             n_keys, n_enc, n_dec, n_bypass, n_refill);
    $display("stall cycles: busy slot %0d, mode switch %0d, keys %0d, key reload %0d",
             st_busy, st_mode, st_keys, st_rekey);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
