// tb_add_round_key: random state/key pairs, result must equal their XOR;
// also a fixed vector from the AES standard (first pre-addition).
module tb_add_round_key;
  logic [127:0] state, key, dout;
  int checks = 0, failures = 0;

  add_round_key dut (.state(state), .round_key(key), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    state = 128'h3243f6a8885a308d313198a2e0370734;
    key   = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1;
    checks++;
    if (dout !== 128'h193de3bea0f4e22b9ac68d2ae9f84808) failures++;
    for (int n = 0; n < 100; n++) begin
      state = {$urandom, $urandom, $urandom, $urandom};
      key   = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (dout !== (state ^ key)) begin failures++; $display("mismatch %h", dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
