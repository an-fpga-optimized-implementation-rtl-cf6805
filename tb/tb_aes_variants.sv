// tb_aes_variants: the complete engine in the two less pipelined MixColumn
// variants (IMIX_REGS = 1, registered output only, and IMIX_REGS = 2,
// registered input and output), side by side. The default variant
// (IMIX_REGS = 3) is covered by tb_aes_top. Each must stream one block per
// 10 cycles with a latency of 10*(1+IMIX_REGS) cycles and decrypt its own
// ciphertexts back to the plaintexts.
module tb_aes_variants;
  logic clk = 1'b0, rst_n = 1'b0;
  logic done1, done2;
  int   c1, f1, c2, f2;

  aes_variant_check #(.IMIX_REGS(1)) u_v1 (.clk(clk), .rst_n(rst_n), .done(done1), .checks(c1), .failures(f1));
  aes_variant_check #(.IMIX_REGS(2)) u_v2 (.clk(clk), .rst_n(rst_n), .done(done2), .checks(c2), .failures(f2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done1 && done2);
    $display("IMIX_REGS=1: %0d checks, %0d failures; IMIX_REGS=2: %0d checks, %0d failures", c1, f1, c2, f2);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2);
    $finish;
  end
endmodule
