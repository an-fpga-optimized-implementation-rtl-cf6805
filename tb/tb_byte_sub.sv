// tb_byte_sub: random blocks through BYTE_SUB in both modes; each result is
// checked one clock edge after its input against the reference model.
module tb_byte_sub;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic         inv;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  byte_sub dut (.clk(clk), .inv(inv), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] exp;
    init();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      inv = n[0];
      din = {$urandom, $urandom, $urandom, $urandom};
      exp = sub_bytes(din, inv);
      @(posedge clk); #1;
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("inv=%0d din=%h got %h expected %h", inv, din, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
