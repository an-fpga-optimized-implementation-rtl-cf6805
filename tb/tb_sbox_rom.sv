// tb_sbox_rom: reads all 512 entries of the S-box ROM and compares them
// with the reference S-box and inverse S-box; also checks the one-cycle
// read latency (the output must not change before the clock edge).
module tb_sbox_rom;
  import aes_ref_pkg::*;

  logic       clk = 1'b0;
  logic [8:0] addr;
  logic [7:0] dout;
  int checks = 0, failures = 0;

  sbox_rom dut (.clk(clk), .addr(addr), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp, prev_out;
    init();
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      prev_out = dout;
      addr = 9'(a);
      #1;
      checks++;
      if (dout !== prev_out) begin failures++; $display("read not registered at %0d", a); end
      @(posedge clk); #1;
      exp = (a < 256) ? SB[a] : ISB[a-256];
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("addr %03h: got %02h expected %02h", a, dout, exp);
      end
    end
    // Known values from the AES standard.
    @(negedge clk); addr = 9'h053; @(posedge clk); #1;
    checks++; if (dout !== 8'hED) failures++;
    @(negedge clk); addr = 9'h1ED; @(posedge clk); #1;
    checks++; if (dout !== 8'h53) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
