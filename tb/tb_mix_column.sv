// tb_mix_column: MIX_COLUMN in its three pipelining variants (IMix_Reg_1,
// _2 and _3, i.e. IMIX_REGS = 1, 2, 3), side by side. A new random block,
// mode and bypass flag are applied every clock cycle; each variant's output
// is checked exactly IMIX_REGS cycles later against the reference model,
// so latency, per-block controls and values are all checked. A fixed
// column from the AES standard (db135345 -> 8e4da1bc) is checked too.
module tb_mix_column;
  import aes_ref_pkg::*;

  localparam int N = 300;

  logic         clk = 1'b0;
  logic         inv, en;
  logic [127:0] din;
  logic [127:0] dout [1:3];
  logic [127:0] exp_hist [N];
  int checks = 0, failures = 0;

  mix_column #(.IMIX_REGS(1)) dut1 (.clk(clk), .inv(inv), .en(en), .din(din), .dout(dout[1]));
  mix_column #(.IMIX_REGS(2)) dut2 (.clk(clk), .inv(inv), .en(en), .din(din), .dout(dout[2]));
  mix_column #(.IMIX_REGS(3)) dut3 (.clk(clk), .inv(inv), .en(en), .din(din), .dout(dout[3]));

  always #5 clk = ~clk;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bypassed = 0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      // results of the blocks applied 1, 2 and 3 cycles ago
      for (int l = 1; l <= 3; l++) begin
        if (n - l >= 0) begin
          checks++;
          if (dout[l] !== exp_hist[n-l]) begin
            failures++;
            $display("regs=%0d block %0d: got %h expected %h", l, n-l, dout[l], exp_hist[n-l]);
          end
        end
      end
      if (n == 0) begin
        din = {32'hdb135345, 32'hf20a225c, 32'h01010101, 32'hc6c6c6c6};
        inv = 1'b0; en = 1'b1;
      end else begin
        din = {$urandom, $urandom, $urandom, $urandom};
        inv = 1'($urandom);
        en  = ($urandom % 4) != 0;
      end
      if (!en) bypassed++;
      exp_hist[n] = en ? mix_columns(din, inv) : din;
      if (n == 0) begin
        checks++;
        if (exp_hist[0] !== {32'h8e4da1bc, 32'h9fdc589d, 32'h01010101, 32'hc6c6c6c6}) failures++;
      end
    end
    checks++;
    if (bypassed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
