// tb_shift_row: forward and inverse SHIFT_ROW on random blocks and on a
// block of distinct bytes, against the reference model; also checks that
// the inverse undoes the forward transform.
module tb_shift_row;
  import aes_ref_pkg::*;

  logic         inv;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  shift_row dut (.inv(inv), .din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] fwd;
    // Distinct bytes: 00 01 .. 0f; forward result from the AES standard.
    din = 128'h000102030405060708090a0b0c0d0e0f;
    inv = 1'b0; #1;
    checks++;
    if (dout !== 128'h00050a0f04090e03080d02070c01060b) begin
      failures++; $display("fixed forward vector: got %h", dout);
    end
    for (int n = 0; n < 200; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      inv = 1'b0; #1;
      fwd = dout;
      checks++;
      if (dout !== shift_rows(din, 0)) begin failures++; $display("fwd %h -> %h", din, dout); end
      inv = 1'b1; #1;
      checks++;
      if (dout !== shift_rows(din, 1)) begin failures++; $display("inv %h -> %h", din, dout); end
      din = fwd; #1;
      checks++;
      if (dout !== shift_rows(fwd, 1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
