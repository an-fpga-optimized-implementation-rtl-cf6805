// tb_mul_byte: every byte value in both modes; the four products are
// compared with a generic GF(2^8) multiply by the MixColumn coefficients.
module tb_mul_byte;
  import aes_ref_pkg::*;

  logic            inv;
  logic [7:0]      b;
  logic [3:0][7:0] prod;
  int checks = 0, failures = 0;

  mul_byte dut (.inv(inv), .b(b), .prod(prod));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] fc [4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    logic [7:0] ic [4] = '{8'h0E, 8'h0B, 8'h0D, 8'h09};
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 256; v++) begin
        inv = m[0];
        b = 8'(v);
        #1;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (prod[k] !== ref_gmul(b, inv ? ic[k] : fc[k])) begin
            failures++;
            $display("inv=%0d b=%02h k=%0d got %02h", inv, b, k, prod[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
