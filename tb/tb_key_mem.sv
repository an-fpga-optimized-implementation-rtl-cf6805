// tb_key_mem: writes 11 random round keys, then reads them back through
// both asynchronous read ports in random order; checks that a write lands
// only at its address, and that addresses past the last key read as zero.
module tb_key_mem;
  logic         clk = 1'b0;
  logic         we;
  logic [3:0]   waddr, ra, rb;
  logic [127:0] wdata, da, db;
  logic [127:0] model [11];
  int checks = 0, failures = 0;

  key_mem dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
               .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; ra = 0; rb = 0;
    for (int i = 0; i < 11; i++) begin
      @(negedge clk);
      we = 1; waddr = 4'(i);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (n % 7 == 3) begin
        // overwrite one location, then check it and its neighbours later
        we = 1; waddr = 4'($urandom % 11);
        wdata = {$urandom, $urandom, $urandom, $urandom};
        model[waddr] = wdata;
        @(negedge clk); we = 0;
      end
      ra = 4'($urandom % 16); rb = 4'($urandom % 16);
      #1;
      checks += 2;
      if (da !== ((ra < 11) ? model[ra] : '0)) begin failures++; $display("port a addr %0d: %h", ra, da); end
      if (db !== ((rb < 11) ? model[rb] : '0)) begin failures++; $display("port b addr %0d: %h", rb, db); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
