// tb_key_sched: expands several keys (the example key of the AES standard,
// all-zero, all-one and random keys). A small memory model captures the
// writes; each of K0..K10 must be written exactly once, with the value the
// reference key expansion gives. The cycle counts are checked too: K0 in
// the cycle `start` is taken, then one key every five cycles, and
// keys_valid high 51 cycles after start.
module tb_key_sched;
  import aes_ref_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         start, busy, keys_valid, we;
  logic [3:0]   waddr;
  logic [127:0] user_key, wdata;
  logic [127:0] mem [16];
  int           wr_cycle [16];
  int           wr_count [16];
  int           cycle = 0;
  int checks = 0, failures = 0;

  key_sched dut (.clk(clk), .rst_n(rst_n), .start(start), .user_key(user_key),
                 .busy(busy), .keys_valid(keys_valid),
                 .mem_we(we), .mem_waddr(waddr), .mem_wdata(wdata));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (we) begin
      mem[waddr]      <= wdata;
      wr_cycle[waddr] <= cycle;
      wr_count[waddr] <= wr_count[waddr] + 1;
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expand(input logic [127:0] key);
    rkeys_t exp;
    int t0, tv;
    exp = key_expand(key);
    @(negedge clk);
    for (int i = 0; i < 16; i++) wr_count[i] = 0;
    user_key = key;
    start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    user_key = '1 ^ key;   // the key input need not be held
    checks++;
    if (keys_valid || !busy) begin failures++; $display("not busy after start"); end
    while (!keys_valid) @(negedge clk);
    tv = cycle;
    checks++;
    if (tv - t0 != 51) begin failures++; $display("expansion took %0d cycles", tv - t0); end
    for (int i = 0; i < 11; i++) begin
      checks += 3;
      if (mem[i] !== exp[i]) begin failures++; $display("K%0d got %h expected %h", i, mem[i], exp[i]); end
      if (wr_count[i] != 1) begin failures++; $display("K%0d written %0d times", i, wr_count[i]); end
      if (wr_cycle[i] != t0 + ((i == 0) ? 0 : 5*i)) begin
        failures++; $display("K%0d written in cycle %0d", i, wr_cycle[i] - t0);
      end
    end
    checks++;
    if (busy) failures++;
  endtask

  initial begin
    start = 1'b0; user_key = '0;
    for (int i = 0; i < 16; i++) begin wr_count[i] = 0; mem[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks++;
    if (mem[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) failures++;
    expand(128'h0);
    expand('1);
    for (int n = 0; n < 5; n++) expand({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
