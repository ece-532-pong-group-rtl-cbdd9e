// tb_plb_burst_master: writes bursts of random length and data through the
// burst master into the memory model, checks the memory contents, reads them
// back through the master and checks every word. Without data gaps it also
// checks the burst time against the 1 (request) + 10 (acknowledge wait) +
// 16 (transfer) cycle budget. Finally it chains read bursts back to back,
// starting each in the cycle the previous one signals `done`, and checks that
// the next request follows at once and the data of every burst is right.
module tb_plb_burst_master;
  import pong_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        start, rnw, wr_next, rd_valid, busy, done;
  logic [31:0] addr, wr_data, rd_data;
  logic [4:0]  len;
  plb_m2s_t    m2s [1];
  plb_s2m_t    s2m [1];
  plb_m2s_t    plb_o;

  plb_burst_master dut (.clk, .rst, .start, .rnw, .addr, .len, .wr_data, .wr_next,
                        .rd_valid, .rd_data, .busy, .done, .plb_o, .plb_i(s2m[0]));
  assign m2s[0] = plb_o;

  plb_mem_model #(.NPORTS(1), .MEM_WORDS(4096), .ACK_MAX(10), .GAPS(1'b0)) mem_i (.clk, .m2s, .s2m);

  int checks = 0, failures = 0;
  logic [31:0] pattern [16];
  int          widx_c, ridx_c;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  assign wr_data = pattern[widx_c];
  always_ff @(posedge clk) begin
    if (wr_next) widx_c <= widx_c + 1;
    if (rd_valid) begin
      check(rd_data == pattern[ridx_c % 16], $sformatf("read word %0d got %h want %h", ridx_c, rd_data, pattern[ridx_c % 16]));
      ridx_c <= ridx_c + 1;
    end
  end

  task automatic burst(input bit r, input logic [31:0] a, input int n, output int cycles);
    @(negedge clk);
    start = 1'b1; rnw = r; addr = a; len = 5'(n);
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    // done was high in the cycle just ended; count up to it
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, n, maxcyc;
    logic [31:0] a;
    start = 0; rnw = 0; addr = 0; len = 1; widx_c = 0; ridx_c = 0;
    for (int i = 0; i < 4096; i++) mem_i.mem[i] = 32'hdead_0000 + i;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    maxcyc = 0;
    for (int t = 0; t < 200; t++) begin
      n = (t < 16) ? t + 1 : $urandom_range(16, 1);
      a = {$urandom_range(200, 0), 6'b0};
      for (int i = 0; i < 16; i++) pattern[i] = $urandom;
      widx_c = 0;
      burst(1'b0, a, n, cyc);
      @(negedge clk);
      check(widx_c == n, $sformatf("write acknowledges %0d want %0d", widx_c, n));
      check(cyc <= 1 + 10 + n, $sformatf("write burst of %0d took %0d cycles", n, cyc));
      if (n == 16 && cyc > maxcyc) maxcyc = cyc;
      for (int i = 0; i < n; i++)
        check(mem_i.mem[(a >> 2) + i] == pattern[i], $sformatf("memory word %0d", i));
      // the word after the burst must be untouched
      check(mem_i.mem[(a >> 2) + n] != pattern[n] || n == 16, "no write past the burst");
      ridx_c = 0;
      burst(1'b1, a, n, cyc);
      @(negedge clk);
      check(ridx_c == n, $sformatf("read words %0d want %0d", ridx_c, n));
      check(cyc <= 1 + 10 + n, $sformatf("read burst of %0d took %0d cycles", n, cyc));
    end
    check(maxcyc <= 27, $sformatf("16-word burst max %0d cycles", maxcyc));

    // Back-to-back read bursts: four 16-word regions hold the same pattern.
    for (int i = 0; i < 16; i++) pattern[i] = $urandom;
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 16; i++) mem_i.mem[1024 + 16 * b + i] = pattern[i];
    ridx_c = 0;
    @(negedge clk);
    start = 1'b1; rnw = 1'b1; addr = 32'(1024 * 4); len = 5'd16;
    cyc = 0;
    for (int b = 1; b <= 4; b++) begin
      @(negedge clk);
      cyc++;
      start = 1'b0;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      // done is high in this cycle: start the next burst in it
      if (b < 4) begin
        start = 1'b1; addr = 32'((1024 + 16 * b) * 4);
        @(posedge clk);
        #1 check(plb_o.request && plb_o.addr == addr,
                 $sformatf("chained burst %0d requested in the cycle after done", b));
      end
    end
    @(negedge clk);
    check(ridx_c == 64, $sformatf("chained reads delivered %0d words, want 64", ridx_c));
    check(cyc <= 4 * 27, $sformatf("four chained bursts took %0d cycles", cyc));
    $display("four chained 16-word read bursts: %0d cycles", cyc);
    $display("max 16-word write burst: %0d cycles", maxcyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
