// tb_video_to_ram: drives 13.5 MHz video lines (640 active pixels, 858-clock
// line) into the capture core at its default size, with a memory model that
// acknowledges addresses after up to 10 cycles. It checks that every active
// line lands at FRAME_BASE + 4*(line*640 + x) as {0,R,G,B}, that lines with a
// count outside the 480 active lines are not written, that each line is
// flushed within its 40-burst budget, that nothing is written before
// MPMC_DoneInit and that no overrun is flagged.
module tb_video_to_ram;
  import pong_pkg::*;

  localparam int H = 640, V = 480, LINE_CLKS = 858;

  logic clk = 0, vclk = 0, rst = 1;
  always #5 clk = ~clk;        // 100 MHz
  always #37 vclk = ~vclk;     // ~13.5 MHz

  logic        mpmc_done_init;
  logic [23:0] vid_rgb;
  logic        vid_line;
  logic [9:0]  vid_line_count;
  logic        line_done, overrun;
  plb_m2s_t    m2s [1];
  plb_s2m_t    s2m [1];

  video_to_ram dut (.clk, .rst, .mpmc_done_init, .vclk, .vid_rgb, .vid_line, .vid_line_count,
                    .plb_o(m2s[0]), .plb_i(s2m[0]), .line_done, .overrun);
  plb_mem_model #(.NPORTS(1), .ACK_MAX(10)) mem_i (.clk, .m2s, .s2m);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [23:0] pix(input int line, input int x);
    return {8'(line * 7 + x), 8'(x ^ 8'h5a), 8'(line + 3 * x)};
  endfunction

  // flush time of each line in bus cycles
  int busy_cycles, max_busy, lines_done;
  always_ff @(posedge clk) begin
    if (dut.bstate != dut.B_IDLE) busy_cycles <= busy_cycles + 1;
    if (line_done) begin
      lines_done <= lines_done + 1;
      if (busy_cycles + 1 > max_busy) max_busy <= busy_cycles + 1;
      busy_cycles <= 0;
    end
    if (!mpmc_done_init && m2s[0].request) begin
      failures++;
      $display("FAIL: request before MPMC_DoneInit");
    end
  end

  task automatic send_line(input int count, input int tag);
    for (int c = 0; c < LINE_CLKS; c++) begin
      @(negedge vclk);
      vid_line_count = 10'(count);
      if (c < H) begin
        vid_line = 1'b0;
        vid_rgb  = pix(tag, c);
      end else begin
        vid_line = 1'b1;
        vid_rgb  = 24'h0;
      end
    end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lines[6] = '{0, 1, 479, 17, 480, 240};
  initial begin
    busy_cycles = 0; max_busy = 0; lines_done = 0;
    mpmc_done_init = 0; vid_rgb = 0; vid_line = 1; vid_line_count = 0;
    for (int i = 0; i < 640 * 481; i++) mem_i.mem[i] = 32'hffff_ffff;
    repeat (20) @(posedge vclk);
    rst = 0;
    repeat (4) @(posedge vclk);   // reset reaches the video domain
    // the first line is received while the memory controller initialises
    send_line(lines[0], lines[0]);
    mpmc_done_init = 1;
    for (int l = 1; l < 6; l++) send_line(lines[l], lines[l]);
    repeat (3) send_line(500, 500);   // vertical blanking
    for (int l = 0; l < 6; l++) begin
      int bad;
      bad = 0;
      for (int x = 0; x < H; x++) begin
        logic [31:0] got;
        got = mem_i.mem[lines[l] * H + x];
        if (lines[l] < V) begin
          if (got != {8'h00, pix(lines[l], x)}) bad++;
        end else if (got != 32'hffff_ffff) bad++;
      end
      check(bad == 0, $sformatf("line %0d: %0d bad words, x=5 got %h want %h", lines[l], bad, mem_i.mem[lines[l] * H + 5], pix(lines[l], 5)));
    end
    check(lines_done == 5, $sformatf("%0d lines written, want 5", lines_done));
    check(max_busy <= 1 + 40 * 27, $sformatf("line flush took %0d cycles", max_busy));
    check(max_busy >= 40 * 17, $sformatf("line flush too short: %0d cycles", max_busy));
    check(!overrun, "overrun flagged");
    $display("longest line flush: %0d cycles (%0d ns)", max_busy, max_busy * 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
