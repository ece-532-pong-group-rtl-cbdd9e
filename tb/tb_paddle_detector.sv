// tb_paddle_detector: builds 640x480 frames in the memory model with a grey
// background, paddle endpoint pixels in two colours and decoy pixels that sit
// exactly on a bound (which the strict comparisons must reject), runs the
// detector over several frames and compares its endpoint outputs and the 8
// words it writes back with a reference scan of the same memory. It also
// checks that a frame is read in 16-pixel bursts within the 27-cycle budget.
module tb_paddle_detector;
  import pong_pkg::*;

  localparam int H = 640, V = 480, SPLIT = 240;
  localparam logic [31:0] BOUNDS_ADDR = 32'h0013_0000, PADDLE_ADDR = 32'h0013_0040;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic     mpmc_done_init, frame_done;
  paddle_t  paddle1, paddle2;
  plb_m2s_t m2s [1];
  plb_s2m_t s2m [1];

  paddle_detector dut (.clk, .rst, .mpmc_done_init, .plb_o(m2s[0]), .plb_i(s2m[0]),
                       .paddle1, .paddle2, .frame_done);
  plb_mem_model #(.NPORTS(1), .ACK_MAX(10)) mem_i (.clk, .m2s, .s2m);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] bnd [12];
  paddle_t    exp1, exp2;

  function automatic bit inside_b(input logic [31:0] w, input int o);
    return bnd[o+0] < w[23:16] && w[23:16] < bnd[o+1] &&
           bnd[o+2] < w[15:8]  && w[15:8]  < bnd[o+3] &&
           bnd[o+4] < w[7:0]   && w[7:0]   < bnd[o+5];
  endfunction

  task automatic reference_scan();
    for (int y = 0; y < V; y++)
      for (int x = 0; x < H; x++) begin
        logic [31:0] w;
        w = mem_i.mem[y * H + x];
        if (inside_b(w, 0)) begin
          if (x < SPLIT) exp1.p1 = '{x: 10'(x), y: 10'(y)}; else exp2.p1 = '{x: 10'(x), y: 10'(y)};
        end else if (inside_b(w, 6)) begin
          if (x < SPLIT) exp1.p2 = '{x: 10'(x), y: 10'(y)}; else exp2.p2 = '{x: 10'(x), y: 10'(y)};
        end
      end
  endtask

  task automatic put(input int x, input int y, input logic [7:0] r, input logic [7:0] g, input logic [7:0] b);
    mem_i.mem[y * H + x] = {8'h00, r, g, b};
  endtask

  task automatic build_frame(input int f);
    for (int i = 0; i < H * V; i++) mem_i.mem[i] = 32'h0040_4040;
    // bounds: End Colour 1 red, End Colour 2 green
    bnd = '{8'd150, 8'd250, 8'd0, 8'd60, 8'd0, 8'd60,
            8'd0, 8'd60, 8'd150, 8'd250, 8'd0, 8'd60};
    for (int i = 0; i < 12; i++) mem_i.mem[(BOUNDS_ADDR >> 2) + i] = {24'h0, bnd[i]};
    if (f == 3) return;   // empty frame: the endpoints must stay where they were
    // decoys on the bounds
    put($urandom_range(H - 1, 0), $urandom_range(V - 1, 0), 8'd150, 8'd30, 8'd30);
    put($urandom_range(H - 1, 0), $urandom_range(V - 1, 0), 8'd200, 8'd60, 8'd30);
    put($urandom_range(H - 1, 0), $urandom_range(V - 1, 0), 8'd30, 8'd250, 8'd30);
    put($urandom_range(H - 1, 0), $urandom_range(V - 1, 0), 8'd30, 8'd200, 8'd0);
    // endpoints, a few pixels each
    for (int k = 0; k < 3; k++) begin
      put($urandom_range(SPLIT - 1, 0), $urandom_range(V - 1, 0), 8'd200, 8'd30, 8'd30);
      put($urandom_range(SPLIT - 1, 0), $urandom_range(V - 1, 0), 8'd30, 8'd200, 8'd30);
      put($urandom_range(H - 1, SPLIT), $urandom_range(V - 1, 0), 8'd220, 8'd10, 8'd40);
      put($urandom_range(H - 1, SPLIT), $urandom_range(V - 1, 0), 8'd20, 8'd180, 8'd50);
    end
    // on the split column and the corners
    put(SPLIT, 0, 8'd200, 8'd30, 8'd30);
    put(SPLIT - 1, V - 1, 8'd30, 8'd200, 8'd30);
  endtask

  initial begin : watchdog
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc, bursts0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    int t0;
    exp1 = '0; exp2 = '0;
    mpmc_done_init = 0;
    cyc = 0;
    build_frame(0);
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (50) @(posedge clk);
    check(m2s[0].request == 1'b0, "no request before MPMC_DoneInit");
    mpmc_done_init = 1;
    t0 = cyc;
    bursts0 = mem_i.bursts_rd;
    for (int f = 0; f < 4; f++) begin
      reference_scan();
      @(posedge clk iff frame_done);
      @(negedge clk);
      check(paddle1 == exp1, $sformatf("frame %0d paddle1 %p want %p", f, paddle1, exp1));
      check(paddle2 == exp2, $sformatf("frame %0d paddle2 %p want %p", f, paddle2, exp2));
      for (int i = 0; i < 8; i++) begin
        logic [9:0] want;
        case (i)
          0: want = exp1.p1.x; 1: want = exp1.p1.y; 2: want = exp1.p2.x; 3: want = exp1.p2.y;
          4: want = exp2.p1.x; 5: want = exp2.p1.y; 6: want = exp2.p2.x; default: want = exp2.p2.y;
        endcase
        check(mem_i.mem[(PADDLE_ADDR >> 2) + i] == 32'(want), $sformatf("frame %0d written word %0d", f, i));
      end
      if (f == 0) begin
        // 1 bounds burst + 19200 pixel bursts, each within 1 + 10 + 16 cycles (+1 to restart)
        check(mem_i.bursts_rd - bursts0 == 1 + H * V / 16,
              $sformatf("read bursts %0d", mem_i.bursts_rd - bursts0));
        check(cyc - t0 <= (1 + H * V / 16) * 28 + 64, $sformatf("frame took %0d cycles", cyc - t0));
        $display("frame scan: %0d cycles", cyc - t0);
      end
      build_frame(f + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
