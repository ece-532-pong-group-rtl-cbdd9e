// tb_line_buffer: fills a line buffer from one clock, reads it back from an
// unrelated clock and checks every word, including the one-cycle read latency.
module tb_line_buffer;
  localparam int DEPTH = 640;
  logic wclk = 0, rclk = 0;
  always #37 wclk = ~wclk;
  always #5  rclk = ~rclk;

  logic        we;
  logic [9:0]  waddr, raddr;
  logic [23:0] wdata, rdata;
  logic [23:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  line_buffer #(.DEPTH(DEPTH), .WIDTH(24)) dut (.wclk, .we, .waddr, .wdata, .rclk, .raddr, .rdata);

  initial begin : watchdog
    repeat (100000) @(posedge rclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge wclk);
        we = 1; waddr = 10'(i); wdata = 24'($urandom); ref_mem[i] = wdata;
      end
      @(negedge wclk);
      // a write with enable low must not land
      we = 0; waddr = 10'd5; wdata = ~ref_mem[5];
      @(negedge wclk);
      for (int k = 0; k < 2 * DEPTH; k++) begin
        int i;
        i = (k < DEPTH) ? k : $urandom_range(DEPTH - 1, 0);
        @(negedge rclk);
        raddr = 10'(i);
        @(posedge rclk);
        #1;
        checks++;
        if (rdata !== ref_mem[i]) begin
          failures++;
          $display("FAIL addr %0d got %h want %h", i, rdata, ref_mem[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
