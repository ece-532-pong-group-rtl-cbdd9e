// video_to_ram: custom logic of the Video to Memory core. It takes the RGB
// pixel stream of the colour space converter and writes every active line of
// the frame into DDR memory through its own PLB master.
//
// How it works. Two line buffers are used in ping-pong fashion: while one is
// filled with the current line in the video clock domain, the other is
// emptied onto the bus in the 100 MHz domain. When the line sync signal rises
// (end of the active part of a line) the buffers swap and the finished line
// is handed to the bus side with a toggle that crosses into the 100 MHz
// domain through two flip-flops; the buffer index and line number it refers to
// stay stable for a whole line, far longer than the synchroniser delay. The
// bus side waits for MPMC_DoneInit, then writes the line as bursts of 16
// pixels, each requested in the cycle the previous one completes (one 32-bit word {0,R,G,B} per pixel) to
// FRAME_BASE + 4 * (line * H_ACTIVE + pixel).
//
// Interface: `vclk`, `vid_rgb`, `vid_line` (high during horizontal blanking)
// and `vid_line_count` (index of the active line, from the timing generator)
// come from the video path; `plb_o`/`plb_i` connect to the memory controller.
// `line_done` pulses once per line written; `overrun` is set (sticky) if a
// line completes before the previous one has left its buffer, which the
// design's bandwidth budget (at most 1 + 40 x 27 = 1081 bus cycles per line
// against a 63.55 us line period) rules out.
//
// From the design: double buffering with line granularity, swap on line sync,
// 16-pixel bursts, one word per pixel, the 640-pixel line. This design's own
// choices: the line sync polarity, the pixel word layout, the frame address
// map and the toggle handshake between the clock domains.
module video_to_ram
  import pong_pkg::*;
#(
  parameter int unsigned H_ACTIVE   = 640,
  parameter int unsigned V_ACTIVE   = 480,
  parameter logic [31:0] FRAME_BASE = 32'h0000_0000
) (
  input  logic        clk,            // 100 MHz system clock
  input  logic        rst,
  input  logic        mpmc_done_init,
  input  logic        vclk,           // 13.5 MHz video clock
  input  logic [23:0] vid_rgb,        // {R, G, B}
  input  logic        vid_line,       // line sync: 1 during horizontal blanking
  input  logic [9:0]  vid_line_count, // active line index
  output plb_m2s_t    plb_o,
  input  plb_s2m_t    plb_i,
  output logic        line_done,
  output logic        overrun
);

  localparam int unsigned AW     = $clog2(H_ACTIVE);

  // ---------------- video clock domain ----------------
  logic          vrst_m, vrst;       // reset synchronised to vclk
  logic          wsel;               // buffer being filled
  logic [AW:0]   wptr;
  logic          line_q;
  logic          hand_tog;           // toggles for every finished line
  logic          hand_buf;           // buffer holding the finished line
  logic [9:0]    hand_line;          // its line number

  always_ff @(posedge vclk) begin
    vrst_m <= rst;
    vrst   <= vrst_m;
  end

  always_ff @(posedge vclk) begin
    if (vrst) begin
      wsel      <= 1'b0;
      wptr      <= '0;
      line_q    <= 1'b1;
      hand_tog  <= 1'b0;
      hand_buf  <= 1'b0;
      hand_line <= '0;
    end else begin
      line_q <= vid_line;
      if (!vid_line && wptr < (AW+1)'(H_ACTIVE))
        wptr <= wptr + 1'b1;
      if (vid_line && !line_q) begin
        // end of the active part of the line: swap the buffers
        wptr <= '0;
        if (wptr != '0 && vid_line_count < 10'(V_ACTIVE)) begin
          wsel      <= ~wsel;
          hand_buf  <= wsel;
          hand_line <= vid_line_count;
          hand_tog  <= ~hand_tog;
        end
      end
    end
  end

  // ---------------- the two line buffers ----------------
  logic [AW-1:0] raddr;
  logic [23:0]   rdata [2];

  for (genvar b = 0; b < 2; b++) begin : g_buf
    line_buffer #(.DEPTH(H_ACTIVE), .WIDTH(24)) u_buf (
      .wclk  (vclk),
      .we    (!vid_line && !vrst && wsel == 1'(b) && wptr < (AW+1)'(H_ACTIVE)),
      .waddr (wptr[AW-1:0]),
      .wdata (vid_rgb),
      .rclk  (clk),
      .raddr (raddr),
      .rdata (rdata[b])
    );
  end

  // ---------------- 100 MHz bus domain ----------------
  logic [2:0]   tog_sync;
  logic         line_ready;
  logic         pending;
  logic         rsel;
  logic [9:0]   cur_line;
  logic [AW:0]  rd_ptr;         // next pixel to transfer
  logic [AW:0]  burst_pix;      // first pixel of the current burst
  logic [AW:0]  start_pix;      // first pixel of the burst being started
  logic         bm_start, bm_wr_next, bm_busy, bm_done, bm_rd_valid;
  logic [31:0]  bm_rd_data;
  logic [4:0]   bm_len;

  typedef enum logic [1:0] {B_IDLE, B_START, B_WAIT} bstate_t;
  bstate_t bstate;

  always_ff @(posedge clk) begin
    if (rst) tog_sync <= '0;
    else     tog_sync <= {tog_sync[1:0], hand_tog};
  end
  assign line_ready = tog_sync[2] ^ tog_sync[1];

  // Length of the burst starting at pixel p: 16, or what is left of the line.
  function automatic logic [4:0] burst_len(input logic [AW:0] p);
    return ((AW+1)'(H_ACTIVE) - p >= (AW+1)'(PLB_MAX_BURST)) ?
           5'(PLB_MAX_BURST) : 5'((AW+1)'(H_ACTIVE) - p);
  endfunction

  // While a burst is running, the next one is prepared so that it can be
  // started in the cycle the running one completes.
  logic [AW:0] next_pix;
  logic        line_end;
  assign next_pix = burst_pix + (AW+1)'(burst_len(burst_pix));
  assign line_end = next_pix >= (AW+1)'(H_ACTIVE);
  assign start_pix = (bstate == B_WAIT) ? next_pix : burst_pix;
  assign bm_len    = burst_len(start_pix);

  always_ff @(posedge clk) begin
    if (rst) begin
      bstate    <= B_IDLE;
      pending   <= 1'b0;
      rsel      <= 1'b0;
      cur_line  <= '0;
      rd_ptr    <= '0;
      burst_pix <= '0;
      line_done <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      line_done <= 1'b0;
      if (line_ready) begin
        if (pending || bstate != B_IDLE) overrun <= 1'b1;
        pending <= 1'b1;
      end
      if (bm_wr_next) rd_ptr <= rd_ptr + 1'b1;
      unique case (bstate)
        B_IDLE:
          if (pending && mpmc_done_init && !line_ready) begin
            pending   <= 1'b0;
            rsel      <= hand_buf;
            cur_line  <= hand_line;
            rd_ptr    <= '0;
            burst_pix <= '0;
            bstate    <= B_START;
          end
        B_START:
          bstate <= B_WAIT;
        B_WAIT:
          if (bm_done) begin
            if (line_end) begin
              line_done <= 1'b1;
              bstate    <= B_IDLE;
            end else begin
              burst_pix <= next_pix;   // next burst started in this cycle
            end
          end
        default: bstate <= B_IDLE;
      endcase
    end
  end

  assign bm_start = (bstate == B_START) || (bstate == B_WAIT && bm_done && !line_end);

  // Present the current pixel continuously: the registered read port is
  // addressed one word ahead whenever the slave takes a word.
  logic [AW:0] raddr_full;
  assign raddr_full = bm_wr_next ? rd_ptr + 1'b1 : rd_ptr;
  assign raddr      = (raddr_full >= (AW+1)'(H_ACTIVE)) ? '0 : raddr_full[AW-1:0];

  logic [31:0] line_addr;
  assign line_addr = FRAME_BASE +
                     32'((32'(cur_line) * 32'(H_ACTIVE) + 32'(start_pix)) << 2);

  plb_burst_master u_master (
    .clk, .rst,
    .start    (bm_start),
    .rnw      (1'b0),
    .addr     (line_addr),
    .len      (bm_len),
    .wr_data  (pack_rgb(rdata[rsel][23:16], rdata[rsel][15:8], rdata[rsel][7:0])),
    .wr_next  (bm_wr_next),
    .rd_valid (bm_rd_valid),
    .rd_data  (bm_rd_data),
    .busy     (bm_busy),
    .done     (bm_done),
    .plb_o,
    .plb_i
  );

endmodule
