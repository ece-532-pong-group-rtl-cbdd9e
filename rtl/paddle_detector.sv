// paddle_detector: finds the two endpoints of each of the two player paddles
// in the captured video frame.
//
// How it works. A PLB master loops over four steps: (1) read the 12 colour
// bounds that the processor keeps in memory, as one 12-word burst: lower and
// upper bound of red, green and blue for End Colour 1, then the same for End
// Colour 2 (the low byte of each word); (2) read the frame from FRAME_BASE in
// bursts of 16 pixels, line by line; (3) test every pixel as it arrives: if
// each of its R, G and B lies strictly between the End Colour 1 bounds it is
// endpoint 1, otherwise if it lies strictly between the End Colour 2 bounds it
// is endpoint 2, and a pixel left of column SPLIT_X belongs to paddle 1, any
// other to paddle 2, whose endpoint then takes the pixel's (X, Y); (4) write
// the 8 coordinates to PADDLE_ADDR as one burst (paddle 1 X1, Y1, X2, Y2, then
// paddle 2). The coordinates are never cleared, so the last matching pixel of
// a frame wins and an endpoint keeps its place when nothing matches.
//
// Interface: `mpmc_done_init` must be high before the first request. The
// coordinates are outputs (for the ball control core and the processor's GPIO)
// and are updated pixel by pixel during the scan. `frame_done` pulses after
// each write-back.
//
// From the design: the four-step loop, the 12 bounds, the strict comparisons,
// the End Colour 1 before End Colour 2 order, the split at X < 480/2 (this
// literal value is kept although the frame is 640 wide, see SPLIT_X), the
// 16-pixel bursts and the 8 written values. This design's own choices: the
// address map, the order of the bounds and coordinates in memory, and the
// byte of the word that holds a bound.
module paddle_detector
  import pong_pkg::*;
#(
  parameter int unsigned H_ACTIVE    = 640,
  parameter int unsigned V_ACTIVE    = 480,
  parameter int unsigned SPLIT_X     = 240,
  parameter logic [31:0] FRAME_BASE  = 32'h0000_0000,
  parameter logic [31:0] BOUNDS_ADDR = 32'h0013_0000,
  parameter logic [31:0] PADDLE_ADDR = 32'h0013_0040
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     mpmc_done_init,
  output plb_m2s_t plb_o,
  input  plb_s2m_t plb_i,
  output paddle_t  paddle1,
  output paddle_t  paddle2,
  output logic     frame_done
);

  localparam int unsigned NPIX = H_ACTIVE * V_ACTIVE;
  localparam int unsigned PW   = $clog2(NPIX + 1);

  typedef enum logic [2:0] {
    D_IDLE, D_BOUNDS_REQ, D_BOUNDS, D_SCAN_REQ, D_SCAN, D_WRITE_REQ, D_WRITE
  } dstate_t;
  dstate_t dstate;

  logic [7:0]    bounds [12];
  logic [3:0]    widx;           // bounds word / coordinate word index
  logic [PW-1:0] burst_pix;      // first pixel of the current scan burst
  coord_t        px, py;         // coordinates of the next pixel to arrive

  logic        bm_start, bm_rnw, bm_wr_next, bm_rd_valid, bm_busy, bm_done;
  logic [31:0] bm_addr, bm_rd_data, bm_wr_data;
  logic [4:0]  bm_len;

  // ---------- pixel classification (Fig. 8 decision flow) ----------
  logic [7:0] pr, pg, pb;
  logic       is_c1, is_c2, left;
  assign pr = bm_rd_data[23:16];
  assign pg = bm_rd_data[15:8];
  assign pb = bm_rd_data[7:0];

  function automatic logic in_bounds(input logic [7:0] v, input logic [7:0] lo, input logic [7:0] hi);
    return (lo < v) && (v < hi);
  endfunction

  assign is_c1 = in_bounds(pr, bounds[0], bounds[1]) && in_bounds(pg, bounds[2], bounds[3]) &&
                 in_bounds(pb, bounds[4], bounds[5]);
  assign is_c2 = in_bounds(pr, bounds[6], bounds[7]) && in_bounds(pg, bounds[8], bounds[9]) &&
                 in_bounds(pb, bounds[10], bounds[11]);
  assign left  = px < COORD_W'(SPLIT_X);

  // ---------- sequencing ----------
  logic [PW-1:0] remain;
  assign remain = PW'(NPIX) - burst_pix;

  always_comb begin
    bm_rnw  = 1'b1;
    bm_addr = BOUNDS_ADDR;
    bm_len  = 5'd12;
    unique case (dstate)
      D_SCAN_REQ, D_SCAN: begin
        bm_addr = FRAME_BASE + 32'(32'(burst_pix) << 2);
        bm_len  = (remain >= PW'(PLB_MAX_BURST)) ? 5'(PLB_MAX_BURST) : 5'(remain);
      end
      D_WRITE_REQ, D_WRITE: begin
        bm_rnw  = 1'b0;
        bm_addr = PADDLE_ADDR;
        bm_len  = 5'd8;
      end
      default: ;
    endcase
  end
  assign bm_start = (dstate == D_BOUNDS_REQ) || (dstate == D_SCAN_REQ) ||
                    (dstate == D_WRITE_REQ);

  always_comb begin
    unique case (widx[2:0])
      3'd0: bm_wr_data = 32'(paddle1.p1.x);
      3'd1: bm_wr_data = 32'(paddle1.p1.y);
      3'd2: bm_wr_data = 32'(paddle1.p2.x);
      3'd3: bm_wr_data = 32'(paddle1.p2.y);
      3'd4: bm_wr_data = 32'(paddle2.p1.x);
      3'd5: bm_wr_data = 32'(paddle2.p1.y);
      3'd6: bm_wr_data = 32'(paddle2.p2.x);
      default: bm_wr_data = 32'(paddle2.p2.y);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dstate     <= D_IDLE;
      widx       <= '0;
      burst_pix  <= '0;
      px         <= '0;
      py         <= '0;
      paddle1    <= '0;
      paddle2    <= '0;
      frame_done <= 1'b0;
      for (int i = 0; i < 12; i++) bounds[i] <= '0;
    end else begin
      frame_done <= 1'b0;
      unique case (dstate)
        D_IDLE:
          if (mpmc_done_init) dstate <= D_BOUNDS_REQ;
        D_BOUNDS_REQ: begin
          widx   <= '0;
          dstate <= D_BOUNDS;
        end
        D_BOUNDS: begin
          if (bm_rd_valid) begin
            bounds[widx] <= bm_rd_data[7:0];
            widx         <= widx + 1'b1;
          end
          if (bm_done) begin
            burst_pix <= '0;
            px        <= '0;
            py        <= '0;
            dstate    <= D_SCAN_REQ;
          end
        end
        D_SCAN_REQ:
          dstate <= D_SCAN;
        D_SCAN: begin
          if (bm_rd_valid) begin
            if (is_c1) begin
              if (left) paddle1.p1 <= '{x: px, y: py};
              else      paddle2.p1 <= '{x: px, y: py};
            end else if (is_c2) begin
              if (left) paddle1.p2 <= '{x: px, y: py};
              else      paddle2.p2 <= '{x: px, y: py};
            end
            if (px == COORD_W'(H_ACTIVE - 1)) begin
              px <= '0;
              py <= py + 1'b1;
            end else begin
              px <= px + 1'b1;
            end
          end
          if (bm_done) begin
            if (burst_pix + PW'(bm_len) >= PW'(NPIX)) begin
              widx   <= '0;
              dstate <= D_WRITE_REQ;
            end else begin
              burst_pix <= burst_pix + PW'(bm_len);
              dstate    <= D_SCAN_REQ;
            end
          end
        end
        D_WRITE_REQ:
          dstate <= D_WRITE;
        D_WRITE: begin
          if (bm_wr_next) widx <= widx + 1'b1;
          if (bm_done) begin
            frame_done <= 1'b1;
            dstate     <= D_BOUNDS_REQ;
          end
        end
        default: dstate <= D_IDLE;
      endcase
    end
  end

  plb_burst_master u_master (
    .clk, .rst,
    .start    (bm_start),
    .rnw      (bm_rnw),
    .addr     (bm_addr),
    .len      (bm_len),
    .wr_data  (bm_wr_data),
    .wr_next  (bm_wr_next),
    .rd_valid (bm_rd_valid),
    .rd_data  (bm_rd_data),
    .busy     (bm_busy),
    .done     (bm_done),
    .plb_o,
    .plb_i
  );

endmodule
