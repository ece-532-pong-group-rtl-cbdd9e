// plb_burst_master: one fixed-length burst on the PLB, in the three steps of
// the design's bus-master flow: request the burst, wait for the slave's
// address acknowledge, then transfer the words (at most 16, one word per pixel).
//
// Interface: a one-cycle `start` with `rnw`, byte address `addr` and burst
// length `len` (1..16) begins a transfer while `busy` is low, or in the cycle
// `done` pulses, so that bursts can follow back to back. For a write the
// user keeps `wr_data` showing the current word and advances to the next one
// on every `wr_next` pulse (the slave's data acknowledge). For a read every
// word arrives on `rd_data` with `rd_valid`. `done` pulses for one cycle when
// the slave signals completion.
//
// Timing: the request is raised the cycle after `start` and held until the
// slave's addr_ack, so a burst of N words takes 1 + (ack wait) + N cycles when
// the slave acknowledges data every cycle; with the slave's acknowledge within
// 10 cycles a 16-word burst takes at most 27 cycles, the budget the design
// uses for its bandwidth calculation. The request/acknowledge/transfer order
// follows the design; the reduced signal set is this design's choice.
module plb_burst_master
  import pong_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // user side
  input  logic        start,
  input  logic        rnw,
  input  logic [31:0] addr,
  input  logic [4:0]  len,
  input  logic [31:0] wr_data,
  output logic        wr_next,
  output logic        rd_valid,
  output logic [31:0] rd_data,
  output logic        busy,
  output logic        done,
  // bus side
  output plb_m2s_t    plb_o,
  input  plb_s2m_t    plb_i
);

  typedef enum logic [1:0] {S_IDLE, S_REQUEST, S_TRANSFER} state_t;
  state_t      state;
  logic        rnw_q;
  logic [31:0] addr_q;
  logic [4:0]  len_q;
  logic        last;   // final data acknowledge of the burst
  logic        take;   // a start is accepted this cycle

  assign last = (state == S_TRANSFER) &&
                ((rnw_q && plb_i.rd_dack && plb_i.rd_comp) ||
                 (!rnw_q && plb_i.wr_dack && plb_i.wr_comp));
  assign take = start && (state == S_IDLE || last);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      rnw_q  <= 1'b0;
      addr_q <= '0;
      len_q  <= '0;
    end else begin
      if (take) begin
        rnw_q  <= rnw;
        addr_q <= addr;
        len_q  <= len;
      end
      unique case (state)
        S_IDLE:
          if (take) state <= S_REQUEST;
        S_REQUEST:
          if (plb_i.addr_ack) state <= S_TRANSFER;
        S_TRANSFER:
          if (last) state <= take ? S_REQUEST : S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    plb_o.request = (state == S_REQUEST);
    plb_o.rnw     = rnw_q;
    plb_o.addr    = addr_q;
    plb_o.len     = len_q;
    plb_o.wr_data = wr_data;
  end

  assign wr_next  = (state == S_TRANSFER) && !rnw_q && plb_i.wr_dack;
  assign rd_valid = (state == S_TRANSFER) && rnw_q && plb_i.rd_dack;
  assign rd_data  = plb_i.rd_data;
  assign busy     = (state != S_IDLE);
  assign done     = last;

  // Bus rules: a start is only accepted when idle or on the last word, the request stays up with
  // stable qualifiers until acknowledged, and data acknowledges only come in
  // the data phase.
  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !busy || last);
  a_req_hold:   assert property (@(posedge clk) disable iff (rst)
                  plb_o.request && !plb_i.addr_ack |=> plb_o.request && $stable(plb_o.addr));
  a_len_range:  assert property (@(posedge clk) disable iff (rst)
                  plb_o.request |-> (plb_o.len >= 5'd1 && plb_o.len <= 5'(PLB_MAX_BURST)));
  a_dack_phase: assert property (@(posedge clk) disable iff (rst)
                  (plb_i.wr_dack || plb_i.rd_dack) |-> state == S_TRANSFER);

endmodule
