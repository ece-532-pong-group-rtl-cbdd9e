// plb_mem_model: behavioural model of the multi-ported memory controller and
// DDR memory as seen from the PLB masters of the Pong cores. Not synthesizable
// in intent; for testbenches only.
//
// Each port serves fixed-length bursts: after a request the address is
// acknowledged at most ACK_MAX cycles after the request is seen, then one data
// acknowledge per cycle follows, the last one marked with wr_comp / rd_comp.
// With GAPS set, data acknowledges are spread out by random idle cycles.
// All ports share one word array `mem`, indexed by byte address / 4 modulo
// MEM_WORDS; testbenches read and write it hierarchically.
module plb_mem_model
  import pong_pkg::*;
#(
  parameter int unsigned NPORTS    = 1,
  parameter int unsigned MEM_WORDS = 1 << 19,
  parameter int unsigned ACK_MAX   = 10,
  parameter bit          GAPS      = 1'b0
) (
  input  logic     clk,
  input  plb_m2s_t m2s [NPORTS],
  output plb_s2m_t s2m [NPORTS]
);

  logic [31:0] mem [MEM_WORDS];

  typedef enum logic [1:0] {P_IDLE, P_ACK, P_DATA} pstate_t;
  pstate_t     st    [NPORTS];
  int unsigned wait_c[NPORTS];
  int unsigned cnt   [NPORTS];
  logic [31:0] base  [NPORTS];
  logic [4:0]  blen  [NPORTS];
  logic        rnw   [NPORTS];
  int unsigned bursts_rd, bursts_wr;

  function automatic int unsigned widx(input logic [31:0] a);
    return (a >> 2) % MEM_WORDS;
  endfunction

  initial begin
    for (int p = 0; p < NPORTS; p++) begin
      st[p] = P_IDLE;
      s2m[p] = '0;
    end
    bursts_rd = 0;
    bursts_wr = 0;
  end

  always @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      s2m[p].addr_ack <= 1'b0;
      s2m[p].wr_dack  <= 1'b0;
      s2m[p].wr_comp  <= 1'b0;
      s2m[p].rd_dack  <= 1'b0;
      s2m[p].rd_comp  <= 1'b0;
      case (st[p])
        P_IDLE:
          if (m2s[p].request && !s2m[p].addr_ack) begin
            st[p]     <= P_ACK;
            wait_c[p] <= $urandom_range(ACK_MAX - 2, 0);
          end
        P_ACK:
          if (wait_c[p] == 0) begin
            s2m[p].addr_ack <= 1'b1;
            base[p] <= m2s[p].addr;
            blen[p] <= m2s[p].len;
            rnw[p]  <= m2s[p].rnw;
            cnt[p]  <= 0;
            st[p]   <= P_DATA;
            if (m2s[p].rnw) bursts_rd <= bursts_rd + 1;
            else            bursts_wr <= bursts_wr + 1;
          end else begin
            wait_c[p] <= wait_c[p] - 1;
          end
        P_DATA:
          if (!GAPS || ($urandom_range(3, 0) != 0)) begin
            if (rnw[p]) begin
              s2m[p].rd_dack <= 1'b1;
              s2m[p].rd_data <= mem[widx(base[p] + 4 * cnt[p])];
              s2m[p].rd_comp <= (cnt[p] == blen[p] - 1);
            end else begin
              s2m[p].wr_dack <= 1'b1;
              s2m[p].wr_comp <= (cnt[p] == blen[p] - 1);
            end
            cnt[p] <= cnt[p] + 1;
            if (cnt[p] == blen[p] - 1) st[p] <= P_IDLE;
          end
        default: st[p] <= P_IDLE;
      endcase
      // The write data word is captured on the cycle the master sees wr_dack.
      if (s2m[p].wr_dack)
        mem[widx(base[p] + 4 * (cnt[p] - 1))] <= m2s[p].wr_data;
    end
  end

endmodule
