// mem_arbiter: the memory subsystem that lets several accelerators share the
// one 32-bit external memory port. Requests are granted round-robin, one per
// cycle: the master after the last granted one has priority. For every read
// that is granted, the number of the master is pushed into a FIFO; read
// responses come back from the memory in request order and are routed to the
// master at the head of the FIFO. Writes are posted and need no entry. When
// the FIFO is full, reads wait (writes still pass). Masters see the same
// bus as the memory: valid/ready on requests and an unstoppable response.
// The document only names this memory subsystem; round-robin arbitration
// and the ID FIFO are this design's own choices.
module mem_arbiter
  import fim_pkg::*;
#(
  parameter int unsigned N_MASTERS   = 2,
  parameter int unsigned OUTSTANDING = 16,
  localparam int unsigned IW = (N_MASTERS > 1) ? $clog2(N_MASTERS) : 1,
  localparam int unsigned FW = $clog2(OUTSTANDING)
) (
  input  logic     clk,
  input  logic     rst_n,
  // masters
  input  logic     m_req_valid [N_MASTERS],
  input  mem_req_t m_req       [N_MASTERS],
  output logic     m_req_ready [N_MASTERS],
  output logic     m_rsp_valid [N_MASTERS],
  output word_t    m_rsp_data  [N_MASTERS],
  // memory
  output logic     s_req_valid,
  output mem_req_t s_req,
  input  logic     s_req_ready,
  input  logic     s_rsp_valid,
  input  word_t    s_rsp_data
);

  logic [IW-1:0] rr, gnt;
  logic          any;

  // pick the first requesting master at or after rr
  always_comb begin
    any = 1'b0;
    gnt = '0;
    for (int k = 0; k < int'(N_MASTERS); k++) begin
      if (!any && m_req_valid[(int'(rr) + k) % int'(N_MASTERS)]) begin
        any = 1'b1;
        gnt = IW'((int'(rr) + k) % int'(N_MASTERS));
      end
    end
  end

  // read-ID FIFO
  logic [IW-1:0] fifo [OUTSTANDING];
  logic [FW-1:0] wp, rp;
  logic [FW:0]   cnt;
  logic          full, push, pop;

  assign full = (cnt == (FW+1)'(OUTSTANDING));

  logic blocked;
  assign blocked     = !m_req[gnt].we && full;
  assign s_req_valid = any && !blocked;
  assign s_req       = m_req[gnt];

  always_comb begin
    for (int m = 0; m < int'(N_MASTERS); m++) begin
      m_req_ready[m] = s_req_ready && any && !blocked && (gnt == IW'(m));
      m_rsp_valid[m] = s_rsp_valid && (fifo[rp] == IW'(m));
      m_rsp_data[m]  = s_rsp_data;
    end
  end

  assign push = s_req_valid && s_req_ready && !s_req.we;
  assign pop  = s_rsp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr  <= '0;
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
      for (int k = 0; k < int'(OUTSTANDING); k++) fifo[k] <= '0;
    end else begin
      if (s_req_valid && s_req_ready)
        rr <= (int'(gnt) == int'(N_MASTERS) - 1) ? '0 : gnt + 1'b1;
      if (push) begin
        fifo[wp] <= gnt;
        wp <= (int'(wp) == int'(OUTSTANDING) - 1) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (int'(rp) == int'(OUTSTANDING) - 1) ? '0 : rp + 1'b1;
      cnt <= cnt + (FW+1)'(push) - (FW+1)'(pop);
    end
  end

  response_expected: assert property (@(posedge clk) disable iff (!rst_n)
    s_rsp_valid |-> cnt != 0);

endmodule
