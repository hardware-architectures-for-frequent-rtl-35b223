// tb_mem_arbiter: three masters issue random reads and writes, each to its
// own address range, through the arbiter into a stalling memory model. Every
// read response must reach the master that asked, in order, with the value
// of that master's last write to the address (kept in a model per master).
// A master that keeps requesting must also be granted within a bounded
// number of cycles (no starvation under round-robin).
module tb_mem_arbiter;
  import fim_pkg::*;
  localparam int N = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     m_req_valid [N];
  mem_req_t m_req       [N];
  logic     m_req_ready [N];
  logic     m_rsp_valid [N];
  word_t    m_rsp_data  [N];
  logic     s_req_valid, s_req_ready, s_rsp_valid;
  mem_req_t s_req;
  word_t    s_rsp_data;

  mem_arbiter #(.N_MASTERS(N), .OUTSTANDING(4)) dut (.*);

  offchip_mem_model #(.WORDS(4096), .LAT(5), .STALL_PCT(25)) u_mem (
    .clk, .rst_n, .req_valid(s_req_valid), .req(s_req), .req_ready(s_req_ready),
    .rsp_valid(s_rsp_valid), .rsp_data(s_rsp_data));

  int checks = 0, failures = 0;
  word_t shadow [N][256];
  word_t expq [N][$];
  int    waited [N];
  int    sent [N], got [N];

  // masters: random requests held until accepted
  always @(posedge clk) begin
    if (rst_n) begin
      for (int m = 0; m < N; m++) begin
        if (m_rsp_valid[m]) begin
          checks++;
          if (expq[m].size() == 0 || m_rsp_data[m] != expq[m][0]) begin
            failures++; $display("FAIL master %0d response", m);
          end
          if (expq[m].size() != 0) void'(expq[m].pop_front());
          got[m]++;
        end
        if (m_req_valid[m] && m_req_ready[m]) begin
          int off;
          off = int'(m_req[m].addr) - 1024 * (m + 1);
          if (m_req[m].we) shadow[m][off] = m_req[m].wdata;
          else expq[m].push_back(shadow[m][off]);
          sent[m]++;
          waited[m] = 0;
        end else if (m_req_valid[m]) begin
          waited[m]++;
          if (waited[m] > 0 && s_req_valid && s_req_ready) begin
            checks++;
            if (waited[m] > N - 1 + 8) begin failures++; $display("FAIL master %0d starved", m); end
          end
        end
        if (!m_req_valid[m] || m_req_ready[m]) begin
          m_req_valid[m] <= ($urandom_range(9) < 7) && (sent[m] < 400);
          m_req[m] <= '{we: $urandom_range(1), addr: addr_t'(1024 * (m + 1) + $urandom_range(255)),
                        wdata: $urandom};
        end
      end
    end
  end

  initial begin
    for (int m = 0; m < N; m++) begin
      m_req_valid[m] = 0; m_req[m] = '0; waited[m] = 0; sent[m] = 0; got[m] = 0;
      for (int a = 0; a < 256; a++) begin
        shadow[m][a] = $urandom;
        u_mem.mem[1024 * (m + 1) + a] = shadow[m][a];
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (sent[0] == 400 && sent[1] == 400 && sent[2] == 400);
    repeat (20) @(posedge clk);
    for (int m = 0; m < N; m++) begin
      checks++;
      if (expq[m].size() != 0) begin failures++; $display("FAIL master %0d missing responses", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
