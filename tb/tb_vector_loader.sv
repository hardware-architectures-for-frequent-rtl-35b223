// tb_vector_loader: loads random stretches of a memory model (with latency
// and random stalls) and checks that every word arrives at the right BRAM
// address, in order, exactly once, that done pulses once after the last word,
// and that a zero length finishes at once. With a memory that never stalls,
// a load of n words must take n + latency + 2 cycles (one read per cycle).
module tb_vector_loader;
  import fim_pkg::*;
  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, req_valid, req_ready, rsp_valid, wr_en, busy, done;
  addr_t src;
  logic [AW:0] len;
  mem_req_t req;
  word_t rsp_data, wr_data;
  logic [AW-1:0] wr_addr;

  vector_loader #(.DEPTH(DEPTH)) dut (.*);

  // two memories: one that stalls, one that never does
  logic ready_s, ready_f, rv_s, rv_f;
  word_t rd_s, rd_f;
  bit fast;
  offchip_mem_model #(.WORDS(4096), .LAT(4), .STALL_PCT(30)) u_mem (
    .clk, .rst_n, .req_valid(req_valid && !fast), .req, .req_ready(ready_s),
    .rsp_valid(rv_s), .rsp_data(rd_s));
  offchip_mem_model #(.WORDS(4096), .LAT(4), .STALL_PCT(0)) u_fast (
    .clk, .rst_n, .req_valid(req_valid && fast), .req, .req_ready(ready_f),
    .rsp_valid(rv_f), .rsp_data(rd_f));
  assign req_ready = fast ? ready_f : ready_s;
  assign rsp_valid = fast ? rv_f : rv_s;
  assign rsp_data  = fast ? rd_f : rd_s;

  int checks = 0, failures = 0;
  int nwr, ndone, cyc;
  bit bad;
  addr_t src_q;
  always @(posedge clk) begin
    cyc++;
    if (wr_en) begin
      word_t e;
      e = fast ? u_fast.mem[src_q + nwr] : u_mem.mem[src_q + nwr];
      if (int'(wr_addr) != nwr || wr_data != e) bad = 1'b1;
      nwr++;
    end
    if (done) ndone++;
  end

  task automatic load(input int s, input int n, input bit f);
    int t0;
    fast = f;
    nwr = 0; ndone = 0; bad = 0; src_q = addr_t'(s);
    @(negedge clk); start = 1; src = addr_t'(s); len = (AW+1)'(n);
    t0 = cyc;
    @(negedge clk); start = 0;
    while (ndone == 0) @(negedge clk);
    repeat (6) @(negedge clk);
    checks++;
    if (bad || nwr != n || ndone != 1 || busy) begin
      failures++; $display("FAIL load src=%0d n=%0d got %0d words, %0d done", s, n, nwr, ndone);
    end
    if (f && n > 0) begin
      checks++;
      // start edge, n requests, LAT cycles of latency, registered done
      if (cyc - 6 - t0 != 1 + n + 4 + 1) begin
        failures++; $display("FAIL timing n=%0d took %0d", n, cyc - 6 - t0);
      end
    end
  endtask

  initial begin
    start = 0; src = 0; len = 0; fast = 0; cyc = 0;
    for (int i = 0; i < 4096; i++) begin u_mem.mem[i] = $urandom; u_fast.mem[i] = $urandom; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    load(0, 0, 0);
    load(10, 1, 0);
    load(100, DEPTH, 0);
    for (int k = 0; k < 30; k++) load($urandom_range(3000), $urandom_range(DEPTH), k % 2);
    load(200, DEPTH, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
