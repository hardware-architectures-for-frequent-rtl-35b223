// tb_result_writer: two arrays stand in for the prefix and suffix BRAMs
// (registered read, output held while not enabled). The writer must store the
// AND of each word pair at dst, dst+1, ... in a stalling memory model, write
// nothing else, and pulse done once. With a memory that never stalls it must
// write one word per cycle.
module tb_result_writer;
  import fim_pkg::*;
  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, rd_en, req_valid, req_ready, busy, done;
  addr_t dst;
  logic [AW:0] len;
  logic [AW-1:0] rd_addr;
  word_t vec_word;
  mem_req_t req;

  result_writer #(.DEPTH(DEPTH)) dut (.*);

  word_t P [DEPTH], S [DEPTH];
  always_ff @(posedge clk) if (rd_en) vec_word <= P[rd_addr] & S[rd_addr];

  logic rsp_valid;
  word_t rsp_data;
  int stall_pct;
  logic ready_m;
  offchip_mem_model #(.WORDS(4096), .LAT(2), .STALL_PCT(35)) u_mem (
    .clk, .rst_n, .req_valid(req_valid && stall_pct != 0), .req, .req_ready(ready_m),
    .rsp_valid(rsp_valid), .rsp_data(rsp_data));
  // a memory that always accepts, for the throughput check
  word_t fastmem [4096];
  always @(posedge clk) if (stall_pct == 0 && req_valid) fastmem[req.addr % 4096] = req.wdata;
  assign req_ready = (stall_pct != 0) ? ready_m : 1'b1;

  int checks = 0, failures = 0, ndone = 0, nwr = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (done) ndone++;
    if (req_valid && req_ready) nwr++;
  end

  task automatic store(input int d, input int n, input bit fast);
    int t0;
    bit ok;
    stall_pct = fast ? 0 : 35;
    for (int i = 0; i < DEPTH; i++) begin P[i] = $urandom; S[i] = $urandom; end
    for (int i = 0; i < 4096; i++) begin u_mem.mem[i] = 32'hdead_beef; fastmem[i] = 32'hdead_beef; end
    ndone = 0; nwr = 0;
    @(negedge clk); start = 1; dst = addr_t'(d); len = (AW+1)'(n); t0 = cyc;
    @(negedge clk); start = 0;
    while (ndone == 0) @(negedge clk);
    repeat (3) @(negedge clk);
    ok = (ndone == 1) && (nwr == n) && !busy;
    for (int i = 0; i < 4096; i++) begin
      word_t got, e;
      got = fast ? fastmem[i] : u_mem.mem[i];
      e = (i >= d && i < d + n) ? (P[i-d] & S[i-d]) : 32'hdead_beef;
      if (got != e) ok = 0;
    end
    checks++;
    if (!ok) begin failures++; $display("FAIL store dst=%0d n=%0d nwr=%0d done=%0d", d, n, nwr, ndone); end
    if (fast && n > 0) begin
      checks++;
      // start edge, start sampled, one BRAM read cycle, n writes, done registered
      if (cyc - 3 - t0 != 1 + n + 2) begin failures++; $display("FAIL rate n=%0d took %0d", n, cyc - 3 - t0); end
    end
  endtask

  initial begin
    start = 0; dst = 0; len = 0; stall_pct = 35;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    store(5, 0, 0);
    store(7, 1, 0);
    store(100, DEPTH, 0);
    for (int k = 0; k < 20; k++) store($urandom_range(3000), $urandom_range(DEPTH), k % 2);
    store(50, DEPTH, 1);
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
