// tb_fim_full: one complete mining job on the dual-core design with every
// parameter at its default (31250-word BRAMs, two cores). The dataset has
// 1,000,064 transactions and 5 items, so each binary vector is 31252 words
// and has to be processed in two chunks, the case of a dataset larger than
// the one-million-transaction BRAMs. Items are drawn independently with
// different densities, giving frequent itemsets of up to four items. The
// frequent-item list and every record of both cores are checked against
// supports computed word by word in the testbench.
module tb_fim_full;
  import fim_pkg::*;

  localparam int NI = 5;
  localparam int NT = 1000064;
  localparam int WV = (NT + 31) / 32;
  localparam int LW = 16;               // label words for the default MAX_K of 32
  localparam int SMIN = 300000;
  localparam addr_t VEC_BASE = 32'h0000_0000;
  localparam addr_t FI_BASE  = 32'h0002_8000;
  localparam addr_t RES0     = 32'h0003_0000;
  localparam addr_t RES1     = 32'h0008_0000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done;
  word_t nf;
  addr_t res_base [2];
  word_t class_start [2];
  word_t n_itemsets [2];
  addr_t res_end [2];
  logic  k_overflow [2];
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req;
  word_t mem_rsp_data;

  fim_top dut (
    .clk, .rst_n, .start, .vec_base(VEC_BASE), .n_trans(NT), .n_items(NI), .first_label(item_t'(1)),
    .fi_base(FI_BASE), .smin(SMIN), .res_base, .class_start, .busy, .done, .nf, .n_itemsets,
    .res_end, .k_overflow, .mem_req_valid, .mem_req, .mem_req_ready, .mem_rsp_valid, .mem_rsp_data);

  offchip_mem_model #(.WORDS(1 << 20), .LAT(4), .STALL_PCT(5)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  int checks = 0, failures = 0, cycles = 0, chunk_steps = 0;
  always @(posedge clk) begin
    cycles++;
    if (dut.g_core[1].u_core.state == PR_NEXT_CHUNK && !dut.g_core[1].u_core.chunk_last) chunk_steps++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  word_t vec [NI][WV];
  int density [NI] = '{90, 90, 90, 70, 40};

  function automatic int ref_support(input int mask);
    int s = 0;
    for (int w = 0; w < WV; w++) begin
      word_t a = '1;
      for (int i = 0; i < NI; i++) if (mask[i]) a &= vec[i][w];
      s += $countones(a);
    end
    return s;
  endfunction

  int sup [32];
  bit seen [32];

  task automatic run_job();
    int exp_nf, exp_sets, rs;
    res_base[0] = RES0; res_base[1] = RES1;
    class_start[0] = 0; class_start[1] = 1;
    for (int i = 0; i < NI; i++)
      for (int w = 0; w < WV; w++) begin
        word_t x = '0;
        for (int b = 0; b < 32; b++)
          if (32 * w + b < NT) x[b] = ($urandom_range(99) < density[i]);
        vec[i][w] = x;
        u_mem.mem[VEC_BASE + i * WV + w] = x;
      end
    for (int m = 1; m < 32; m++) begin sup[m] = ref_support(m); seen[m] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    @(posedge clk); start <= 1'b1; @(posedge clk); start <= 1'b0;
    wait (done); @(posedge clk);

    exp_nf = 0;
    for (int i = 0; i < NI; i++)
      if (sup[1 << i] >= SMIN) begin
        check(u_mem.mem[FI_BASE + 2 * exp_nf] == word_t'(1 + i), "FI label");
        check(u_mem.mem[FI_BASE + 2 * exp_nf + 1] == word_t'(sup[1 << i]), "FI support");
        exp_nf++;
      end
    check(nf == word_t'(exp_nf), "nf");
    rs = 2 + LW + WV;
    for (int c = 0; c < 2; c++)
      for (int r = 0; r < int'(n_itemsets[c]); r++) begin
        addr_t a = res_base[c] + addr_t'(r * rs);
        int card = int'(u_mem.mem[a]);
        int mask = 0;
        bit vec_ok = 1'b1;
        for (int k = 0; k < card && k < 32; k++) begin
          word_t lw = u_mem.mem[a + 2 + k / 2];
          int it = int'(k % 2 ? lw[31:16] : lw[15:0]) - 1;
          if (it >= 0 && it < NI) mask |= (1 << it);
        end
        check($countones(mask) == card && card >= 2 && !seen[mask], "record label");
        seen[mask] = 1'b1;
        check(int'(u_mem.mem[a + 1]) == sup[mask] && sup[mask] >= SMIN, "record support");
        check((mask & 1) == (c == 0 ? 1 : 0), "class split");
        for (int w = 0; w < WV; w++) begin
          word_t e = '1;
          for (int i = 0; i < NI; i++) if (mask[i]) e &= vec[i][w];
          if (u_mem.mem[a + 2 + LW + w] != e) vec_ok = 1'b0;
        end
        check(vec_ok, "record vector");
      end
    exp_sets = 0;
    for (int m = 1; m < 32; m++)
      if ($countones(m) >= 2 && sup[m] >= SMIN) begin
        exp_sets++;
        check(seen[m], $sformatf("itemset %0h missing", m));
      end
    check(n_itemsets[0] + n_itemsets[1] == word_t'(exp_sets), "itemset count");
    check(chunk_steps > 0, "vectors processed in chunks");
    $display("nf=%0d itemsets=%0d+%0d cycles=%0d", nf, n_itemsets[0], n_itemsets[1], cycles);
  endtask

  initial begin
    start = 0;
    run_job();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
