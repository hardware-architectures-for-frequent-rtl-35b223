// tb_fim_core: self-checking test of one accelerator. Random datasets of up
// to 8 items are placed in the memory model as binary vectors; the core runs
// items mining and then itemset mining over all classes. The results are
// compared with a brute-force count over every subset of the items: the
// frequent-item list, and every record (cardinality, ordered label, support,
// binary vector), with no itemset missing or repeated. The BRAM depth is cut
// to 2 words so that vectors of 100 transactions are processed in chunks;
// 64-transaction datasets fit one chunk and exercise prefix reuse. The
// counting pass is checked to take one cycle per two words.
module tb_fim_core;
  import fim_pkg::*;

  localparam int unsigned DEPTH = 2;
  localparam int unsigned MAX_K = 32;
  localparam int unsigned LW    = (MAX_K + 1) / 2;
  localparam int unsigned NI_MAX = 8;
  localparam int unsigned NT_MAX = 128;
  localparam addr_t VEC_BASE = 32'h0000_0100;
  localparam addr_t FI_BASE  = 32'h0000_1000;
  localparam addr_t RES_BASE = 32'h0000_2000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start_items, start_mine, busy, done, k_overflow;
  addr_t vec_base, fi_base, res_base, res_end;
  word_t n_trans, n_items, smin, nf_cfg, cls_first, cls_end, nf_out, n_itemsets;
  item_t first_label;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req;
  word_t mem_rsp_data;

  fim_core #(.DEPTH(DEPTH), .MAX_K(MAX_K)) dut (
    .clk, .rst_n, .start_items, .start_mine, .busy, .done,
    .cfg_vec_base(vec_base), .cfg_n_trans(n_trans), .cfg_n_items(n_items),
    .cfg_first_label(first_label), .cfg_fi_base(fi_base), .cfg_smin(smin),
    .cfg_res_base(res_base), .cfg_nf(nf_cfg), .cfg_cls_first(cls_first),
    .cfg_cls_end(cls_end), .nf_out, .n_itemsets, .res_end, .k_overflow,
    .mem_req_valid, .mem_req, .mem_req_ready, .mem_rsp_valid, .mem_rsp_data);

  offchip_mem_model #(.WORDS(65536), .LAT(3), .STALL_PCT(20)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // dataset: tr[i][t] = item i is in transaction t
  bit [NT_MAX-1:0] tr [NI_MAX];
  int ni, nt, wv;

  function automatic int ref_support(input int mask);
    int s = 0;
    for (int t = 0; t < nt; t++) begin
      bit in_all = 1'b1;
      for (int i = 0; i < ni; i++) if (mask[i] && !tr[i][t]) in_all = 1'b0;
      if (in_all) s++;
    end
    return s;
  endfunction

  // counting-pass throughput: two words per issue cycle
  int issue_cycles = 0, pair_starts = 0, chunk_passes_words = 0;
  int prefix_reuse = 0, flushes = 0;
  always @(posedge clk) begin
    if (dut.cnt_issue) issue_cycles++;
    if (dut.state == PR_START) pair_starts++;
    if (dut.state == PR_CHUNK && !dut.lp_start) prefix_reuse++;
    if (dut.state == MN_K_FLUSH) flushes++;
  end

  task automatic run_case(input int n_it, input int n_tr, input int density, input int s_min,
                          input int lbl0);
    int w_issue, exp_nf, exp_sets, rs, fi_idx [NI_MAX];
    bit seen [256];
    int issue0, pairs0;
    ni = n_it; nt = n_tr; wv = (nt + 31) / 32;
    for (int i = 0; i < ni; i++) begin
      tr[i] = '0;
      for (int t = 0; t < nt; t++) tr[i][t] = ($urandom_range(99) < density);
    end
    for (int i = 0; i < ni; i++)
      for (int w = 0; w < wv; w++)
        u_mem.mem[VEC_BASE + i*wv + w] = tr[i][32*w +: 32];
    vec_base = VEC_BASE; fi_base = FI_BASE; res_base = RES_BASE;
    n_trans = nt; n_items = ni; smin = s_min; first_label = item_t'(lbl0);

    // ---- items mining
    @(posedge clk); start_items <= 1'b1; @(posedge clk); start_items <= 1'b0;
    wait (done); @(posedge clk);
    exp_nf = 0;
    for (int i = 0; i < ni; i++) begin
      int s = ref_support(1 << i);
      if (s >= s_min) begin
        check(u_mem.mem[FI_BASE + 2*exp_nf] == word_t'(lbl0 + i), $sformatf("FI label %0d", exp_nf));
        check(u_mem.mem[FI_BASE + 2*exp_nf + 1] == word_t'(s), $sformatf("FI support %0d", exp_nf));
        fi_idx[exp_nf] = i;
        exp_nf++;
      end
    end
    check(nf_out == word_t'(exp_nf), $sformatf("nf %0d exp %0d", nf_out, exp_nf));

    // ---- itemset mining, all classes
    issue0 = issue_cycles; pairs0 = pair_starts;
    nf_cfg = nf_out; cls_first = 0; cls_end = nf_out;
    @(posedge clk); start_mine <= 1'b1; @(posedge clk); start_mine <= 1'b0;
    wait (done); @(posedge clk);

    rs = 2 + LW + wv;
    for (int m = 0; m < 256; m++) seen[m] = 1'b0;
    for (int r = 0; r < int'(n_itemsets); r++) begin
      addr_t a = RES_BASE + r*rs;
      int card = int'(u_mem.mem[a]);
      int mask = 0, prev = -1;
      bit ok_order = 1'b1;
      for (int k = 0; k < card && k < MAX_K; k++) begin
        word_t lw = u_mem.mem[a + 2 + k/2];
        int it = int'(k % 2 ? lw[31:16] : lw[15:0]) - lbl0;
        if (it <= prev || it >= ni) ok_order = 1'b0;
        else mask |= (1 << it);
        prev = it;
      end
      check(ok_order && card >= 2 && $countones(mask) == card, $sformatf("record %0d label", r));
      check(!seen[mask], $sformatf("record %0d repeated", r));
      seen[mask] = 1'b1;
      check(int'(u_mem.mem[a + 1]) == ref_support(mask) && ref_support(mask) >= s_min,
            $sformatf("record %0d support %0d exp %0d", r, u_mem.mem[a + 1], ref_support(mask)));
      for (int w = 0; w < wv; w++) begin
        word_t e = '1;
        for (int i = 0; i < ni; i++) if (mask[i]) e &= tr[i][32*w +: 32];
        check(u_mem.mem[a + 2 + LW + w] == e, $sformatf("record %0d vector word %0d", r, w));
      end
    end
    exp_sets = 0;
    for (int m = 0; m < (1 << ni); m++)
      if ($countones(m) >= 2 && ref_support(m) >= s_min) begin
        exp_sets++;
        check(seen[m], $sformatf("itemset %0h missing", m));
      end
    check(n_itemsets == word_t'(exp_sets), $sformatf("itemsets %0d exp %0d", n_itemsets, exp_sets));
    check(res_end == RES_BASE + addr_t'(exp_sets * rs), "res_end");
    check(!k_overflow, "no overflow");
    // counting throughput: ceil(len/2) issue cycles per chunk of each pair
    w_issue = 0;
    for (int off = 0; off < wv; off += DEPTH) begin
      int len = (wv - off > int'(DEPTH)) ? DEPTH : wv - off;
      w_issue += (len + 1) / 2;
    end
    check(issue_cycles - issue0 == (pair_starts - pairs0) * w_issue,
          $sformatf("count cycles %0d exp %0d", issue_cycles - issue0, (pair_starts - pairs0) * w_issue));
    $display("case items=%0d trans=%0d smin=%0d: nf=%0d itemsets=%0d cycles=%0d",
             ni, nt, s_min, exp_nf, exp_sets, cycles);
  endtask

  initial begin
    start_items = 0; start_mine = 0;
    vec_base = 0; fi_base = 0; res_base = 0; n_trans = 0; n_items = 0; smin = 0;
    nf_cfg = 0; cls_first = 0; cls_end = 0; first_label = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run_case(4, 64, 70, 20, 1);     // one chunk: prefix stays resident
    run_case(8, 100, 60, 30, 100);  // two chunks per vector
    run_case(6, 100, 85, 50, 7);    // dense: long itemsets
    run_case(5, 40, 10, 30, 0);     // almost nothing frequent
    check(prefix_reuse > 0, "prefix kept for several suffixes");
    check(flushes > 0, "prefix flushed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
