// tb_fim_top: end-to-end test of the dual-core architecture. Random datasets
// are written into the memory model; one start pulse runs items mining on
// core 0 and itemset mining on both cores, core 0 taking the class of the
// first frequent item and core 1 the rest. All records of both cores are
// checked against a brute-force count over every subset of the items, and
// each core is checked to have produced exactly the itemsets of its classes.
// The sizes are reduced so that every mechanism occurs: 2-word BRAMs (chunked
// vectors), itemsets limited to 4 items (overflow of the label register), a
// 2-entry read-ID FIFO and a stalling memory. Each mechanism is counted and
// one that never happens counts as a failure.
module tb_fim_top;
  import fim_pkg::*;

  localparam int unsigned NC    = 2;
  localparam int unsigned DEPTH = 2;
  localparam int unsigned MAX_K = 4;
  localparam int unsigned LW    = (MAX_K + 1) / 2;
  localparam int unsigned NI_MAX = 8;
  localparam int unsigned NT_MAX = 128;
  localparam addr_t VEC_BASE = 32'h0000_0100;
  localparam addr_t FI_BASE  = 32'h0000_1000;
  localparam addr_t RES0     = 32'h0000_2000;
  localparam addr_t RES1     = 32'h0000_6000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done;
  addr_t vec_base, fi_base;
  word_t n_trans, n_items, smin, nf;
  item_t first_label;
  addr_t res_base [NC];
  word_t class_start [NC];
  word_t n_itemsets [NC];
  addr_t res_end [NC];
  logic  k_overflow [NC];
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req;
  word_t mem_rsp_data;

  fim_top #(.N_CORES(NC), .DEPTH(DEPTH), .MAX_K(MAX_K), .OUTSTANDING(2)) dut (
    .clk, .rst_n, .start, .vec_base, .n_trans, .n_items, .first_label, .fi_base, .smin,
    .res_base, .class_start, .busy, .done, .nf, .n_itemsets, .res_end, .k_overflow,
    .mem_req_valid, .mem_req, .mem_req_ready, .mem_rsp_valid, .mem_rsp_data);

  offchip_mem_model #(.WORDS(65536), .LAT(6), .STALL_PCT(15)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  int checks = 0, failures = 0;
  int cycles = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  int n_chunk_step = 0, n_prefix_reuse = 0, n_flush_card = 0, n_flush_prefix = 0;
  int n_infrequent = 0, n_frequent = 0, n_both_mining = 0, n_conflict = 0;
  int n_stall = 0, n_fifo_full = 0, n_overflow_skip = 0;
  always @(posedge clk) begin
    cycles++;
    if (dut.g_core[0].u_core.state == PR_NEXT_CHUNK && !dut.g_core[0].u_core.chunk_last) n_chunk_step++;
    if (dut.g_core[1].u_core.state == PR_CHUNK && !dut.g_core[1].u_core.lp_start) n_prefix_reuse++;
    if (dut.g_core[0].u_core.state == PR_CHUNK && !dut.g_core[0].u_core.lp_start) n_prefix_reuse++;
    if (dut.g_core[1].u_core.state == MN_K_J_CARD && dut.g_core[1].u_core.rd_q[7:0] != dut.g_core[1].u_core.pk) n_flush_card++;
    if (dut.g_core[1].u_core.state == MN_K_J_CMP && !dut.g_core[1].u_core.prefix_match) n_flush_prefix++;
    if (dut.g_core[1].u_core.state == PR_CMP && !dut.g_core[1].u_core.frequent) n_infrequent++;
    if (dut.g_core[1].u_core.state == PR_CMP && dut.g_core[1].u_core.frequent) n_frequent++;
    if (dut.g_core[1].u_core.state == MN_K_J_CMP && dut.g_core[1].u_core.prefix_match &&
        int'(dut.g_core[1].u_core.pk) >= int'(MAX_K)) n_overflow_skip++;
    if (dut.g_core[0].u_core.state == MN_K_J_CMP && dut.g_core[0].u_core.prefix_match &&
        int'(dut.g_core[0].u_core.pk) >= int'(MAX_K)) n_overflow_skip++;
    if (dut.g_core[0].u_core.state inside {[MN_CLASS:PR_DONE]} &&
        dut.g_core[1].u_core.state inside {[MN_CLASS:PR_DONE]}) n_both_mining++;
    if (dut.c_req_valid[0] && dut.c_req_valid[1]) n_conflict++;
    if (mem_req_valid && !mem_req_ready) n_stall++;
    if (dut.u_mem_sub.any && dut.u_mem_sub.blocked) n_fifo_full++;
  end

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

  function automatic int low_item(input int mask);
    for (int i = 0; i < 32; i++) if (mask[i]) return i;
    return -1;
  endfunction

  task automatic run_case(input int n_it, input int n_tr, input int density, input int s_min,
                          input int lbl0);
    int exp_nf, exp_sets, rs, fi_idx [NI_MAX], t0;
    bit seen [256];
    bit exp_ovf;
    ni = n_it; nt = n_tr; wv = (nt + 31) / 32;
    for (int i = 0; i < ni; i++) begin
      tr[i] = '0;
      for (int t = 0; t < nt; t++) tr[i][t] = ($urandom_range(99) < density);
    end
    for (int i = 0; i < ni; i++)
      for (int w = 0; w < wv; w++)
        u_mem.mem[VEC_BASE + i*wv + w] = tr[i][32*w +: 32];
    vec_base = VEC_BASE; fi_base = FI_BASE;
    res_base[0] = RES0; res_base[1] = RES1;
    class_start[0] = 0; class_start[1] = 1;
    n_trans = nt; n_items = ni; smin = s_min; first_label = item_t'(lbl0);

    t0 = cycles;
    @(posedge clk); start <= 1'b1; @(posedge clk); start <= 1'b0;
    wait (done); @(posedge clk);

    exp_nf = 0;
    for (int i = 0; i < ni; i++) begin
      int s = ref_support(1 << i);
      if (s >= s_min) begin
        check(u_mem.mem[FI_BASE + 2*exp_nf] == word_t'(lbl0 + i), "FI label");
        check(u_mem.mem[FI_BASE + 2*exp_nf + 1] == word_t'(s), "FI support");
        fi_idx[exp_nf] = i;
        exp_nf++;
      end
    end
    check(nf == word_t'(exp_nf), $sformatf("nf %0d exp %0d", nf, exp_nf));

    rs = 2 + LW + wv;
    for (int m = 0; m < 256; m++) seen[m] = 1'b0;
    for (int c = 0; c < int'(NC); c++) begin
      for (int r = 0; r < int'(n_itemsets[c]); r++) begin
        addr_t a = res_base[c] + r*rs;
        int card = int'(u_mem.mem[a]);
        int mask = 0, prev = -1;
        bit ok_order = 1'b1;
        for (int k = 0; k < card && k < int'(MAX_K); k++) begin
          word_t lw = u_mem.mem[a + 2 + k/2];
          int it = int'(k % 2 ? lw[31:16] : lw[15:0]) - lbl0;
          if (it <= prev || it >= ni) ok_order = 1'b0;
          else mask |= (1 << it);
          prev = it;
        end
        check(ok_order && card >= 2 && card <= int'(MAX_K) && $countones(mask) == card,
              $sformatf("core %0d record %0d label", c, r));
        check(!seen[mask], "record repeated");
        seen[mask] = 1'b1;
        // class split: core 0 holds exactly the itemsets led by the first frequent item
        check((low_item(mask) == fi_idx[0]) == (c == 0), $sformatf("core %0d record %0d class", c, r));
        check(int'(u_mem.mem[a + 1]) == ref_support(mask) && ref_support(mask) >= s_min,
              $sformatf("core %0d record %0d support", c, r));
        for (int w = 0; w < wv; w++) begin
          word_t e = '1;
          for (int i = 0; i < ni; i++) if (mask[i]) e &= tr[i][32*w +: 32];
          check(u_mem.mem[a + 2 + LW + w] == e, "record vector");
        end
      end
      check(res_end[c] == res_base[c] + addr_t'(int'(n_itemsets[c]) * rs), "res_end");
    end
    exp_sets = 0;
    exp_ovf = 1'b0;
    for (int m = 0; m < (1 << ni); m++) begin
      if ($countones(m) >= 2 && $countones(m) <= int'(MAX_K) && ref_support(m) >= s_min) begin
        exp_sets++;
        check(seen[m], $sformatf("itemset %0h missing", m));
      end
      // two frequent MAX_K-itemsets with a common (MAX_K-1)-prefix would form a longer one
      if ($countones(m) == int'(MAX_K) + 1) begin
        int hi1, hi2, m1, m2;
        hi1 = -1; hi2 = -1;
        for (int i = 0; i < ni; i++) if (m[i]) begin hi2 = hi1; hi1 = i; end
        m1 = m & ~(1 << hi1);
        m2 = m & ~(1 << hi2);
        if (ref_support(m1) >= s_min && ref_support(m2) >= s_min) exp_ovf = 1'b1;
      end
    end
    check(n_itemsets[0] + n_itemsets[1] == word_t'(exp_sets),
          $sformatf("itemsets %0d exp %0d", n_itemsets[0] + n_itemsets[1], exp_sets));
    check((k_overflow[0] || k_overflow[1]) == exp_ovf, "overflow flag");
    $display("case items=%0d trans=%0d smin=%0d: nf=%0d itemsets=%0d+%0d cycles=%0d",
             ni, nt, s_min, exp_nf, n_itemsets[0], n_itemsets[1], cycles - t0);
  endtask

  initial begin
    start = 0;
    vec_base = 0; fi_base = 0; n_trans = 0; n_items = 0; smin = 0; first_label = 0;
    res_base[0] = 0; res_base[1] = 0; class_start[0] = 0; class_start[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run_case(5, 64, 70, 20, 1);
    run_case(8, 100, 60, 30, 200);
    run_case(7, 100, 85, 50, 3);
    run_case(6, 90, 40, 20, 0);
    check(n_chunk_step > 0,    $sformatf("chunk iteration %0d", n_chunk_step));
    check(n_prefix_reuse > 0,  $sformatf("prefix kept %0d", n_prefix_reuse));
    check(n_flush_card > 0,    $sformatf("flush on cardinality %0d", n_flush_card));
    check(n_flush_prefix > 0,  $sformatf("flush on prefix %0d", n_flush_prefix));
    check(n_frequent > 0,      $sformatf("frequent candidates %0d", n_frequent));
    check(n_infrequent > 0,    $sformatf("infrequent candidates %0d", n_infrequent));
    check(n_both_mining > 0,   $sformatf("cores mining together %0d", n_both_mining));
    check(n_conflict > 0,      $sformatf("arbitration conflicts %0d", n_conflict));
    check(n_stall > 0,         $sformatf("memory stalls %0d", n_stall));
    check(n_fifo_full > 0,     $sformatf("read-ID FIFO full %0d", n_fifo_full));
    check(n_overflow_skip > 0, $sformatf("itemset length limit %0d", n_overflow_skip));
    $display("mechanisms: chunk=%0d reuse=%0d flush_card=%0d flush_prefix=%0d freq=%0d infreq=%0d both=%0d conflict=%0d stall=%0d fifo_full=%0d overflow=%0d",
             n_chunk_step, n_prefix_reuse, n_flush_card, n_flush_prefix, n_frequent, n_infrequent,
             n_both_mining, n_conflict, n_stall, n_fifo_full, n_overflow_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
