// fim_core: one hardware accelerator (processor element) for frequent itemset
// mining over vertical binary vectors. Each item of the dataset is a binary
// vector in external memory, one bit per transaction, packed into 32-bit
// words. The core has two stages, each run by its own state machine:
//
//  * Items mining (start_items). For every item it loads the item's vector
//    into the prefix BRAM while counting its set bits, and if the support
//    reaches S_min it appends the entry {label, support} (two words) to the
//    frequent-item list at fi_base. nf_out gives the length of that list.
//
//  * Itemset mining (start_mine). For each equivalence class c in
//    [cls_first, cls_end) of the frequent-item list, it first forms the
//    2-itemsets: item c goes into the prefix BRAM, every later frequent item
//    in turn into the suffix BRAM, and each pair is intersected (AND) and
//    counted. Frequent pairs are appended as records (see fim_pkg) at the
//    write pointer, starting at res_base. Then it walks the class's records
//    in order: record i is the prefix, and each following record j that has
//    the same cardinality and the same first k-1 items is a suffix; their
//    intersection, if frequent, is appended with label = label(i) followed by
//    the last item of j. When the next record does not match, the prefix is
//    flushed and record i+1 becomes the prefix. The class ends when the
//    prefix pointer reaches the write pointer. Records stay in memory: they
//    are the result.
//
// A vector longer than one BRAM (DEPTH words) is processed in chunks: the
// Load Prefix and Load Suffix units run once per chunk and the support
// register accumulates across chunks. Each BRAM remembers which memory chunk
// it holds, so a prefix that stays the same for several suffixes is loaded
// only once when the vector fits in one BRAM. The counting pass reads two
// words of each BRAM per cycle (both ports), i.e. 64 transactions per cycle.
// When an intersection is frequent, its header and label are written first
// and then its vector is written from the BRAMs through the AND gates.
//
// Interface: cfg_* inputs are sampled when start_items or start_mine is
// pulsed while idle. done pulses once when the stage has finished. The memory
// port is the request/response bus of fim_pkg; the core has at most one
// unit talking on it at a time. The stage structure, the two BRAMs, the
// AND/count/compare datapath, the prefix/cardinality rule and the chunking
// follow the described architecture; the record layout, the label width,
// the maximum itemset length MAX_K, the bus and the chunk tags are this
// design's own choices. An itemset that would exceed MAX_K items is not
// formed; k_overflow then stays high until the next start.
module fim_core
  import fim_pkg::*;
#(
  parameter int unsigned DEPTH = 31250,
  parameter int unsigned MAX_K = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LW = (MAX_K + 1) / 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // control
  input  logic        start_items,
  input  logic        start_mine,
  output logic        busy,
  output logic        done,
  // configuration
  input  addr_t       cfg_vec_base,    // vector of item i at vec_base + i*W
  input  word_t       cfg_n_trans,     // number of transactions
  input  word_t       cfg_n_items,     // number of items
  input  item_t       cfg_first_label, // label of item 0; item i has label first_label+i
  input  addr_t       cfg_fi_base,     // frequent-item list
  input  word_t       cfg_smin,        // minimum support
  input  addr_t       cfg_res_base,    // first record written by itemset mining
  input  word_t       cfg_nf,          // length of the frequent-item list (mining)
  input  word_t       cfg_cls_first,   // first equivalence class (mining)
  input  word_t       cfg_cls_end,     // one past the last class (mining)
  // results
  output word_t       nf_out,          // frequent items found by items mining
  output word_t       n_itemsets,      // records written by itemset mining
  output addr_t       res_end,         // address after the last record
  output logic        k_overflow,
  // memory master port
  output logic        mem_req_valid,
  output mem_req_t    mem_req,
  input  logic        mem_req_ready,
  input  logic        mem_rsp_valid,
  input  word_t       mem_rsp_data
);


  core_state_t state, ret_state, pr_ret;

  // ---------------------------------------------------------------- config
  addr_t vec_base, fi_base;
  word_t n_items, nf, cls_end;
  item_t first_label;
  addr_t w_words;   // words per binary vector
  addr_t rec_size;  // words per record

  // ---------------------------------------------------------------- state
  word_t       item_i, cls, j_idx;
  addr_t       item_src;
  addr_t       wr_ptr, cls_start, i_ptr, j_ptr;
  addr_t       psrc, ssrc;
  addr_t       ch_off;
  logic        phase_wr;          // 0: counting pass, 1: writing the vector
  logic [AW:0] cnt_idx;
  logic [2:0]  drain;
  logic [$clog2(LW+2):0] q;       // word counter for labels and headers
  logic [7:0]  pk, sk;            // cardinality of prefix / suffix itemset
  logic        lbl_to_s;          // label words being read go to the suffix
  item_t       plabel [MAX_K];
  item_t       slabel [MAX_K];
  addr_t       ptag, stag;
  logic        ptag_v, stag_v;
  word_t       rd_q;

  // single word access by the controller
  logic     ctl_valid;
  mem_req_t ctl_req;

  // ---------------------------------------------------------------- chunk
  addr_t       rem;
  logic [AW:0] ch_len;
  always_comb begin
    rem    = w_words - ch_off;
    ch_len = (rem > addr_t'(DEPTH)) ? (AW+1)'(DEPTH) : rem[AW:0];
  end

  // ---------------------------------------------------------------- datapath
  logic          pa_en, pa_we, pb_en, sa_en, sa_we, sb_en;
  logic [AW-1:0] pa_addr, pb_addr, sa_addr, sb_addr;
  word_t         pa_wdata, sa_wdata, pa_rdata, pb_rdata, sa_rdata, sb_rdata;

  dp_bram #(.DEPTH(DEPTH), .WIDTH(WORD_W)) u_prefix (
    .clk, .a_en(pa_en), .a_we(pa_we), .a_addr(pa_addr), .a_wdata(pa_wdata), .a_rdata(pa_rdata),
    .b_en(pb_en), .b_we(1'b0), .b_addr(pb_addr), .b_wdata('0), .b_rdata(pb_rdata));

  dp_bram #(.DEPTH(DEPTH), .WIDTH(WORD_W)) u_suffix (
    .clk, .a_en(sa_en), .a_we(sa_we), .a_addr(sa_addr), .a_wdata(sa_wdata), .a_rdata(sa_rdata),
    .b_en(sb_en), .b_we(1'b0), .b_addr(sb_addr), .b_wdata('0), .b_rdata(sb_rdata));

  // Load Prefix / Load Suffix
  logic          lp_start, ls_start, lp_busy, ls_busy, lp_done, ls_done;
  addr_t         lp_src, ls_src;
  logic          lp_rv, ls_rv, lp_we, ls_we;
  mem_req_t      lp_req, ls_req;
  logic [AW-1:0] lp_addr, ls_addr;
  word_t         lp_data, ls_data;

  vector_loader #(.DEPTH(DEPTH)) u_load_prefix (
    .clk, .rst_n, .start(lp_start), .src(lp_src), .len(ch_len),
    .req_valid(lp_rv), .req(lp_req), .req_ready(mem_req_ready && lp_busy),
    .rsp_valid(mem_rsp_valid && lp_busy), .rsp_data(mem_rsp_data),
    .wr_en(lp_we), .wr_addr(lp_addr), .wr_data(lp_data), .busy(lp_busy), .done(lp_done));

  vector_loader #(.DEPTH(DEPTH)) u_load_suffix (
    .clk, .rst_n, .start(ls_start), .src(ls_src), .len(ch_len),
    .req_valid(ls_rv), .req(ls_req), .req_ready(mem_req_ready && ls_busy),
    .rsp_valid(mem_rsp_valid && ls_busy), .rsp_data(mem_rsp_data),
    .wr_en(ls_we), .wr_addr(ls_addr), .wr_data(ls_data), .busy(ls_busy), .done(ls_done));

  // intersection and support counting
  logic       item_mode;
  logic       cnt_issue, cnt_v1, cnt_issue_q, cnt_v1_q;
  logic       ic_valid, ic_v0, ic_v1, ic_ovalid;
  word_t      ic_p0, ic_s0, ic_p1, ic_s1, and0, and1;
  logic [6:0] ic_count;

  assign item_mode = (state == IT_LOAD) || (state == IT_DRAIN);

  always_comb begin
    if (item_mode) begin
      ic_valid = lp_we;  ic_v0 = 1'b1; ic_v1 = 1'b0;
      ic_p0 = lp_data;   ic_s0 = '1;   ic_p1 = '0; ic_s1 = '0;
    end else begin
      ic_valid = cnt_issue_q; ic_v0 = 1'b1; ic_v1 = cnt_v1_q;
      ic_p0 = pa_rdata; ic_s0 = sa_rdata; ic_p1 = pb_rdata; ic_s1 = sb_rdata;
    end
  end

  intersect_count u_and_count (
    .clk, .rst_n, .in_valid(ic_valid), .v0(ic_v0), .v1(ic_v1),
    .p0(ic_p0), .s0(ic_s0), .p1(ic_p1), .s1(ic_s1),
    .and0(and0), .and1(and1), .out_valid(ic_ovalid), .out_count(ic_count));

  logic  sup_clr, smin_we, frequent;
  word_t support, smin_reg;

  support_acc u_support (
    .clk, .rst_n, .smin_we(smin_we), .smin_in(cfg_smin), .clr(sup_clr),
    .add(ic_ovalid), .count(ic_count), .support(support), .smin(smin_reg),
    .frequent(frequent));

  // result store
  logic          wr_start, wr_busy, wr_done, wr_rd_en, wr_rv;
  logic [AW-1:0] wr_rd_addr;
  mem_req_t      wr_req;

  result_writer #(.DEPTH(DEPTH)) u_writer (
    .clk, .rst_n, .start(wr_start), .dst(wr_ptr + addr_t'(REC_LBL + LW) + ch_off),
    .len(ch_len), .rd_en(wr_rd_en), .rd_addr(wr_rd_addr), .vec_word(and0),
    .req_valid(wr_rv), .req(wr_req), .req_ready(mem_req_ready && wr_busy),
    .busy(wr_busy), .done(wr_done));

  // BRAM port multiplexing: loaders write port A, the counting pass reads
  // both ports, the writer reads port A.
  always_comb begin
    pa_we = lp_we; pa_wdata = lp_data;
    sa_we = ls_we; sa_wdata = ls_data;
    if (lp_busy)        begin pa_en = lp_we;    pa_addr = lp_addr;    end
    else if (wr_busy)   begin pa_en = wr_rd_en; pa_addr = wr_rd_addr; end
    else                begin pa_en = cnt_issue; pa_addr = cnt_idx[AW-1:0]; end
    if (ls_busy)        begin sa_en = ls_we;    sa_addr = ls_addr;    end
    else if (wr_busy)   begin sa_en = wr_rd_en; sa_addr = wr_rd_addr; end
    else                begin sa_en = cnt_issue; sa_addr = cnt_idx[AW-1:0]; end
    pb_en   = cnt_issue && cnt_v1;
    sb_en   = cnt_issue && cnt_v1;
    pb_addr = cnt_v1 ? AW'(cnt_idx + 1'b1) : '0;
    sb_addr = pb_addr;
  end

  assign cnt_issue = (state == PR_COUNT) && (cnt_idx < ch_len);
  assign cnt_v1    = cnt_issue && ((cnt_idx + 1'b1) < ch_len);

  // memory port multiplexing
  always_comb begin
    if (lp_busy)      begin mem_req_valid = lp_rv; mem_req = lp_req; end
    else if (ls_busy) begin mem_req_valid = ls_rv; mem_req = ls_req; end
    else if (wr_busy) begin mem_req_valid = wr_rv; mem_req = wr_req; end
    else              begin mem_req_valid = ctl_valid; mem_req = ctl_req; end
  end

  logic ctl_go;
  assign ctl_go = ctl_valid && mem_req_ready && !lp_busy && !ls_busy && !wr_busy;

  // ---------------------------------------------------------------- labels
  logic prefix_match;
  always_comb begin
    prefix_match = 1'b1;
    for (int t = 0; t < MAX_K - 1; t++)
      if (t + 1 < int'(pk) && plabel[t] != slabel[t]) prefix_match = 1'b0;
  end

  // label of the new itemset: the prefix followed by the suffix's last item
  item_t nlabel [MAX_K];
  always_comb begin
    for (int t = 0; t < MAX_K; t++) begin
      if (t < int'(pk))       nlabel[t] = plabel[t];
      else if (t == int'(pk)) nlabel[t] = slabel[(pk == 0) ? 0 : pk - 1];
      else                    nlabel[t] = '0;
    end
  end

  // header word q of the new record
  word_t hdr_word;
  always_comb begin
    if (int'(q) == REC_CARD)      hdr_word = word_t'(pk) + 1'b1;
    else if (int'(q) == REC_SUPP) hdr_word = support;
    else begin
      hdr_word = '0;
      for (int t = 0; t < LW; t++)
        if (int'(q) == REC_LBL + t)
          hdr_word = {(2*t+1 < MAX_K) ? nlabel[(2*t+1) % MAX_K] : item_t'(0), nlabel[2*t]};
    end
  end

  // number of label words holding k items
  function automatic logic [$clog2(LW+2):0] lbl_words(input logic [7:0] k);
    return ($clog2(LW+2)+1)'((9'(k) + 9'd1) >> 1);
  endfunction

  // vector address of item with the given label
  addr_t item_vec;
  assign item_vec = vec_base + addr_t'(word_t'(item_t'(rd_q[ITEM_W-1:0] - first_label)) * w_words);

  // ---------------------------------------------------------------- control
  logic chunk_last;
  assign chunk_last = (ch_off + addr_t'(DEPTH)) >= w_words;

  always_comb begin
    lp_start = 1'b0; ls_start = 1'b0; wr_start = 1'b0;
    lp_src   = item_src + ch_off;
    ls_src   = ssrc + ch_off;
    case (state)
      IT_ITEM:  lp_start = 1'b1;
      PR_CHUNK: begin
        lp_src = psrc + ch_off;
        lp_start = !(ptag_v && ptag == psrc + ch_off);
      end
      PR_CHK_S: ls_start = !(stag_v && stag == ssrc + ch_off);
      PR_OP:    wr_start = phase_wr;
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ret_state <= S_IDLE; pr_ret <= S_IDLE;
      vec_base <= '0; fi_base <= '0; n_items <= '0; nf <= '0;
      cls_end <= '0; first_label <= '0; w_words <= '0; rec_size <= '0;
      item_i <= '0; cls <= '0; j_idx <= '0; item_src <= '0;
      wr_ptr <= '0; cls_start <= '0; i_ptr <= '0; j_ptr <= '0;
      psrc <= '0; ssrc <= '0; ch_off <= '0; phase_wr <= 1'b0;
      cnt_idx <= '0; drain <= '0; q <= '0; pk <= '0; sk <= '0; lbl_to_s <= 1'b0;
      ptag <= '0; stag <= '0; ptag_v <= 1'b0; stag_v <= 1'b0; rd_q <= '0;
      ctl_valid <= 1'b0; ctl_req <= '0;
      cnt_issue_q <= 1'b0; cnt_v1_q <= 1'b0;
      sup_clr <= 1'b0; smin_we <= 1'b0;
      done <= 1'b0; nf_out <= '0; n_itemsets <= '0; res_end <= '0; k_overflow <= 1'b0;
      for (int t = 0; t < MAX_K; t++) begin plabel[t] <= '0; slabel[t] <= '0; end
    end else begin
      done        <= 1'b0;
      sup_clr     <= 1'b0;
      smin_we     <= 1'b0;
      cnt_issue_q <= cnt_issue;
      cnt_v1_q    <= cnt_v1;
      res_end     <= wr_ptr;

      case (state)
        // ------------------------------------------------------ S0: config
        S_IDLE: begin
          if (start_items || start_mine) begin
            vec_base    <= cfg_vec_base;
            fi_base     <= cfg_fi_base;
            n_items     <= cfg_n_items;
            smin_we     <= 1'b1;
            first_label <= cfg_first_label;
            w_words     <= addr_t'(({1'b0, cfg_n_trans} + 33'd31) >> 5);
            rec_size    <= addr_t'(REC_LBL + LW) + addr_t'(({1'b0, cfg_n_trans} + 33'd31) >> 5);
            ptag_v      <= 1'b0;
            stag_v      <= 1'b0;
            ch_off      <= '0;
            k_overflow  <= 1'b0;
          end
          if (start_items) begin
            item_i   <= '0;
            item_src <= cfg_vec_base;
            nf       <= '0;
            nf_out   <= '0;
            sup_clr  <= 1'b1;
            state    <= (cfg_n_items == '0) ? S_FINISH : IT_ITEM;
          end else if (start_mine) begin
            nf         <= cfg_nf;
            cls        <= cfg_cls_first;
            cls_end    <= (cfg_cls_end > cfg_nf) ? cfg_nf : cfg_cls_end;
            wr_ptr     <= cfg_res_base;
            n_itemsets <= '0;
            state      <= MN_CLASS;
          end
        end

        // ------------------------------------------ items mining S1 .. S3
        IT_ITEM:  state <= IT_LOAD;          // loader started for this chunk
        IT_LOAD:  if (lp_done) begin drain <= 3'd3; state <= IT_DRAIN; end
        IT_DRAIN: begin
          if (drain != 0) drain <= drain - 1'b1;
          else if (chunk_last) state <= IT_CMP;
          else begin ch_off <= ch_off + addr_t'(DEPTH); state <= IT_ITEM; end
        end
        IT_CMP: begin
          if (frequent) begin
            ctl_req   <= '{we: 1'b1, addr: fi_base + addr_t'({nf, 1'b0}),
                           wdata: word_t'(item_t'(first_label + item_t'(item_i)))};
            ctl_valid <= 1'b1;
            ret_state <= IT_WR_LBL;
            state     <= S_MEMWR;
          end else state <= IT_NEXT;
        end
        IT_WR_LBL: begin
          ctl_req   <= '{we: 1'b1, addr: fi_base + addr_t'({nf, 1'b0}) + 1'b1, wdata: support};
          ctl_valid <= 1'b1;
          ret_state <= IT_WR_SUP;
          state     <= S_MEMWR;
        end
        IT_WR_SUP: begin nf <= nf + 1'b1; nf_out <= nf + 1'b1; state <= IT_NEXT; end
        IT_NEXT: begin
          ch_off  <= '0;
          sup_clr <= 1'b1;
          if (item_i + 1'b1 >= n_items) state <= S_FINISH;
          else begin
            item_i   <= item_i + 1'b1;
            item_src <= item_src + w_words;
            state    <= IT_ITEM;
          end
        end

        // ------------------------------- itemset mining S0: 2-itemsets
        MN_CLASS: begin
          if (cls >= cls_end) state <= S_FINISH;
          else begin
            ctl_req   <= '{we: 1'b0, addr: fi_base + addr_t'({cls, 1'b0}), wdata: '0};
            ctl_valid <= 1'b1;
            ret_state <= MN_CLASS_RSP;
            state     <= S_MEMRD;
          end
        end
        MN_CLASS_RSP: begin
          plabel[0] <= rd_q[ITEM_W-1:0];
          pk        <= 8'd1;
          psrc      <= item_vec;
          cls_start <= wr_ptr;
          j_idx     <= cls + 1'b1;
          state     <= MN_2_NEXT;
        end
        MN_2_NEXT: begin
          if (j_idx >= nf) begin
            i_ptr <= cls_start;
            state <= MN_K_I;
          end else begin
            ctl_req   <= '{we: 1'b0, addr: fi_base + addr_t'({j_idx, 1'b0}), wdata: '0};
            ctl_valid <= 1'b1;
            ret_state <= MN_2_RSP;
            state     <= S_MEMRD;
          end
        end
        MN_2_RSP: begin
          slabel[0] <= rd_q[ITEM_W-1:0];
          ssrc      <= item_vec;
          j_idx     <= j_idx + 1'b1;
          pr_ret    <= MN_2_NEXT;
          state     <= PR_START;
        end

        // ------------------------ itemset mining S1 .. S3: k-itemsets
        MN_K_I: begin
          if (i_ptr == wr_ptr) begin       // class exhausted
            cls   <= cls + 1'b1;
            state <= MN_CLASS;
          end else begin
            ctl_req   <= '{we: 1'b0, addr: i_ptr + addr_t'(REC_CARD), wdata: '0};
            ctl_valid <= 1'b1;
            ret_state <= MN_K_I_CARD;
            state     <= S_MEMRD;
          end
        end
        MN_K_I_CARD: begin
          pk       <= rd_q[7:0];
          q        <= '0;
          lbl_to_s <= 1'b0;
          psrc     <= i_ptr + addr_t'(REC_LBL + LW);
          state    <= MN_K_I_LBL;
        end
        MN_K_I_LBL, MN_K_J_LBL: begin
          if (q != 0) begin
            for (int t = 0; t < LW; t++)
              if (int'(q) == t + 1) begin
                if (lbl_to_s) begin
                  slabel[2*t] <= rd_q[ITEM_W-1:0];
                  if (2*t+1 < MAX_K) slabel[(2*t+1) % MAX_K] <= rd_q[2*ITEM_W-1:ITEM_W];
                end else begin
                  plabel[2*t] <= rd_q[ITEM_W-1:0];
                  if (2*t+1 < MAX_K) plabel[(2*t+1) % MAX_K] <= rd_q[2*ITEM_W-1:ITEM_W];
                end
              end
          end
          if (q == lbl_words(lbl_to_s ? sk : pk)) begin
            if (lbl_to_s) state <= MN_K_J_CMP;
            else begin
              j_ptr <= i_ptr + rec_size;
              state <= MN_K_J;
            end
          end else begin
            ctl_req   <= '{we: 1'b0,
                           addr: (lbl_to_s ? j_ptr : i_ptr) + addr_t'(REC_LBL) + addr_t'(q),
                           wdata: '0};
            ctl_valid <= 1'b1;
            ret_state <= state;
            q         <= q + 1'b1;
            state     <= S_MEMRD;
          end
        end
        MN_K_J: begin
          if (j_ptr == wr_ptr) state <= MN_K_FLUSH;
          else begin
            ctl_req   <= '{we: 1'b0, addr: j_ptr + addr_t'(REC_CARD), wdata: '0};
            ctl_valid <= 1'b1;
            ret_state <= MN_K_J_CARD;
            state     <= S_MEMRD;
          end
        end
        MN_K_J_CARD: begin
          if (rd_q[7:0] != pk) state <= MN_K_FLUSH;   // other cardinality
          else begin
            sk       <= rd_q[7:0];
            q        <= '0;
            lbl_to_s <= 1'b1;
            state    <= MN_K_J_LBL;
          end
        end
        MN_K_J_CMP: begin
          if (!prefix_match) state <= MN_K_FLUSH;     // other prefix
          else if (int'(pk) >= MAX_K) begin
            k_overflow <= 1'b1;
            state      <= MN_K_NEXTJ;
          end else begin
            ssrc   <= j_ptr + addr_t'(REC_LBL + LW);
            pr_ret <= MN_K_NEXTJ;
            state  <= PR_START;
          end
        end
        MN_K_NEXTJ: begin
          j_ptr <= j_ptr + rec_size;
          state <= MN_K_J;
        end
        MN_K_FLUSH: begin                              // flush prefix
          i_ptr <= i_ptr + rec_size;
          state <= MN_K_I;
        end

        // ------------------------------------------- one intersection
        PR_START: begin
          sup_clr  <= 1'b1;
          ch_off   <= '0;
          phase_wr <= 1'b0;
          state    <= PR_CHUNK;
        end
        PR_CHUNK: begin
          if (lp_start) begin
            ptag   <= psrc + ch_off;
            ptag_v <= 1'b1;
            state  <= PR_LDP;
          end else state <= PR_CHK_S;
        end
        PR_LDP: if (lp_done) state <= PR_CHK_S;
        PR_CHK_S: begin
          if (ls_start) begin
            stag   <= ssrc + ch_off;
            stag_v <= 1'b1;
            state  <= PR_LDS;
          end else state <= PR_OP;
        end
        PR_LDS: if (ls_done) state <= PR_OP;
        PR_OP: begin
          cnt_idx <= '0;
          state   <= phase_wr ? PR_WRVEC : PR_COUNT;
        end
        PR_COUNT: begin
          if (cnt_idx < ch_len) cnt_idx <= cnt_idx + (AW+1)'(2);
          else begin drain <= 3'd3; state <= PR_DRAIN; end
        end
        PR_DRAIN: begin
          if (drain != 0) drain <= drain - 1'b1;
          else state <= PR_NEXT_CHUNK;
        end
        PR_WRVEC: if (wr_done) state <= PR_NEXT_CHUNK;
        PR_NEXT_CHUNK: begin
          if (chunk_last) begin
            ch_off <= '0;
            state  <= phase_wr ? PR_DONE : PR_CMP;
          end else begin
            ch_off <= ch_off + addr_t'(DEPTH);
            state  <= PR_CHUNK;
          end
        end
        PR_CMP: begin                                  // comparator
          if (frequent) begin q <= '0; state <= PR_HDR; end
          else state <= pr_ret;
        end
        PR_HDR: begin                                  // card, support, label
          if (int'(q) == REC_LBL + LW) begin
            phase_wr <= 1'b1;
            state    <= PR_CHUNK;
          end else begin
            ctl_req   <= '{we: 1'b1, addr: wr_ptr + addr_t'(q), wdata: hdr_word};
            ctl_valid <= 1'b1;
            q         <= q + 1'b1;
            ret_state <= PR_HDR;
            state     <= S_MEMWR;
          end
        end
        PR_DONE: begin
          wr_ptr     <= wr_ptr + rec_size;
          n_itemsets <= n_itemsets + 1'b1;
          state      <= pr_ret;
        end

        // --------------------------------------- single-word access
        S_MEMRD:      if (ctl_go) begin ctl_valid <= 1'b0; state <= S_MEMRD_WAIT; end
        S_MEMRD_WAIT: if (mem_rsp_valid) begin rd_q <= mem_rsp_data; state <= ret_state; end
        S_MEMWR:      if (ctl_go) begin ctl_valid <= 1'b0; state <= ret_state; end

        S_FINISH: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
