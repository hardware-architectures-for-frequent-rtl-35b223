// fim_top: the multi-core frequent itemset mining architecture, by default
// with two accelerators (the dual-core configuration; N_CORES = 1 gives the
// compact, single-accelerator one). A host writes the dataset into external
// memory as one binary vector per item and sets the configuration ports;
// a start pulse then runs the whole job: core 0 finds the frequent items and
// writes their list at fi_base, after which every core mines its own share
// of equivalence classes (class_start) and appends frequent itemsets of two
// or more items, as records, from its own res_base. The cores share the
// external memory through a round-robin arbiter. done pulses when all cores
// have finished; nf, n_itemsets and res_end then tell the host where the
// results are. The configuration must stay stable from start to done.
module fim_top
  import fim_pkg::*;
#(
  parameter int unsigned N_CORES     = 2,
  parameter int unsigned DEPTH       = 31250,
  parameter int unsigned MAX_K       = 32,
  parameter int unsigned OUTSTANDING = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  // host control and configuration
  input  logic     start,
  input  addr_t    vec_base,
  input  word_t    n_trans,
  input  word_t    n_items,
  input  item_t    first_label,
  input  addr_t    fi_base,
  input  word_t    smin,
  input  addr_t    res_base    [N_CORES],
  input  word_t    class_start [N_CORES],
  output logic     busy,
  output logic     done,
  output word_t    nf,
  output word_t    n_itemsets  [N_CORES],
  output addr_t    res_end     [N_CORES],
  output logic     k_overflow  [N_CORES],
  // external memory
  output logic     mem_req_valid,
  output mem_req_t mem_req,
  input  logic     mem_req_ready,
  input  logic     mem_rsp_valid,
  input  word_t    mem_rsp_data
);

  logic     c_start_items [N_CORES];
  logic     c_start_mine  [N_CORES];
  word_t    c_cls_first   [N_CORES];
  word_t    c_cls_end     [N_CORES];
  logic     c_done        [N_CORES];
  logic     c_busy        [N_CORES];
  word_t    c_nf_out      [N_CORES];
  logic     c_req_valid   [N_CORES];
  mem_req_t c_req         [N_CORES];
  logic     c_req_ready   [N_CORES];
  logic     c_rsp_valid   [N_CORES];
  word_t    c_rsp_data    [N_CORES];

  pe_scheduler #(.N_CORES(N_CORES)) u_sched (
    .clk, .rst_n, .start, .class_start, .busy, .done, .nf,
    .core_start_items(c_start_items), .core_start_mine(c_start_mine),
    .core_cls_first(c_cls_first), .core_cls_end(c_cls_end),
    .core_done(c_done), .core0_nf(c_nf_out[0]));

  for (genvar c = 0; c < int'(N_CORES); c++) begin : g_core
    fim_core #(.DEPTH(DEPTH), .MAX_K(MAX_K)) u_core (
      .clk, .rst_n,
      .start_items(c_start_items[c]), .start_mine(c_start_mine[c]),
      .busy(c_busy[c]), .done(c_done[c]),
      .cfg_vec_base(vec_base), .cfg_n_trans(n_trans), .cfg_n_items(n_items),
      .cfg_first_label(first_label), .cfg_fi_base(fi_base), .cfg_smin(smin),
      .cfg_res_base(res_base[c]), .cfg_nf(nf),
      .cfg_cls_first(c_cls_first[c]), .cfg_cls_end(c_cls_end[c]),
      .nf_out(c_nf_out[c]), .n_itemsets(n_itemsets[c]), .res_end(res_end[c]),
      .k_overflow(k_overflow[c]),
      .mem_req_valid(c_req_valid[c]), .mem_req(c_req[c]), .mem_req_ready(c_req_ready[c]),
      .mem_rsp_valid(c_rsp_valid[c]), .mem_rsp_data(c_rsp_data[c]));
  end

  mem_arbiter #(.N_MASTERS(N_CORES), .OUTSTANDING(OUTSTANDING)) u_mem_sub (
    .clk, .rst_n,
    .m_req_valid(c_req_valid), .m_req(c_req), .m_req_ready(c_req_ready),
    .m_rsp_valid(c_rsp_valid), .m_rsp_data(c_rsp_data),
    .s_req_valid(mem_req_valid), .s_req(mem_req), .s_req_ready(mem_req_ready),
    .s_rsp_valid(mem_rsp_valid), .s_rsp_data(mem_rsp_data));

endmodule
