// fim_pkg: types and constants shared by the frequent itemset mining
// accelerator. Every datum moves through 32-bit words because the binary
// vectors are kept in a 32-bit wide external memory. The memory request
// struct is this design's own bus format: one request per cycle, qualified by
// a valid/ready pair, reads answered in order on a separate response channel.
package fim_pkg;

  localparam int unsigned WORD_W = 32;  // binary vector word and memory width
  localparam int unsigned ADDR_W = 32;  // word address into the external memory
  localparam int unsigned ITEM_W = 16;  // width of one item label

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [ITEM_W-1:0] item_t;

  // One request on the memory port. Writes are posted (no response); a read
  // returns exactly one response word, in request order.
  typedef struct packed {
    logic  we;
    addr_t addr;
    word_t wdata;
  } mem_req_t;

  // Layout of one frequent-itemset record in external memory (word offsets):
  //   +0              cardinality k
  //   +1              support
  //   +2 .. +1+LW     label: item j in bits [16*(j%2) +: 16] of word j/2
  //   +2+LW ..        binary vector, W words
  localparam int unsigned REC_CARD = 0;
  localparam int unsigned REC_SUPP = 1;
  localparam int unsigned REC_LBL  = 2;

  // States of the accelerator controller (fim_core): S_IDLE and S_FINISH
  // frame a stage, IT_* are the items-mining states, MN_* the itemset-mining
  // states, PR_* one intersection and S_MEM* a single-word memory access.
  typedef enum logic [5:0] {
    S_IDLE,
    // items mining
    IT_ITEM, IT_LOAD, IT_DRAIN, IT_CMP, IT_WR_LBL, IT_WR_SUP, IT_NEXT,
    // itemset mining: classes and 2-itemsets
    MN_CLASS, MN_CLASS_RSP, MN_2_NEXT, MN_2_RSP,
    // itemset mining: k-itemsets
    MN_K_I, MN_K_I_CARD, MN_K_I_LBL, MN_K_J, MN_K_J_CARD, MN_K_J_LBL, MN_K_J_CMP,
    MN_K_FLUSH, MN_K_NEXTJ,
    // one intersection (prefix x suffix)
    PR_START, PR_CHUNK, PR_LDP, PR_CHK_S, PR_LDS, PR_OP, PR_COUNT, PR_DRAIN,
    PR_WRVEC, PR_NEXT_CHUNK, PR_CMP, PR_HDR, PR_DONE,
    // single-word memory access
    S_MEMRD, S_MEMRD_WAIT, S_MEMWR,
    S_FINISH
  } core_state_t;

  // Population count of one word.
  function automatic logic [5:0] popcount32(input word_t w);
    logic [5:0] c;
    c = '0;
    for (int i = 0; i < WORD_W; i++) c += 6'(w[i]);
    return c;
  endfunction

endpackage
