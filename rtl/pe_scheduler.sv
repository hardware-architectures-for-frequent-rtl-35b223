// pe_scheduler: runs a whole mining job on N_CORES accelerators and splits
// the search space between them by equivalence class. On start it runs the
// items-mining stage on core 0 alone; the frequent-item list that core 0
// writes is shared by all cores. It then starts itemset mining on every core
// at once, core c taking the classes [class_start[c], class_start[c+1]) of
// that list and the last core the classes from class_start[N_CORES-1] to the
// end. With two cores and class_start = {0, 1}, core 0 mines the class of the
// first frequent item and core 1 all the others, the split of the dual-core
// architecture. Because classes are disjoint, the cores do not exchange
// anything while mining. done pulses when every core has finished; busy is
// high from start to done. class_start is sampled when the mining stage
// starts; an empty or out-of-range share finishes at once.
// The order of the two stages and the class split follow the dual-core
// architecture; running the first stage on core 0 and taking the split from
// a host-written table are this design's own choices.
module pe_scheduler
  import fim_pkg::*;
#(
  parameter int unsigned N_CORES = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t class_start [N_CORES],
  output logic  busy,
  output logic  done,
  output word_t nf,                       // frequent items found
  // to the cores
  output logic  core_start_items [N_CORES],
  output logic  core_start_mine  [N_CORES],
  output word_t core_cls_first   [N_CORES],
  output word_t core_cls_end     [N_CORES],
  input  logic  core_done        [N_CORES],
  input  word_t core0_nf
);

  typedef enum logic [2:0] {IDLE, ITEMS, ITEMS_WAIT, MINE, MINE_WAIT} state_t;
  state_t state;

  logic [N_CORES-1:0] finished;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      finished <= '0;
      nf       <= '0;
      done     <= 1'b0;
      for (int c = 0; c < int'(N_CORES); c++) begin
        core_cls_first[c] <= '0;
        core_cls_end[c]   <= '0;
      end
    end else begin
      done <= 1'b0;
      case (state)
        IDLE:       if (start) state <= ITEMS;
        ITEMS:      state <= ITEMS_WAIT;
        ITEMS_WAIT: if (core_done[0]) begin nf <= core0_nf; state <= MINE; end
        MINE: begin
          for (int c = 0; c < int'(N_CORES); c++) begin
            core_cls_first[c] <= class_start[c];
            core_cls_end[c]   <= (c == int'(N_CORES) - 1) ? nf : class_start[(c + 1) % N_CORES];
          end
          finished <= '0;
          state    <= MINE_WAIT;
        end
        MINE_WAIT: begin
          for (int c = 0; c < int'(N_CORES); c++)
            if (core_done[c]) finished[c] <= 1'b1;
          if (&finished) begin
            done  <= 1'b1;
            state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // start pulses: items stage on core 0, mining stage on all cores one cycle
  // after the class ranges are loaded
  logic mine_go;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mine_go <= 1'b0;
    else        mine_go <= (state == MINE);
  end

  always_comb begin
    for (int c = 0; c < int'(N_CORES); c++) begin
      core_start_items[c] = (c == 0) && (state == ITEMS);
      core_start_mine[c]  = mine_go;
    end
  end

  assign busy = (state != IDLE);

endmodule
