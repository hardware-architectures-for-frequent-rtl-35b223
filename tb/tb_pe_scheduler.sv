// tb_pe_scheduler: three stand-in cores that finish after random delays.
// Checks the order of a job: items mining only on core 0, then one mining
// start for every core with the class range that class_start and the
// number of frequent items give, and done only after every core is done.
module tb_pe_scheduler;
  import fim_pkg::*;
  localparam int N = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  start, busy, done;
  word_t class_start [N];
  word_t nf, core0_nf;
  logic  core_start_items [N];
  logic  core_start_mine  [N];
  word_t core_cls_first   [N];
  word_t core_cls_end     [N];
  logic  core_done        [N];

  pe_scheduler #(.N_CORES(N)) dut (.*);

  int checks = 0, failures = 0;
  int items_starts [N], mine_starts [N], delay [N];
  bit running [N], items_running;
  int finished_at [N], done_at, cyc;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // stand-in cores
  always @(posedge clk) begin
    cyc++;
    for (int c = 0; c < N; c++) begin
      core_done[c] <= 1'b0;
      if (core_start_items[c]) begin
        items_starts[c]++; running[c] = 1; delay[c] = $urandom_range(20, 2); items_running = 1;
      end
      if (core_start_mine[c]) begin
        mine_starts[c]++;
        check(!items_running, "mining started before items mining ended");
        running[c] = 1; delay[c] = $urandom_range(40, 1);
      end
      if (running[c]) begin
        if (delay[c] == 0) begin
          core_done[c] <= 1'b1; running[c] = 0; items_running = 0; finished_at[c] = cyc;
        end else delay[c]--;
      end
    end
    if (done) done_at = cyc;
  end

  task automatic job(input int nfi, input int s1, input int s2);
    for (int c = 0; c < N; c++) begin items_starts[c] = 0; mine_starts[c] = 0; finished_at[c] = 0; end
    done_at = 0;
    core0_nf = nfi;
    class_start[0] = 0; class_start[1] = s1; class_start[2] = s2;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (done_at != 0);
    @(negedge clk);
    check(items_starts[0] == 1 && items_starts[1] == 0 && items_starts[2] == 0, "items start");
    for (int c = 0; c < N; c++) check(mine_starts[c] == 1, $sformatf("core %0d mining start", c));
    check(nf == word_t'(nfi), "nf");
    check(core_cls_first[0] == 0 && core_cls_end[0] == word_t'(s1), "core 0 range");
    check(core_cls_first[1] == word_t'(s1) && core_cls_end[1] == word_t'(s2), "core 1 range");
    check(core_cls_first[2] == word_t'(s2) && core_cls_end[2] == word_t'(nfi), "core 2 range");
    for (int c = 0; c < N; c++) check(done_at > finished_at[c], "done after every core");
    check(!busy, "idle after done");
  endtask

  initial begin
    start = 0; core0_nf = 0;
    for (int c = 0; c < N; c++) begin
      core_done[c] = 0; running[c] = 0; class_start[c] = 0; items_starts[c] = 0; mine_starts[c] = 0;
    end
    items_running = 0; cyc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) job($urandom_range(30, 3), 1, 2 + k % 3);
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
