// tb_support_acc: random runs of partial counts are accumulated in the
// support register; after each run the sum and the frequent flag (support >=
// S_min, for thresholds below, at and above the sum) are compared with the
// testbench's own sum.
module tb_support_acc;
  import fim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic smin_we, clr, add, frequent;
  word_t smin_in, support, smin;
  logic [6:0] count;

  support_acc dut (.*);

  int checks = 0, failures = 0;

  initial begin
    smin_we = 0; smin_in = 0; clr = 0; add = 0; count = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 200; run++) begin
      int sum, len, th;
      sum = 0;
      len = $urandom_range(40, 1);
      @(negedge clk); clr = 1; add = 0;
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        clr = 0;
        add = $urandom_range(3) != 0;
        count = 7'($urandom_range(64));
        if (add) sum += int'(count);
      end
      @(negedge clk); add = 0;
      case (run % 3)
        0: th = sum;
        1: th = sum + 1;
        default: th = (sum > 0) ? sum - 1 : 0;
      endcase
      smin_we = 1; smin_in = th;
      @(negedge clk); smin_we = 0;
      checks++;
      if (int'(support) != sum) begin failures++; $display("FAIL sum %0d exp %0d", support, sum); end
      checks++;
      if (frequent != (sum >= th) || int'(smin) != th) begin failures++; $display("FAIL frequent run %0d", run); end
    end
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
