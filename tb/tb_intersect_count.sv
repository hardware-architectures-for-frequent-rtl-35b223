// tb_intersect_count: random word pairs go through the AND gates and the
// counting support module. The AND outputs are checked at once and the count,
// worked out bit by bit in the testbench, one cycle later (the registered
// latency), including lanes switched off by v0/v1.
module tb_intersect_count;
  import fim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, v0, v1, out_valid;
  word_t p0, s0, p1, s1, and0, and1;
  logic [6:0] out_count;

  intersect_count dut (.*);

  int checks = 0, failures = 0;
  int exp_cnt;
  bit exp_valid;

  initial begin
    in_valid = 0; v0 = 0; v1 = 0; p0 = 0; s0 = 0; p1 = 0; s1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_valid = 0; exp_cnt = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if (out_valid != exp_valid || (exp_valid && int'(out_count) != exp_cnt)) begin
          failures++;
          $display("FAIL %0d: count %0d exp %0d", n, out_count, exp_cnt);
        end
      end
      in_valid = $urandom_range(3) != 0; v0 = $urandom_range(7) != 0; v1 = $urandom_range(7) != 0;
      p0 = $urandom; s0 = $urandom; p1 = $urandom; s1 = $urandom;
      if (n % 50 == 0) begin p0 = '1; s0 = '1; p1 = '1; s1 = '1; end
      #1;
      checks++;
      if (and0 != (p0 & s0) || and1 != (p1 & s1)) begin failures++; $display("FAIL and %0d", n); end
      exp_valid = in_valid;
      exp_cnt = 0;
      for (int b = 0; b < 32; b++) begin
        if (v0 && p0[b] && s0[b]) exp_cnt++;
        if (v1 && p1[b] && s1[b]) exp_cnt++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
