// tb_dp_bram: checks the dual-port BRAM against an array model. Random
// writes and reads on both ports (never the same word written twice in a
// cycle) are compared with the model: read data one cycle after the enable,
// read-first on a write, and rdata held while the port is disabled.
module tb_dp_bram;
  localparam int DEPTH = 100;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;

  dp_bram #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);

  logic [31:0] model [DEPTH];
  logic [31:0] exp_a, exp_b;
  bit   chk_a, chk_b;
  int checks = 0, failures = 0;

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill every word through port A, then port B for the upper half
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = $urandom; model[i] = a_wdata;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check what the previous cycle read
      if (chk_a) begin checks++; if (a_rdata !== exp_a) begin failures++; $display("FAIL A %0d", n); end end
      if (chk_b) begin checks++; if (b_rdata !== exp_b) begin failures++; $display("FAIL B %0d", n); end end
      a_en = ($urandom_range(3) != 0); a_we = $urandom_range(1); a_addr = AW'($urandom_range(DEPTH-1));
      b_en = ($urandom_range(3) != 0); b_we = $urandom_range(1); b_addr = AW'($urandom_range(DEPTH-1));
      a_wdata = $urandom; b_wdata = $urandom;
      if (a_we && b_we && a_addr == b_addr) b_we = 0;
      // expected outputs after this edge (read-first; held when disabled)
      if (a_en) exp_a = model[a_addr];
      if (b_en) exp_b = model[b_addr];
      chk_a = (n > 0); chk_b = (n > 0);
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
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
