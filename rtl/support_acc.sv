// support_acc: the support register, the S_min register and the comparator.
// The support register is cleared by clr and adds each partial count that
// arrives with add (the outputs of the counting support module, one per
// cycle) until the whole vector has been covered. S_min is loaded with
// smin_we. frequent is high while support >= S_min, so it is valid one cycle
// after the last partial count. A clear and an add in the same cycle start a
// new sum with that count.
// The register/comparator structure and the >= rule follow the described
// architecture; the 32-bit widths are this design's own choice.
module support_acc
  import fim_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       smin_we,
  input  word_t      smin_in,
  input  logic       clr,
  input  logic       add,
  input  logic [6:0] count,
  output word_t      support,
  output word_t      smin,
  output logic       frequent
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      support <= '0;
      smin    <= '0;
    end else begin
      if (smin_we) smin <= smin_in;
      if (clr)      support <= add ? word_t'(count) : '0;
      else if (add) support <= support + word_t'(count);
    end
  end

  assign frequent = (support >= smin);

endmodule
