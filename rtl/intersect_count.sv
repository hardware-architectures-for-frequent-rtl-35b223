// intersect_count: the intersection and support counting datapath. Two
// prefix words are ANDed with the two suffix words read in the same cycle
// (the intersection of the two itemsets' binary vectors, 64 transactions per
// cycle) and the set bits of both results are counted. The AND results are
// also given out combinationally so that the vector of a new itemset can be
// stored. The count is registered: it appears one cycle after in_valid with
// out_valid. A lane whose valid bit (v0, v1) is low counts as zero, which
// handles vectors with an odd number of words.
// The AND gates feeding a two-word counter follow the described datapath;
// the single register stage and the lane valid bits are this design's own.
module intersect_count
  import fim_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       v0,
  input  logic       v1,
  input  word_t      p0,
  input  word_t      s0,
  input  word_t      p1,
  input  word_t      s1,
  output word_t      and0,
  output word_t      and1,
  output logic       out_valid,
  output logic [6:0] out_count
);

  assign and0 = p0 & s0;
  assign and1 = p1 & s1;

  logic [6:0] cnt;
  always_comb begin
    cnt = '0;
    if (v0) cnt += 7'(popcount32(and0));
    if (v1) cnt += 7'(popcount32(and1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_count <= '0;
    end else begin
      out_valid <= in_valid;
      out_count <= in_valid ? cnt : '0;
    end
  end

endmodule
