// result_writer: stores the binary vector of a frequent itemset in external
// memory. It reads port A of the prefix and suffix BRAMs from word 0 upwards;
// the two read words pass the AND gates of the intersection unit and come
// back as vec_word one cycle later, and each is written to dst, dst+1, ...
// One word is written per cycle while req_ready is high. When the memory
// stalls, the BRAM read is held (rd_en low keeps the BRAM output), so no word
// is lost. done pulses when the last write has been accepted.
// Storing the vector of every frequent itemset follows the described
// architecture; writing it in a second pass over the BRAMs, after the
// comparator has decided, is this design's own choice.
module result_writer
  import fim_pkg::*;
#(
  parameter int unsigned DEPTH = 31250,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  addr_t         dst,
  input  logic [AW:0]   len,
  // BRAM read (port A of both BRAMs) and the AND of the two read words
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  word_t         vec_word,
  // memory master port
  output logic          req_valid,
  output mem_req_t      req,
  input  logic          req_ready,
  output logic          busy,
  output logic          done
);

  logic [AW:0] rd_idx, wr_cnt, len_q;
  addr_t       dst_q;
  logic        v;   // vec_word holds a word not yet written

  logic advance;
  assign advance   = !v || req_ready;
  assign rd_en     = busy && advance && (rd_idx < len_q);
  assign rd_addr   = rd_idx[AW-1:0];

  assign req_valid = busy && v;
  assign req.we    = 1'b1;
  assign req.addr  = dst_q + addr_t'(wr_cnt);
  assign req.wdata = vec_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      v      <= 1'b0;
      rd_idx <= '0;
      wr_cnt <= '0;
      len_q  <= '0;
      dst_q  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        dst_q  <= dst;
        len_q  <= len;
        rd_idx <= '0;
        wr_cnt <= '0;
        v      <= 1'b0;
        if (len == '0) done <= 1'b1;
        else           busy <= 1'b1;
      end else if (busy) begin
        if (req_valid && req_ready) begin
          wr_cnt <= wr_cnt + 1'b1;
          if (wr_cnt + 1'b1 == len_q) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
        if (rd_en) begin
          rd_idx <= rd_idx + 1'b1;
          v      <= 1'b1;
        end else if (req_valid && req_ready) begin
          v <= 1'b0;
        end
      end
    end
  end

endmodule
