// vector_loader: the Load Prefix / Load Suffix module. Given a start address
// in external memory and a length in words, it streams that part of a binary
// vector into port A of its BRAM, starting at BRAM word 0. Reads are issued
// back to back (one per cycle while req_ready is high) and may be
// outstanding; every response is written to the BRAM in the cycle it
// arrives and is also shown on the wr_* signals, which the items-mining
// stage uses to count support while the vector is loaded. done pulses in the
// cycle the last word is written. A length of zero finishes at once.
// A vector longer than the BRAM is covered by starting the loader once per
// chunk.
// Loading a vector (or a chunk of it) into a BRAM is the described function;
// the outstanding-read bus protocol is this design's own.
module vector_loader
  import fim_pkg::*;
#(
  parameter int unsigned DEPTH = 31250,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  addr_t         src,
  input  logic [AW:0]   len,
  // memory master port
  output logic          req_valid,
  output mem_req_t      req,
  input  logic          req_ready,
  input  logic          rsp_valid,
  input  word_t         rsp_data,
  // BRAM write port
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output word_t         wr_data,
  output logic          busy,
  output logic          done
);

  logic [AW:0] iss, rcv, len_q;
  addr_t       src_q;

  assign req_valid = busy && (iss < len_q);
  assign req.we    = 1'b0;
  assign req.addr  = src_q + addr_t'(iss);
  assign req.wdata = '0;

  assign wr_en   = busy && rsp_valid && (rcv < len_q);
  assign wr_addr = rcv[AW-1:0];
  assign wr_data = rsp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      iss   <= '0;
      rcv   <= '0;
      len_q <= '0;
      src_q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        src_q <= src;
        len_q <= len;
        iss   <= '0;
        rcv   <= '0;
        if (len == '0) done <= 1'b1;
        else           busy <= 1'b1;
      end else if (busy) begin
        if (req_valid && req_ready) iss <= iss + 1'b1;
        if (wr_en) begin
          rcv <= rcv + 1'b1;
          if (rcv + 1'b1 == len_q) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  no_response_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid |-> busy);

endmodule
