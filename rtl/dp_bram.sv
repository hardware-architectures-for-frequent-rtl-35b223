// dp_bram: true dual-port block RAM, used twice in each accelerator as the
// prefix BRAM and the suffix BRAM. Its default depth of 31250 32-bit words
// holds one binary vector of one million transactions (about 122 KiB), the
// capacity the architecture is sized for; longer vectors are processed in
// chunks of this size by the controller.
//
// Each port has an enable, a write enable, an address, write data and read
// data. A read returns mem[addr] on the clock edge after en is high (one cycle
// latency) and rdata holds its value while en is low, so a stalled consumer
// can keep the word. A write stores wdata on the edge; rdata then shows the
// old contents (read-first). Writing the same word from both ports in the
// same cycle is not allowed. The contents are not reset: every word is
// written by a load before it is read.
// The two memories and their size follow the described architecture; the
// read-first behaviour and the port signals are this design's own choices.
module dp_bram #(
  parameter int unsigned DEPTH = 31250,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  // port A
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end

  a_b_write_collision: assert property (@(posedge clk)
    !(a_en && a_we && b_en && b_we && a_addr == b_addr));

endmodule
