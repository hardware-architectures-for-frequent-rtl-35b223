// offchip_mem_model: behavioural model of the 32-bit external memory, for
// simulation only. It accepts one request per cycle when req_ready is high
// (ready is withheld at random on STALL_PCT percent of the cycles), applies a
// write at once and returns read data LAT cycles after the request, in order.
// The array mem is written and read directly by the testbenches to place the
// dataset and to check the results.
module offchip_mem_model
  import fim_pkg::*;
#(
  parameter int unsigned WORDS     = 65536,
  parameter int unsigned LAT       = 3,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  input  mem_req_t req,
  output logic     req_ready,
  output logic     rsp_valid,
  output word_t    rsp_data
);

  word_t mem [WORDS];

  logic  pv [LAT];
  word_t pd [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_ready <= 1'b0;
      for (int i = 0; i < int'(LAT); i++) begin pv[i] <= 1'b0; pd[i] <= '0; end
    end else begin
      req_ready <= ($urandom_range(99) >= STALL_PCT);
      pv[0] <= req_valid && req_ready && !req.we;
      pd[0] <= mem[req.addr % WORDS];
      for (int i = 1; i < int'(LAT); i++) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
    end
  end

  assign rsp_valid = pv[LAT-1];
  assign rsp_data  = pd[LAT-1];

  // writes use blocking assignments, like the testbenches' direct accesses
  always @(posedge clk) begin
    if (rst_n && req_valid && req_ready) begin
      if (req.addr >= WORDS)
        $display("offchip_mem_model: address %0h out of range", req.addr);
      if (req.we) mem[req.addr % WORDS] = req.wdata;
    end
  end

endmodule
