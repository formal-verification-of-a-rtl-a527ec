// seg_mem_unit: memory fetch unit of the segment-table MMU.
//
// A synchronous fetch interface to main memory: a request (req) in cycle t
// returns the word at addr in cycle t+1 on data, with done high in that
// cycle; without a request, done is low and data is zero in the next cycle.
// The memory itself is outside the MMU and is expected to be a synchronous
// RAM that presents the word at mem_addr one cycle after mem_rd; this unit
// forwards the request and qualifies what comes back. The one-cycle fetch
// is the original design's; the split into this unit and an external RAM
// port is this design's choice.
module seg_mem_unit #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic [WIDTH-1:0] addr,
  output logic [WIDTH-1:0] data,
  output logic             done,
  // to / from the memory
  output logic             mem_rd,
  output logic [WIDTH-1:0] mem_addr,
  input  logic [WIDTH-1:0] mem_rdata
);

  assign mem_rd   = req;
  assign mem_addr = addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= req;
  end

  assign data = done ? mem_rdata : '0;

endmodule
