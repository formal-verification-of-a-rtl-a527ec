// seg_ram_model: behavioural model of main memory for simulation only.
//
// A synchronous RAM: a read request (rd) in cycle t presents the word at
// addr on rdata in cycle t+1. The testbench fills it through the write port
// (we / waddr / wdata). Only the low AW address bits select a word; the
// model is initialised to zero.
module seg_ram_model #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 10
) (
  input  logic             clk,
  input  logic             rd,
  input  logic [WIDTH-1:0] addr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [WIDTH-1:0] waddr,
  input  logic [WIDTH-1:0] wdata
);
  logic [WIDTH-1:0] mem [2**AW];

  initial begin
    foreach (mem[k]) mem[k] = '0;
    rdata = '0;
  end

  always @(posedge clk) begin
    if (we) mem[waddr[AW-1:0]] <= wdata;
    if (rd) rdata <= mem[addr[AW-1:0]];
  end
endmodule
