// seg_bus_if: memory-side request stage of the segment-table MMU.
//
// Sits between the CPU bus and main memory next to seg_mmu. When the MMU
// finishes a request with done and ack, this stage issues the CPU's request
// to memory for one cycle: the address is the MMU's rAddr if the MMU
// translated it (xlat), otherwise the CPU's address unchanged, together with
// the CPU's data and request type. A request that ends with done but no ack
// is not passed on. Outputs are registered: the memory request appears the
// cycle after done. That the request goes to memory after done and ack,
// with the address chosen by xlat, follows the original design; the
// registered one-cycle request is this design's choice.
module seg_bus_if
  import mmu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  // CPU side
  input  logic [WIDTH-1:0] vaddr,
  input  logic [WIDTH-1:0] vdata,
  input  rwe_t             rwe,
  // from the MMU
  input  logic             done,
  input  logic             ack,
  input  logic             xlat,
  input  logic [WIDTH-1:0] raddr,
  // memory side
  output logic             bus_req,
  output logic [WIDTH-1:0] bus_addr,
  output logic [WIDTH-1:0] bus_data,
  output rwe_t             bus_rwe
);

  logic grant;
  assign grant = done & ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_req  <= 1'b0;
      bus_addr <= '0;
      bus_data <= '0;
      bus_rwe  <= '0;
    end else begin
      bus_req <= grant;
      if (grant) begin
        bus_addr <= xlat ? raddr : vaddr;
        bus_data <= vdata;
        bus_rwe  <= rwe;
      end
    end
  end

endmodule
