// lm_sram: local memory of a hardware engine, a single-port synchronous RAM.
// Each engine of the decoder keeps its working data in such a memory, which cuts the
// traffic to the external frame memory. The capacity is given in bits (BITS) and the
// memory is organised as BITS/WIDTH words of WIDTH bits.
// Interface: en with we=1 writes wdata at addr; en with we=0 reads addr, and rdata is
// valid on the next clock. The memory contents are not reset.
// The per-engine capacities come from the document; the word width, single port and
// one-cycle read latency are this design's choices.
module lm_sram #(
  parameter int unsigned BITS  = 4096,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned DEPTH = BITS / WIDTH,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
