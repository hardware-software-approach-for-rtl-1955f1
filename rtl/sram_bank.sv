// sram_bank: one independently accessible bank of instruction or data memory.
//
// A single-port synchronous RAM of DEPTH words of WIDTH bits. A request with
// we=1 writes wdata at addr on the clock edge; a request with we=0 returns the
// word at addr on rdata after that edge (one-cycle read latency), and rdata
// holds its value until the next read. The platform splits its instruction
// and data memories into such banks so that they can be accessed in parallel
// and powered off independently; power gating itself is outside the logic
// and not modelled. The array is written as plain SystemVerilog so that it can
// be mapped onto an SRAM macro of the target process.
module sram_bank #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 24,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             req,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (req) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
