// mosaic_regfile: the sixteen 16-bit general registers R0..R15.
//
// In any microcycle at most one register is a bus source or a bus
// destination. Which one is not named by the controller: it comes from the
// instruction register, field J (bits 3:0) when use_j is set, otherwise
// field K (bits 7:4). The read is combinational (the register drives the bus
// in the same cycle); a write takes the bus value at the clock edge.
// Following the document: 16 registers of 16 bits, J/K selection by a
// controller line. The registers are not reset, as in the document, where
// reset leaves them alone.
module mosaic_regfile #(
  parameter int unsigned NREG  = 16,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     use_j,   // select by J instead of K
  input  logic [$clog2(NREG)-1:0]  j,
  input  logic [$clog2(NREG)-1:0]  k,
  input  logic                     we,      // =>R
  input  logic [WIDTH-1:0]         wdata,   // bus
  output logic [WIDTH-1:0]         rdata    // R=>
);
  logic [WIDTH-1:0] regs [NREG];
  logic [$clog2(NREG)-1:0] sel;

  assign sel   = use_j ? j : k;
  assign rdata = regs[sel];

  always_ff @(posedge clk)
    if (we) regs[sel] <= wdata;
endmodule
