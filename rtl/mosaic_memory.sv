// mosaic_memory: the element's on-chip memory, a set of 256-word banks on the
// 12-bit address bus and the 16-bit memory data buses.
//
// The address is issued by the processor every microcycle. The bits above
// the low eight pick a bank; the low eight bits go to that bank (row and word
// within the row). Read data comes back one cycle after the address; a write
// stores the data given with the address (see mosaic_mem_bank for the
// pipelined write-back).
// NBANKS defaults to 8, the number of 4K-bit modules on the 16 million square
// lambda floorplan, and must be a power of two up to 16. Only log2(NBANKS)
// bank-select bits are decoded, so a smaller memory repeats through the
// 4096-word address space; the interrupt and soft-reset words at the top of
// the address space (-1, -2, -3) then land in the top of the last bank.
// The small bootstrap ROM at location 0 is not part of this model: a
// testbench loads the program into the RAM banks instead.
module mosaic_memory #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned AW     = 12,
  parameter int unsigned NBANKS = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    addr,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] bank_rdata [NBANKS];
  localparam int unsigned BB = (NBANKS > 1) ? $clog2(NBANKS) : 1;
  logic [BB-1:0]    bank, bank_q;

  assign bank = (NBANKS > 1) ? addr[8 +: BB] : '0;

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    mosaic_mem_bank #(.WIDTH(WIDTH)) u_bank (
      .clk, .rst,
      .sel   (bank == BB'(b)),
      .addr  (addr[7:0]),
      .we    (we),
      .wdata (wdata),
      .rdata (bank_rdata[b])
    );
  end

  always_ff @(posedge clk) bank_q <= bank;

  assign rdata = bank_rdata[bank_q];
endmodule
