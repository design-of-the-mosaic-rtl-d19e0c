// mosaic_element: one Mosaic element - processor, ports and on-chip memory.
//
// Many elements are meant to be wired together port to port (tree, mesh,
// cube-connected cycles, ...) into a fine-grain concurrent computer. An
// output port of one element and an input port of another share one wire
// with a pull-up; together they behave as a two-word FIFO, one word in each
// port. Words cross bit-serially at one bit per microcycle, after a start
// bit in the first cycle both ends are ready.
// This top connects the version B processor to NBANKS memory banks of 256
// words on the 12-bit address bus. The memory is read every cycle, at the
// address the processor issued; refresh is done by the processor microcode,
// which spends otherwise idle memory cycles on a refresh address counter.
// Interface: clk (one microcycle per rising edge), rst (hard reset, high),
// int_pin (external interrupt: a one-cycle pulse interrupts, a pulse of 26
// cycles or more gives a soft reset), and per port a link level input and a
// clamp output; the board forms each link as the AND of the clamps' inverses.
// NBANKS = 8 follows the document's floorplan for a 16 million square lambda
// chip. The bootstrap ROM at address 0 is left out (its program is not
// defined); programs are placed in the RAM banks.
module mosaic_element
  import mosaic_pkg::*;
#(
  parameter int unsigned NBANKS = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             int_pin,
  input  logic [NPORT-1:0] in_link,
  output logic [NPORT-1:0] in_clamp,
  input  logic [NPORT-1:0] out_link,
  output logic [NPORT-1:0] out_clamp
);
  logic [AW-1:0] mem_addr;
  logic          mem_we;
  logic [W-1:0]  mem_wdata, mem_rdata;

  mosaic_processor u_proc (
    .clk, .rst, .int_pin,
    .mem_addr, .mem_we, .mem_wdata, .mem_rdata,
    .in_link, .in_clamp, .out_link, .out_clamp
  );

  mosaic_memory #(.WIDTH(W), .AW(AW), .NBANKS(NBANKS)) u_mem (
    .clk, .rst,
    .addr  (mem_addr),
    .we    (mem_we),
    .wdata (mem_wdata),
    .rdata (mem_rdata)
  );
endmodule
