// mosaic_inport: one serial input port.
//
// The input port is a 17-bit serial-in parallel-out shift register. While it
// holds no word it releases the link and shifts the link level in at bit 0
// every cycle; the register stays zero until the start bit (the first high
// cycle on the link) arrives. After the start bit the 16 data bits follow,
// and when the start bit reaches bit 16 the register stops shifting: bits
// 15:0 then hold the word, and the port clamps the link until the word is
// removed. advance empties the register, and it may come in the same cycle
// as the word is read (the read sees the word, the clear happens at the edge).
// Interface: full = a word is waiting (data valid); clamp=1 pulls the link low.
// Following the document: 17-bit register, stop when the start bit reaches
// the 17th bit, clamp while holding an unremoved word.
module mosaic_inport #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             advance,
  input  logic             link,
  output logic [WIDTH-1:0] data,
  output logic             full,
  output logic             clamp
);
  logic [WIDTH:0] sr;

  assign full  = sr[WIDTH];
  assign data  = sr[WIDTH-1:0];
  assign clamp = full;

  always_ff @(posedge clk) begin
    if (rst || advance) sr <= '0;
    else if (!full)     sr <= {sr[WIDTH-1:0], link};
  end
endmodule
