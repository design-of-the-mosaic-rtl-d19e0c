// mosaic_outport: one serial output port.
//
// A port link is a single wire with an external pull-up, shared by one output
// port and one or more input ports. Each port either clamps it to ground or
// lets it float high, so the level on the wire is the AND of what the ports
// allow. An output port with no word to send clamps the link. When it holds a
// word and is waiting, it releases the link; the first cycle in which the link
// is high (every attached input port is ready too) is the start bit. In the
// next 16 cycles the port drives the word onto the link, most significant bit
// first, and then it is empty again.
// The port is a 17-bit parallel-in serial-out shift register: a load from the
// bus places the word in bits 16:1 and a trailer 1 in bit 0. Each transmitted
// bit is bit 16, and the register shifts left; when only the trailer is left
// (bits 15:0 all zero) the word has gone and the port has room again.
// Interface: load writes data (the bus) and must only be given when empty is
// high; clamp=1 pulls the link low; link is the level on the wire.
// Following the document: 17-bit register, trailer bit, start bit, 16 data
// cycles, clamp-if-not-ready. The bit order (MSB first) is this design's choice.
module mosaic_outport #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] data,
  input  logic             link,
  output logic             clamp,
  output logic             empty
);
  logic [WIDTH:0] sr;
  logic           sending;
  logic           ready;

  assign empty = (sr[WIDTH-1:0] == '0);
  assign ready = !empty && !sending;
  assign clamp = sending ? !sr[WIDTH] : !ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr      <= '0;
      sending <= 1'b0;
    end else if (load) begin
      sr      <= {data, 1'b1};
      sending <= 1'b0;
    end else if (sending) begin
      sr <= sr << 1;
      if (sr[WIDTH-2:0] == '0) sending <= 1'b0;
    end else if (ready && link) begin
      sending <= 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (rst) load |-> empty)
    else $error("output port loaded while not empty");
endmodule
