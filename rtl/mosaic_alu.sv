// mosaic_alu: ALU and series shifter of the Mosaic datapath.
//
// The ALU follows the OM style: two 4-entry function blocks give, for every
// bit, a carry-propagate P and a carry-generate G as a function of the operand
// bits (x,y); the codes index the entry {x,y}, so entry 3 is x=1,y=1 and
// entry 0 is x=0,y=0. The carry chain passes the incoming carry where P is 1
// and injects G where P is 0; each result bit is P xor its carry-in (the
// exclusive-OR output stage). Addition is G=8,P=6; subtract Y-X is G=2,P=9,
// and so on, as in the version B microcode. The carry into bit 0 is the C
// flag unless cforce is set, in which case it is cval1.
// The ALU result then passes the shifter: no shift, rotate right through C,
// arithmetic or logical shift right by one, or rotate right by four (nibble
// rotate). A one-bit right shift reports the bit shifted out (shift_out).
// Overflow is carry(16) xor carry(15); a shift cycle reports no overflow.
// All of this is combinational and completes in one microcycle.
module mosaic_alu #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [3:0]       g,        // generate code
  input  logic [3:0]       p,        // propagate code
  input  logic             cforce,
  input  logic             cval1,
  input  logic             cflag,    // current C flag
  input  logic             sh_asr,
  input  logic             sh_lsr,
  input  logic             sh_ror,
  input  logic             sh_rnib,
  output logic [WIDTH-1:0] w,        // ALU/shifter output
  output logic [WIDTH-1:0] alu,      // ALU output before the shifter
  output logic             cout,     // carry out of bit WIDTH-1
  output logic             ovf,      // two's complement overflow
  output logic             shift_out // bit shifted out by a 1-bit right shift
);
  logic [WIDTH:0]   c;
  logic [WIDTH-1:0] pv, gv;

  // per-bit propagate and generate from the two function blocks
  for (genvar i = 0; i < WIDTH; i++) begin : g_fn
    assign pv[i] = p[{x[i], y[i]}];
    assign gv[i] = g[{x[i], y[i]}];
    assign c[i+1] = pv[i] ? c[i] : gv[i];   // carry chain
  end
  assign c[0] = cforce ? cval1 : cflag;
  assign alu  = pv ^ c[WIDTH-1:0];

  assign cout      = c[WIDTH];
  assign shift_out = alu[0];

  always_comb begin
    if (sh_ror)       w = {cflag, alu[WIDTH-1:1]};
    else if (sh_asr)  w = {alu[WIDTH-1], alu[WIDTH-1:1]};
    else if (sh_lsr)  w = {1'b0, alu[WIDTH-1:1]};
    else if (sh_rnib) w = {alu[3:0], alu[WIDTH-1:4]};
    else              w = alu;
  end

  assign ovf = (sh_ror | sh_asr | sh_lsr | sh_rnib) ? 1'b0 : (c[WIDTH] ^ c[WIDTH-1]);
endmodule
