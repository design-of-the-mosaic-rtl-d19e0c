// mosaic_addr: address section - PC, refresh address RA, memory address A.
//
// Every microcycle the section issues a new memory address. A is the address
// register whose output is the 12-bit memory address bus. Its next value is,
// in order of precedence: the bus (=>A, low 12 bits), the incrementer output
// (inc->A), or its old value. The incrementer adds add1 (0 or 1) to PC or to
// RA (PC->inc, RA->inc). A->PC and A->RA copy the new A into PC or RA, so the
// microcode macro PC++->A (PC->inc Add1 inc->A A->PC) both advances the PC
// and addresses the word it now points at; RA++->A does the same for the
// refresh counter, which the microcode issues at least once every 8 cycles.
// PC and A are cleared on reset here; the document's hard reset reaches
// address 0 through the microcode and would work without it.
module mosaic_addr #(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          pc_inc,
  input  logic          ra_inc,
  input  logic          add1,
  input  logic          inc_a,
  input  logic          a_pc,
  input  logic          a_ra,
  input  logic          bus_a,      // =>A
  input  logic [AW-1:0] bus,        // bus bits AW-1:0
  output logic [AW-1:0] a,          // memory address
  output logic [AW-1:0] pc,
  output logic [AW-1:0] ra
);
  logic [AW-1:0] inc_in, inc_out, a_next;

  always_comb begin
    inc_in = '0;
    if (pc_inc) inc_in = inc_in | pc;
    if (ra_inc) inc_in = inc_in | ra;
    inc_out = inc_in + AW'(add1);
    if (bus_a)      a_next = bus;
    else if (inc_a) a_next = inc_out;
    else            a_next = a;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a  <= '0;
      pc <= '0;
    end else begin
      a <= a_next;
      if (a_pc) pc <= a_next;
    end
    if (a_ra) ra <= a_next;
  end
endmodule
