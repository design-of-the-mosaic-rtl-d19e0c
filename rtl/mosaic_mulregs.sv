// mosaic_mulregs: multiplier/product register M and step-counting register SR.
//
// Version B adds a one-cycle multiply step. M is loaded from the bus (=>M)
// with the multiplier and drives the bus (M=>) with the low product word.
// On Mshift it shifts right by one: M<0> leaves as Mout, which the
// controller tests to choose between adding X or not, and the new M<15> is
// Y<-1>, the bit the Y operand latch shifted out on its last Yshift. So the
// multiplier bits leave at the bottom while low product bits enter at the top.
// SR is a 16-bit shift register that shifts right every cycle; SRin (the
// SRin=1 control line) enters at the top and SRout = SR<0>. Injecting one 1
// at the start of a multiply makes SRout rise 16 cycles later, which ends the
// multiply loop: the controller uses it as a step counter.
// SR shifting every cycle and both registers clearing on reset are this
// design's choices; the document shows no shift enable for SR.
module mosaic_mulregs #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load_m,   // =>M
  input  logic             mshift,
  input  logic             y_m1,     // Y<-1>
  input  logic [WIDTH-1:0] bus,
  input  logic             srin,
  output logic [WIDTH-1:0] m,
  output logic             mout,
  output logic             srout
);
  logic [WIDTH-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst) begin
      m  <= '0;
      sr <= '0;
    end else begin
      if (load_m)      m <= bus;
      else if (mshift) m <= {y_m1, m[WIDTH-1:1]};
      sr <= {srin, sr[WIDTH-1:1]};
    end
  end

  assign mout  = m[0];
  assign srout = sr[0];
endmodule
