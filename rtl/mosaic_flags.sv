// mosaic_flags: the C, V, N and Z flags.
//
// Z (zero result), N (bit 15 of the result), V (two's complement overflow)
// are written together when the controller asserts set_znv. C (carry / not
// borrow) takes the ALU carry out when set_c is asserted, and takes the bit
// shifted out when a one-bit right shift (asr, lsr, ror) runs; otherwise it
// keeps its value. In version B the flags can also be loaded from bus bits
// 15:12 as {C,V,N,Z} (used to return from an interrupt); that load wins.
// Updates happen at the clock edge ending the microcycle.
// The document's hardware keeps C on a dynamic node refreshed by the
// microcode; here C is a plain flip-flop that holds by itself. Clearing all
// flags on reset is this design's choice (the document leaves them alone).
module mosaic_flags #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             set_c,
  input  logic             set_znv,
  input  logic             shift1,     // a 1-bit right shift is active
  input  logic             load_f,     // =>F
  input  logic [3:0]       bus_f,      // bus bits 15:12 = {C,V,N,Z}
  input  logic [WIDTH-1:0] w,          // ALU/shifter output
  input  logic             cout,
  input  logic             ovf,
  input  logic             shift_out,
  output logic             c,
  output logic             v,
  output logic             n,
  output logic             z
);
  always_ff @(posedge clk) begin
    if (rst) begin
      {c, v, n, z} <= '0;
    end else if (load_f) begin
      {c, v, n, z} <= bus_f;
    end else begin
      if (set_c)       c <= cout;
      else if (shift1) c <= shift_out;
      if (set_znv) begin
        z <= (w == '0);
        n <= w[WIDTH-1];
        v <= ovf;
      end
    end
  end
endmodule
