// mosaic_flag_cond: the flag condition PLA.
//
// Conditional branches carry a 3-bit condition in I<6:4>. This small PLA
// combines those bits with the four flags into one bit, the flag condition,
// which the controller tests; the controller never sees the flags directly.
//   I<6:4>  condition
//   000     V
//   001     N
//   010     not C            (unsigned <)
//   011     N xor V          (signed <)
//   100     Z
//   101     Z or N
//   110     Z or not C       (unsigned <=)
//   111     Z or (N xor V)   (signed <=)
// It is written, as in the document, as a sum of six product terms; purely
// combinational.
module mosaic_flag_cond (
  input  logic [2:0] cond,   // I<6:4>
  input  logic       c,
  input  logic       v,
  input  logic       n,
  input  logic       z,
  output logic       fcond
);
  assign fcond = ( cond[2]                          & z)
               | (~cond[2] & ~cond[1] & ~cond[0]    & v)
               | (            ~cond[1] &  cond[0]    & n)
               | (             cond[1] & ~cond[0]    & ~c)
               | (             cond[1] &  cond[0]    & n & ~v)
               | (             cond[1] &  cond[0]    & ~n & v);
endmodule
