// mosaic_asm_pkg: a small assembler for Mosaic version B machine words,
// used by the testbenches to build programs.
//
// MOVE words:        {2'b00, MSOURCE[2:0], MDEST[2:0], K[3:0], J[3:0]}
// arithmetic/branch: {MODE[2:0], OP[4:0], K[3:0], J[3:0]}, MODE 2..7
// A port in field K is {Adv, Dir, pt[1:0]} (Dir = 1 for an input port);
// a branch condition in field K is {0, Dir, pt} for "port pt not ready" or
// {1, cond[2:0]} for a flag condition.
package mosaic_asm_pkg;
  // MOVE sources
  localparam logic [2:0] S_R = 0, S_AT_R = 1, S_AT_RPP = 2, S_AT_RIDX = 3,
                         S_IMM = 4, S_AT_IMM = 5, S_PORT = 6, S_ZERO = 7;
  // MOVE destinations
  localparam logic [2:0] D_R = 0, D_AT_R = 1, D_AT_RPP = 2, D_AT_RIDX = 3,
                         D_AT_MMR = 4, D_AT_IMM = 5, D_PORT = 6, D_NONE = 7;
  // arithmetic modes
  localparam logic [2:0] M_JKK = 2, M_IJK = 3, M_AJKK = 4, M_AIJK = 5, M_AJKAJ = 6, M_AIJAI = 7;
  // OPs
  localparam logic [4:0] INC = 5'h00, DEC = 5'h01, ASR = 5'h02, ASL = 5'h03, ROR = 5'h04,
                         ROL = 5'h05, LSR = 5'h06, RNR = 5'h07, ADD = 5'h08, ADDC = 5'h09,
                         SUB = 5'h0A, SUBC = 5'h0B, SUBN = 5'h0C, SUBNC = 5'h0D, NEG = 5'h0E,
                         INCC = 5'h0F, COM = 5'h10, AND_ = 5'h11, OR_ = 5'h12, XOR_ = 5'h13,
                         CMP = 5'h14, BITT = 5'h15, MUL = 5'h16, JUMP = 5'h18, JRST = 5'h19,
                         POPJ = 5'h1A, POPJR = 5'h1B, BRAT = 5'h1C, BRAF = 5'h1D, PUSHJ = 5'h1E;
  // flag conditions (field K with bit 3 set)
  localparam logic [3:0] C_V = 4'b1000, C_N = 4'b1001, C_NC = 4'b1010, C_LT = 4'b1011,
                         C_Z = 4'b1100, C_LEZ = 4'b1101, C_LOS = 4'b1110, C_LE = 4'b1111;

  function automatic logic [15:0] mv(logic [2:0] src, logic [2:0] dst, logic [3:0] k, logic [3:0] j);
    return {2'b00, src, dst, k, j};
  endfunction
  function automatic logic [15:0] ar(logic [2:0] mode, logic [4:0] op, logic [3:0] k, logic [3:0] j);
    return {mode, op, k, j};
  endfunction
  function automatic logic [3:0] outp(int pt);          return {2'b00, 2'(pt)}; endfunction
  function automatic logic [3:0] inp(int pt, bit adv);  return {adv, 1'b1, 2'(pt)}; endfunction
endpackage
