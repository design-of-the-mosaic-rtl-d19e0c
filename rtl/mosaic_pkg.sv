// mosaic_pkg: types and constants shared by the Mosaic element.
//
// The Mosaic element is a 16-bit processor with four serial input ports, four
// serial output ports and on-chip memory, built to be tiled by the hundred
// into fine-grain concurrent machines. Everything in the processor talks over
// one 16-bit internal bus; a PLA-style controller issues, every microcycle, a
// set of control lines for the datapath. This package holds:
//   * ctl_t     - the latched controller outputs (one bit per control line,
//                 plus the generate/propagate codes and the feedback state);
//   * fb_e      - the feedback-state encoding of the version B microcode;
//   * the instruction-word field helpers and ALU code constants.
// The control-line names follow the microcode mnemonics (IN=>, W=>, PC->inc,
// Add1, ...). Grouping them in one struct, all active high with all-zero
// meaning "do nothing", is this design's choice.
package mosaic_pkg;

  localparam int unsigned W    = 16;  // data word and bus width
  localparam int unsigned AW   = 12;  // memory address / PC width
  localparam int unsigned NREG = 16;  // general registers
  localparam int unsigned NPORT = 4;  // input ports, and output ports

  // Feedback states (5 bits), encoding as in the version B microcode.
  typedef enum logic [4:0] {
    FB_RESET2     = 5'b00000,
    FB_RESET3     = 5'b00001,
    FB_RESET4     = 5'b00010,
    FB_INTERRUPT2 = 5'b00011,
    FB_INTERRUPT3 = 5'b00100,
    FB_INTERRUPT4 = 5'b00101,
    FB_INTERRUPT5 = 5'b00110,
    FB_INTERRUPT6 = 5'b00111,
    FB_REFETCH    = 5'b01000,
    FB_FETCH      = 5'b01001,
    FB_DECODE     = 5'b01010,
    FB_GET        = 5'b01100,
    FB_GET2       = 5'b01101,
    FB_GET3       = 5'b01110,
    FB_GET4       = 5'b01111,
    FB_GO         = 5'b10000,
    FB_GO2        = 5'b10001,
    FB_GO3        = 5'b10010,
    FB_MOV        = 5'b10011,
    FB_MOV2       = 5'b10100,
    FB_MOV3       = 5'b10101,
    FB_STORE      = 5'b10110,
    FB_RJPP       = 5'b10111,
    FB_PC2        = 5'b11000
  } fb_e;

  // One microcycle's worth of control lines.
  typedef struct packed {
    // bus sources (several active sources AND together on the precharged bus)
    logic src_w;      // W=>   ALU/shifter output
    logic src_pc;     // PC=>  status word {C,V,N,Z,PC}
    logic src_in;     // IN=>  memory data input
    logic src_r;      // R=>   register J or K
    logic src_pt;     // Pt=>  selected input port
    logic src_m;      // M=>   multiplier/product register
    // bus destinations
    logic to_x;       // =>X
    logic to_y;       // =>Y
    logic to_yshift;  // =>Yshift  (bus shifted right, ALU carry into bit 15)
    logic to_d;       // =>D   memory data out
    logic to_a;       // =>A   memory address (bits 11:0)
    logic to_r;       // =>R
    logic to_pt;      // =>Pt  selected output port
    logic to_f;       // =>F   flags from bus bits 15:12
    logic to_m;       // =>M
    // ALU / shifter
    logic [3:0] g;    // generate code, index {x,y}; g[0] must be 0
    logic [3:0] p;    // propagate code, index {x,y}
    logic cforce;     // carry in forced ...
    logic cval1;      // ... to 1 (else 0); without cforce carry in = C flag
    logic sh_asr;
    logic sh_lsr;
    logic sh_ror;
    logic sh_rnib;
    logic setc;       // C <= ALU carry out
    logic setznv;     // Z, N, V <= from ALU/shifter output
    logic mshift;     // shift M right
    // address section
    logic pc_inc;     // PC->inc
    logic ra_inc;     // RA->inc
    logic add1;       // incrementer carry in
    logic inc_a;      // inc->A
    logic a_pc;       // A->PC
    logic a_ra;       // A->RA
    // miscellaneous
    logic int_clr;    // INT:=0
    logic in_i;       // IN->I
    logic write;      // write D at A
    logic srin;       // inject a 1 into SR
    logic usej;       // register select from J (else K)
    logic advance;    // advance selected input port
    fb_e  fb;         // next feedback state
  } ctl_t;

  // Instruction word fields.
  function automatic logic [3:0] fld_j(input logic [15:0] i); return i[3:0]; endfunction
  function automatic logic [3:0] fld_k(input logic [15:0] i); return i[7:4]; endfunction

endpackage
