// mosaic_controller: the version B microcode controller and interrupt flip-flop.
//
// The controller is a PLA with latched outputs. Each product term is a
// microcode word: it fires on a combination of the feedback state (5 bits
// fed back from its own outputs), instruction register bits I<15:6>, the
// flag condition, the port condition, the multiplier bit Mout, the step
// counter bit SRout, the interrupt flip-flop and hard reset. Every cycle the
// controller computes the control lines for the following cycle and latches
// them (ctl). Usually one word fires; for arithmetic instructions two fire at
// once, one giving only the ALU/shifter lines (the word named after the OP)
// and one giving everything else (the word for the destination). The outputs
// of all firing words are ORed, which is exact because such words never
// drive the same line.
//
// Timing: the word latched in cycle t+1 is chosen from the inputs seen in
// cycle t. The instruction register input i is the register as seen in the
// current cycle, so in the DECODE cycle (which latches I from the memory data
// input) it already holds the new instruction, letting the next word branch
// on the MODE field one cycle later, as in the document.
//
// The interrupt flip-flop is set by the INT pin and cleared by the INT:=0
// line; while the pin stays high it stays set. A short pulse gives an
// interrupt (state saved at -1, new PC read from -2); a pulse still present
// four cycles into the interrupt sequence gives a soft reset (state saved at
// -3, PC cleared).
//
// What follows the document: the word list, next states, feedback encoding
// and control lines of the version B microcode. What is this design's own:
// the source words for arithmetic MODEs 4 to 7, which are reconstructed
// around the words the document gives; the ->badPt word uses the testX ALU
// function; the carry-refresh line (saveC) is dropped because C is a
// flip-flop here. An undefined OP fires no word, so the next state is the
// all-zero state .reset2, which falls into the soft-reset path.
module mosaic_controller
  import mosaic_pkg::*;
(
  input  logic        clk,
  input  logic        rst,      // hard reset pin
  input  logic        int_pin,  // external interrupt pin
  input  logic [15:0] i,        // instruction register as seen this cycle
  input  logic        fcond,    // flag condition
  input  logic        portc,    // port condition, 0 = selected port ready
  input  logic        mout,
  input  logic        srout,
  output ctl_t        ctl,      // control lines for this cycle
  output logic        int_ff
);
  ctl_t nxt;
  fb_e  fb;

  assign fb = ctl.fb;

  // ---- microcode macros -------------------------------------------------
  function automatic ctl_t alu_f(ctl_t o, logic [3:0] g, logic [3:0] p, int cin);
    o.g = g; o.p = p;
    if (cin == 0) o.cforce = 1'b1;
    if (cin == 1) begin o.cforce = 1'b1; o.cval1 = 1'b1; end
    return o;
  endfunction
  localparam int CIN0 = 0, CIN1 = 1, CFLAG = 2;
  function automatic ctl_t x_w  (ctl_t o); o = alu_f(o, 4'h0, 4'hC, CIN0); o.src_w = 1'b1; return o; endfunction
  function automatic ctl_t y_w  (ctl_t o); o = alu_f(o, 4'h0, 4'hA, CIN0); o.src_w = 1'b1; return o; endfunction
  function automatic ctl_t xpy_w(ctl_t o); o = alu_f(o, 4'h8, 4'h6, CIN0); o.src_w = 1'b1; return o; endfunction
  function automatic ctl_t yp1_w(ctl_t o); o = alu_f(o, 4'h0, 4'hA, CIN1); o.src_w = 1'b1; return o; endfunction
  function automatic ctl_t ym1_w(ctl_t o); o = alu_f(o, 4'hA, 4'h5, CIN0); o.src_w = 1'b1; return o; endfunction
  function automatic ctl_t xp1_w(ctl_t o); o = alu_f(o, 4'h0, 4'hC, CIN1); o.src_w = 1'b1; return o; endfunction
  function automatic ctl_t xm1_w(ctl_t o); o = alu_f(o, 4'hC, 4'h3, CIN0); o.src_w = 1'b1; return o; endfunction
  function automatic ctl_t m1_w (ctl_t o); o = alu_f(o, 4'h0, 4'hF, CIN0); o.src_w = 1'b1; return o; endfunction
  function automatic ctl_t z_w  (ctl_t o); o = alu_f(o, 4'h0, 4'h0, CIN0); o.src_w = 1'b1; return o; endfunction
  function automatic ctl_t testx(ctl_t o); o = alu_f(o, 4'h0, 4'hC, CIN0); o.setznv = 1'b1; return o; endfunction
  function automatic ctl_t pcpp_a(ctl_t o); o.pc_inc = 1'b1; o.add1 = 1'b1; o.inc_a = 1'b1; o.a_pc = 1'b1; return o; endfunction
  function automatic ctl_t rapp_a(ctl_t o); o.ra_inc = 1'b1; o.add1 = 1'b1; o.inc_a = 1'b1; o.a_ra = 1'b1; return o; endfunction
  function automatic ctl_t pc_a  (ctl_t o); o.pc_inc = 1'b1; o.inc_a = 1'b1; o.a_pc = 1'b1; return o; endfunction

  // ---- instruction fields seen by the PLA (I<15:6>) -------------------------
  logic       is_move;
  logic [2:0] mode, msrc, mdst;
  logic [4:0] op;
  logic       i7, i6;

  assign is_move = (i[15:14] == 2'b00);
  assign mode    = i[15:13];
  assign msrc    = i[13:11];
  assign mdst    = i[10:8];
  assign op      = i[12:8];
  assign i7      = i[7];
  assign i6      = i[6];

  // branch condition of BRAT/BRAF: field K names a flag condition (I<7>=1) or
  // "port not ready" (I<7>=0); BRAF (OP bit 0) inverts it
  logic br_cond, br_taken;
  assign br_cond  = i7 ? fcond : portc;
  assign br_taken = op[0] ? !br_cond : br_cond;

  // ---- the PLA --------------------------------------------------------------
  always_comb begin
    nxt = '0;                                   // fb = .reset2 when nothing fires
    if (rst) begin
      // hardreset: X and Y take the precharged (all ones) bus
      nxt.int_clr = 1'b1; nxt.to_x = 1'b1; nxt.to_y = 1'b1; nxt = rapp_a(nxt);
      nxt.fb = FB_RESET4;
    end else begin
      unique case (fb)
        // -- interrupt and soft reset --------------------------------------
        FB_INTERRUPT2: begin nxt = xm1_w(nxt); nxt.to_d = 1'b1; nxt.fb = FB_INTERRUPT3; end
        FB_INTERRUPT3: begin nxt = m1_w(nxt); nxt.to_a = 1'b1; nxt.to_x = 1'b1; nxt.fb = FB_INTERRUPT4; end
        FB_INTERRUPT4:
          if (!int_ff) begin nxt.write = 1'b1; nxt = xm1_w(nxt); nxt.to_a = 1'b1; nxt.fb = FB_INTERRUPT5; end
          else         begin nxt = xm1_w(nxt); nxt.to_x = 1'b1; nxt.fb = FB_RESET2; end   // softreset
        FB_INTERRUPT5: nxt.fb = FB_INTERRUPT6;
        FB_INTERRUPT6: begin nxt.src_in = 1'b1; nxt.to_a = 1'b1; nxt.a_pc = 1'b1; nxt.fb = FB_FETCH; end
        FB_RESET2:     begin nxt = xm1_w(nxt); nxt.to_a = 1'b1; nxt.fb = FB_RESET3; end
        FB_RESET3:     begin nxt.write = 1'b1; nxt.fb = FB_RESET4; end
        FB_RESET4:
          if (int_ff) begin nxt.int_clr = 1'b1; nxt.to_x = 1'b1; nxt.to_y = 1'b1; nxt = rapp_a(nxt); nxt.fb = FB_RESET4; end
          else        begin nxt = z_w(nxt); nxt.to_a = 1'b1; nxt.a_pc = 1'b1; nxt.fb = FB_FETCH; end

        // -- fetch, decode, refetch ------------------------------------------
        FB_FETCH: begin nxt = pcpp_a(nxt); nxt.fb = FB_DECODE; end
        FB_DECODE:
          if (int_ff) begin          // interrupt1
            nxt.int_clr = 1'b1; nxt.src_pc = 1'b1; nxt.to_x = 1'b1; nxt.fb = FB_INTERRUPT2;
          end else begin             // decode
            nxt.in_i = 1'b1; nxt.usej = 1'b1; nxt.src_r = 1'b1;
            nxt.to_x = 1'b1; nxt.to_y = 1'b1; nxt.to_d = 1'b1; nxt.to_m = 1'b1;
            nxt = rapp_a(nxt); nxt.fb = FB_GET;
          end
        FB_REFETCH: begin nxt = xm1_w(nxt); nxt.to_a = 1'b1; nxt.a_pc = 1'b1; nxt.fb = FB_FETCH; end

        // -- operand fetch -----------------------------------------------------
        FB_GET:
          if (is_move) begin
            unique case (msrc)
              3'd0: begin nxt = pc_a(nxt); nxt.fb = FB_MOV; end                                   // RJ->
              3'd1: begin nxt.usej = 1'b1; nxt.src_r = 1'b1; nxt.to_a = 1'b1; nxt.fb = FB_GET3; end // @RJ->
              3'd2: begin nxt.usej = 1'b1; nxt.src_r = 1'b1; nxt.to_a = 1'b1; nxt.to_y = 1'b1; nxt.fb = FB_GET2; end // @RJ+>
              3'd3: begin nxt.src_in = 1'b1; nxt.to_y = 1'b1; nxt = pcpp_a(nxt); nxt.fb = FB_GET2; end // @(RJ+#)->
              3'd4: begin nxt.src_in = 1'b1; nxt.to_x = 1'b1; nxt.to_d = 1'b1; nxt = pcpp_a(nxt); nxt.fb = FB_MOV; end // #->
              3'd5: begin nxt.src_in = 1'b1; nxt.to_a = 1'b1; nxt.fb = FB_GET2; end               // @#->
              3'd6: if (!i6) begin nxt.src_pc = 1'b1; nxt.to_x = 1'b1; nxt.fb = FB_REFETCH; end    // badPt->
                    else     begin nxt = pc_a(nxt); nxt.fb = FB_GET2; end                         // InPt->
              default: begin nxt = z_w(nxt); nxt.to_x = 1'b1; nxt.to_d = 1'b1; nxt = pc_a(nxt); nxt.fb = FB_MOV; end // 0->
            endcase
          end else begin
            unique case (mode)
              3'd2: begin nxt = pc_a(nxt); nxt.src_r = 1'b1; nxt.to_y = 1'b1; nxt.fb = FB_GO; end      // J,K,K
              3'd3: begin nxt = pcpp_a(nxt); nxt.src_in = 1'b1; nxt.to_x = 1'b1; nxt.fb = FB_GO; end   // #,J,K
              3'd4, 3'd6: begin nxt.usej = 1'b1; nxt.src_r = 1'b1; nxt.to_a = 1'b1; nxt.fb = FB_GET2; end // @J,K,
              default: begin nxt.src_in = 1'b1; nxt.to_a = 1'b1; nxt.fb = FB_GET2; end                 // @#,J,
            endcase
          end
        FB_GET2:
          if (is_move) begin
            unique case (msrc)
              3'd2: begin nxt = yp1_w(nxt); nxt.usej = 1'b1; nxt.to_r = 1'b1; nxt = pc_a(nxt); nxt.fb = FB_GET4; end
              3'd3: begin nxt = xpy_w(nxt); nxt.to_a = 1'b1; nxt.fb = FB_GET3; end
              3'd5: begin nxt = pcpp_a(nxt); nxt.fb = FB_GET4; end
              3'd6:
                if (!portc) begin nxt.src_pt = 1'b1; nxt.to_x = 1'b1; nxt.to_d = 1'b1; nxt.advance = i7; nxt.fb = FB_MOV; end
                else        begin nxt.src_pc = 1'b1; nxt.to_x = 1'b1; nxt.fb = FB_REFETCH; end       // iofailed
              default: ;
            endcase
          end else begin
            unique case (mode)
              3'd4: begin nxt = pc_a(nxt); nxt.src_r = 1'b1; nxt.to_y = 1'b1; nxt.fb = FB_GET3; end   // @J,K,K
              3'd6: begin nxt.src_r = 1'b1; nxt.to_y = 1'b1; nxt.fb = FB_GET3; end                   // @J,K,@J
              3'd5: begin nxt = pcpp_a(nxt); nxt.fb = FB_GET3; end                                   // @#,J,K
              3'd7: nxt.fb = FB_GET3;                                                                 // @#,J,@#
              default: ;
            endcase
          end
        FB_GET3:
          if (is_move) begin nxt = pc_a(nxt); nxt.fb = FB_GET4; end                                   // @-wait
          else if (mode[2]) begin nxt.src_in = 1'b1; nxt.to_x = 1'b1; nxt.fb = FB_GO; end            // any@
        FB_GET4:
          if (is_move) begin nxt.src_in = 1'b1; nxt.to_x = 1'b1; nxt.to_d = 1'b1; nxt.fb = FB_MOV; end // any-@

        // -- MOVE destinations -------------------------------------------------
        FB_MOV: begin
          unique case (mdst)
            3'd0: begin nxt = x_w(nxt); nxt.to_r = 1'b1; nxt.setznv = 1'b1; nxt = pcpp_a(nxt); nxt.fb = FB_DECODE; end
            3'd1: begin nxt = testx(nxt); nxt.src_r = 1'b1; nxt.to_a = 1'b1; nxt.fb = FB_STORE; end
            3'd2: begin nxt = testx(nxt); nxt.src_r = 1'b1; nxt.to_a = 1'b1; nxt.to_x = 1'b1; nxt.fb = FB_MOV2; end
            3'd3, 3'd4: begin nxt = testx(nxt); nxt.src_r = 1'b1; nxt.to_x = 1'b1; nxt.fb = FB_MOV2; end
            3'd5: begin nxt = testx(nxt); nxt = pcpp_a(nxt); nxt.fb = FB_MOV2; end
            3'd6:
              if (i6) begin nxt = testx(nxt); nxt = pcpp_a(nxt); nxt.fb = FB_DECODE; end             // ->badPt
              else if (!portc) begin nxt = x_w(nxt); nxt.to_pt = 1'b1; nxt.setznv = 1'b1; nxt = pcpp_a(nxt); nxt.fb = FB_DECODE; end
              else unique case (msrc)                                                                 // ->Ptwait
                3'd2:       begin nxt = y_w(nxt); nxt.usej = 1'b1; nxt.to_r = 1'b1; nxt.fb = FB_RJPP; end
                3'd3, 3'd4, 3'd5: begin nxt.src_pc = 1'b1; nxt.to_x = 1'b1; nxt.fb = FB_PC2; end
                default:    begin nxt.src_pc = 1'b1; nxt.to_x = 1'b1; nxt.fb = FB_REFETCH; end
              endcase
            default: begin nxt = testx(nxt); nxt = pcpp_a(nxt); nxt.fb = FB_DECODE; end            // ->*
          endcase
          if (msrc[2]) nxt.usej = 1'b1;                                                               // pickJ
        end
        FB_MOV2: begin
          unique case (mdst)
            3'd2: begin nxt.write = 1'b1; nxt = xp1_w(nxt); nxt.to_r = 1'b1; nxt = pc_a(nxt); nxt.fb = FB_FETCH; end
            3'd3: begin nxt.src_in = 1'b1; nxt.to_y = 1'b1; nxt = pcpp_a(nxt); nxt.fb = FB_MOV3; end
            3'd4: begin nxt = xm1_w(nxt); nxt.to_a = 1'b1; nxt.to_r = 1'b1; nxt.fb = FB_STORE; end
            3'd5: begin nxt.src_in = 1'b1; nxt.to_a = 1'b1; nxt.fb = FB_STORE; end
            default: ;
          endcase
          if (msrc[2]) nxt.usej = 1'b1;                                                               // pickJ2
        end
        FB_MOV3: begin nxt = xpy_w(nxt); nxt.to_a = 1'b1; nxt.fb = FB_STORE; end
        FB_RJPP: begin nxt.src_pc = 1'b1; nxt.to_x = 1'b1; nxt.fb = FB_REFETCH; end
        FB_PC2:  begin nxt = xm1_w(nxt); nxt.to_x = 1'b1; nxt.fb = FB_REFETCH; end
        FB_STORE: begin
          nxt.write = 1'b1; nxt.fb = FB_FETCH;
          if (!is_move && mode == 3'd7) nxt = pcpp_a(nxt);                                          // ALU->@#
          else nxt = pc_a(nxt);                                                                     // store, ALU->@J
        end

        // -- arithmetic and branch OPs -----------------------------------------
        FB_GO: begin
          // ALU-only words, one per arithmetic OP
          unique case (op)
            5'h00: nxt = alu_f(nxt, 4'h0, 4'hC, CIN1);                                      // inc
            5'h01: nxt = alu_f(nxt, 4'hC, 4'h3, CIN0);                                      // dec
            5'h02: begin nxt = alu_f(nxt, 4'h0, 4'hC, CIN0); nxt.sh_asr = 1'b1; end         // asr
            5'h03: begin nxt = alu_f(nxt, 4'hC, 4'h0, CIN0); nxt.setc = 1'b1; end           // asl
            5'h04: begin nxt = alu_f(nxt, 4'h0, 4'hC, CIN0); nxt.sh_ror = 1'b1; end         // ror
            5'h05: begin nxt = alu_f(nxt, 4'hC, 4'h0, CFLAG); nxt.setc = 1'b1; end          // rol
            5'h06: begin nxt = alu_f(nxt, 4'h0, 4'hC, CIN0); nxt.sh_lsr = 1'b1; end         // lsr
            5'h07: begin nxt = alu_f(nxt, 4'h0, 4'hC, CIN0); nxt.sh_rnib = 1'b1; end        // rnr
            5'h08: begin nxt = alu_f(nxt, 4'h8, 4'h6, CIN0); nxt.setc = 1'b1; end           // add
            5'h09: begin nxt = alu_f(nxt, 4'h8, 4'h6, CFLAG); nxt.setc = 1'b1; end          // addc
            5'h0A: begin nxt = alu_f(nxt, 4'h2, 4'h9, CIN1); nxt.setc = 1'b1; end           // sub
            5'h0B: begin nxt = alu_f(nxt, 4'h2, 4'h9, CFLAG); nxt.setc = 1'b1; end          // subc
            5'h0C: begin nxt = alu_f(nxt, 4'h4, 4'h9, CIN1); nxt.setc = 1'b1; end           // subn
            5'h0D: begin nxt = alu_f(nxt, 4'h4, 4'h9, CFLAG); nxt.setc = 1'b1; end          // subnc
            5'h0E: begin nxt = alu_f(nxt, 4'h0, 4'h3, CIN1); nxt.setc = 1'b1; end           // neg
            5'h0F: begin nxt = alu_f(nxt, 4'h0, 4'hC, CFLAG); nxt.setc = 1'b1; end          // incc
            5'h10: nxt = alu_f(nxt, 4'h0, 4'h3, CIN0);                                      // com
            5'h11: nxt = alu_f(nxt, 4'h0, 4'h8, CIN0);                                      // and
            5'h12: nxt = alu_f(nxt, 4'h0, 4'hE, CIN0);                                      // or
            5'h13: nxt = alu_f(nxt, 4'h0, 4'h6, CIN0);                                      // xor
            default: ;
          endcase
          if (op <= 5'h13) begin
            nxt.setznv = 1'b1;
            // destination words
            if (mode[2:1] == 2'b11) begin nxt.src_w = 1'b1; nxt.to_d = 1'b1; nxt.fb = FB_STORE; end   // ALU->@
            else begin nxt = pcpp_a(nxt); nxt.src_w = 1'b1; nxt.to_r = 1'b1; nxt.fb = FB_DECODE; end   // ALU->K
          end
          // special arithmetics and branches
          unique casez (op)
            5'h14: begin nxt = pcpp_a(nxt); nxt = alu_f(nxt, 4'h4, 4'h9, CIN1); nxt.setznv = 1'b1; nxt.setc = 1'b1; nxt.fb = FB_DECODE; end // cmp
            5'h15: begin nxt = pcpp_a(nxt); nxt = alu_f(nxt, 4'h0, 4'h8, CIN0); nxt.setznv = 1'b1; nxt.fb = FB_DECODE; end // bitt
            5'h16: begin nxt.mshift = 1'b1; nxt = z_w(nxt); nxt.to_y = 1'b1; nxt.srin = 1'b1; nxt.fb = FB_GO2; end  // mul
            5'h18: begin nxt = x_w(nxt); nxt.to_a = 1'b1; nxt.a_pc = 1'b1; nxt.fb = FB_FETCH; end                  // jump
            5'h19: begin nxt = x_w(nxt); nxt.to_f = 1'b1; nxt.to_a = 1'b1; nxt.a_pc = 1'b1; nxt.fb = FB_FETCH; end  // jrst
            5'b1101?: begin nxt.src_r = 1'b1; nxt.to_y = 1'b1; nxt.to_a = 1'b1; nxt.fb = FB_GO2; end              // popj
            5'b1110?: begin                                                                                         // brat, braf
              if (br_taken) begin nxt = x_w(nxt); nxt.to_a = 1'b1; nxt.a_pc = 1'b1; nxt.fb = FB_FETCH; end
              else       begin nxt = pcpp_a(nxt); nxt.fb = FB_DECODE; end
            end
            5'b1111?: begin nxt = ym1_w(nxt); nxt.to_r = 1'b1; nxt.to_a = 1'b1; nxt.fb = FB_GO2; end               // pushj
            default: ;
          endcase
        end
        FB_GO2:
          unique casez (op)
            5'h16:                                                                                // multiply loop
              if (srout) begin nxt.mshift = 1'b1; nxt = y_w(nxt); nxt.usej = 1'b1; nxt.to_r = 1'b1; nxt.setznv = 1'b1; nxt = pc_a(nxt); nxt.fb = FB_GO3; end
              else if (mout) begin nxt.mshift = 1'b1; nxt = xpy_w(nxt); nxt.to_yshift = 1'b1; nxt = rapp_a(nxt); nxt.fb = FB_GO2; end
              else begin nxt.mshift = 1'b1; nxt = y_w(nxt); nxt.to_yshift = 1'b1; nxt = rapp_a(nxt); nxt.fb = FB_GO2; end
            5'b1101?: begin nxt = yp1_w(nxt); nxt.to_r = 1'b1; nxt.fb = FB_GO3; end                // popj2
            5'b1111?: begin nxt.src_pc = 1'b1; nxt.to_d = 1'b1; nxt.fb = FB_GO3; end               // pushj2
            default: ;
          endcase
        FB_GO3:
          unique casez (op)
            5'h16: begin nxt.src_m = 1'b1; nxt.to_r = 1'b1; nxt = pcpp_a(nxt); nxt.fb = FB_DECODE; end   // mulend
            5'h1A: begin nxt.src_in = 1'b1; nxt.to_a = 1'b1; nxt.a_pc = 1'b1; nxt.fb = FB_FETCH; end      // popj3
            5'h1B: begin nxt.src_in = 1'b1; nxt.to_f = 1'b1; nxt.to_a = 1'b1; nxt.a_pc = 1'b1; nxt.fb = FB_FETCH; end // popjr
            5'b1111?: begin nxt.write = 1'b1; nxt = x_w(nxt); nxt.to_a = 1'b1; nxt.a_pc = 1'b1; nxt.fb = FB_FETCH; end // pushj3
            default: ;
          endcase
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    ctl    <= nxt;
    int_ff <= int_pin | (int_ff & ~ctl.int_clr);
  end
endmodule
