// tb_mosaic_alu: self-checking test of the ALU (generate/propagate carry
// chain) and the shifter behind it.
//
// For each function the controller uses, given as its generate code, its
// propagate code and its carry-in, random operands are applied and the
// output, carry out and overflow are compared with the function worked out
// by ordinary arithmetic (x + y, y - x, x & y, ...). The shifts (rotate right
// through C, arithmetic and logical shift right, rotate by a nibble) are
// checked on the pass-X function. The block is combinational.
module tb_mosaic_alu;
  logic [15:0] x, y, w, alu;
  logic [3:0]  g, p;
  logic        cforce, cval1, cflag, sh_asr, sh_lsr, sh_ror, sh_rnib;
  logic        cout, ovf, shift_out;
  int checks = 0, failures = 0;

  mosaic_alu dut (.x, .y, .g, .p, .cforce, .cval1, .cflag, .sh_asr, .sh_lsr, .sh_ror,
                  .sh_rnib, .w, .alu, .cout, .ovf, .shift_out);

  typedef enum int {F_X, F_Y, F_ADD, F_SUB, F_SUBN, F_NEG, F_COM, F_AND, F_OR, F_XOR, F_XM1, F_YP1, F_M1, F_ZERO, F_ROLX} fn_e;
  typedef struct { fn_e f; logic [3:0] g, p; int cin; } code_t;   // cin: 0, 1, 2 = C flag
  code_t codes [15];

  function automatic logic [16:0] add17(logic [15:0] a, logic [15:0] b, logic ci);
    return {1'b0, a} + {1'b0, b} + 17'(ci);
  endfunction

  initial begin
    codes = '{'{F_X, 4'h0, 4'hC, 0}, '{F_Y, 4'h0, 4'hA, 0}, '{F_ADD, 4'h8, 4'h6, 2},
              '{F_SUB, 4'h2, 4'h9, 2}, '{F_SUBN, 4'h4, 4'h9, 2}, '{F_NEG, 4'h0, 4'h3, 1},
              '{F_COM, 4'h0, 4'h3, 0}, '{F_AND, 4'h0, 4'h8, 0}, '{F_OR, 4'h0, 4'hE, 0},
              '{F_XOR, 4'h0, 4'h6, 0}, '{F_XM1, 4'hC, 4'h3, 0}, '{F_YP1, 4'h0, 4'hA, 1},
              '{F_M1, 4'h0, 4'hF, 0}, '{F_ZERO, 4'h0, 4'h0, 0}, '{F_ROLX, 4'hC, 4'h0, 2}};
    {sh_asr, sh_lsr, sh_ror, sh_rnib} = '0;
    for (int t = 0; t < 3000; t++) begin
      code_t cd;
      logic [16:0] r;
      logic ci, arith;
      cd = codes[t % 15];
      x = 16'($urandom); y = 16'($urandom); cflag = 1'($urandom);
      if (t % 11 == 0) x = 16'h7FFF;
      if (t % 13 == 0) y = x;
      g = cd.g; p = cd.p;
      cforce = (cd.cin != 2); cval1 = (cd.cin == 1);
      ci = (cd.cin == 2) ? cflag : (cd.cin == 1);
      arith = 1;
      case (cd.f)
        F_X:    r = add17(x, 16'h0, ci);
        F_Y:    r = add17(y, 16'h0, ci);
        F_ADD:  r = add17(x, y, ci);
        F_SUB:  r = add17(y, ~x, ci);
        F_SUBN: r = add17(x, ~y, ci);
        F_NEG:  r = add17(~x, 16'h0, ci);
        F_XM1:  r = add17(x, 16'hFFFF, ci);
        F_YP1:  r = add17(y, 16'h0, ci);
        F_ROLX: r = add17(x, x, ci);
        F_COM:  begin r = {1'b0, ~x}; arith = 0; end
        F_AND:  begin r = {1'b0, x & y}; arith = 0; end
        F_OR:   begin r = {1'b0, x | y}; arith = 0; end
        F_XOR:  begin r = {1'b0, x ^ y}; arith = 0; end
        F_M1:   begin r = {1'b0, 16'hFFFF}; arith = 0; end
        default: begin r = 17'h0; arith = 0; end
      endcase
      #1;
      checks++;
      if (w !== r[15:0]) begin
        failures++;
        $display("FAIL %s x=%h y=%h c=%0d: w=%h expected %h", cd.f.name(), x, y, ci, w, r[15:0]);
      end
      if (arith) begin
        logic [15:0] a, b;
        logic v;
        case (cd.f)
          F_SUB:  begin a = y; b = ~x; end
          F_SUBN: begin a = x; b = ~y; end
          F_ADD:  begin a = x; b = y; end
          F_ROLX: begin a = x; b = x; end
          F_XM1:  begin a = x; b = 16'hFFFF; end
          F_NEG:  begin a = ~x; b = 16'h0; end
          F_Y, F_YP1: begin a = y; b = 16'h0; end
          default: begin a = x; b = 16'h0; end
        endcase
        v = (a[15] == b[15]) && (r[15] != a[15]);
        checks++;
        if (cout !== r[16] || ovf !== v) begin
          failures++;
          $display("FAIL %s x=%h y=%h: cout=%0d ovf=%0d expected %0d %0d", cd.f.name(), x, y, cout, ovf, r[16], v);
        end
      end
    end
    // shifter on pass-X
    g = 4'h0; p = 4'hC; cforce = 1; cval1 = 0;
    for (int t = 0; t < 400; t++) begin
      logic [15:0] e;
      x = 16'($urandom); y = 16'($urandom); cflag = 1'($urandom);
      {sh_asr, sh_lsr, sh_ror, sh_rnib} = 4'b1000 >> (t % 4);
      case (t % 4)
        0: e = {x[15], x[15:1]};
        1: e = {1'b0, x[15:1]};
        2: e = {cflag, x[15:1]};
        default: e = {x[3:0], x[15:4]};
      endcase
      #1;
      checks++;
      if (w !== e || shift_out !== x[0] || ovf !== 1'b0) begin
        failures++;
        $display("FAIL shift %0d x=%h: w=%h expected %h", t % 4, x, w, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
