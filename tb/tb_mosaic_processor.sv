// tb_mosaic_processor: self-checking test of the version B processor running
// programs from a simple behavioural memory (one-cycle read latency).
//
// The program covers every arithmetic OP with random operands and a random
// carry (set beforehand with JRST), the multiply, all MOVE sources and
// destinations, the four memory-referencing arithmetic MODEs, PUSHJ/POPJ,
// POPJR and the conditional branches on every flag condition. Results are
// stored to memory and compared with values worked out here from the
// instruction definitions (not from the ALU's generate/propagate codes). The
// flags after each OP are captured by a PUSHJ, which pushes {C,V,N,Z,PC}.
// The duration of every instruction is measured from one DECODE cycle to the
// next and compared with the timing table: 3 + Time(MODE or MSOURCE) +
// Time(OP or MDEST) cycles.
module tb_mosaic_processor;
  import mosaic_pkg::*;
  import mosaic_asm_pkg::*;

  logic clk = 0, rst = 1, int_pin = 0;
  logic [11:0] mem_addr;
  logic        mem_we;
  logic [15:0] mem_wdata, mem_rdata;
  logic [3:0]  in_link, in_clamp, out_link, out_clamp;

  int checks = 0, failures = 0;
  logic [15:0] mem [4096];

  always #5 clk = ~clk;

  mosaic_processor dut (
    .clk, .rst, .int_pin, .mem_addr, .mem_we, .mem_wdata, .mem_rdata,
    .in_link, .in_clamp, .out_link, .out_clamp
  );

  // output port n looped back to input port n
  assign in_link  = ~in_clamp & ~out_clamp;
  assign out_link = in_link;

  always_ff @(posedge clk) begin
    mem_rdata <= mem[mem_addr];
    if (mem_we) mem[mem_addr] <= mem_wdata;
  end

  // ---- program builder ----------------------------------------------------------
  int ap = 0;
  task automatic e(input logic [15:0] w); mem[ap] = w; ap++; endtask

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // reference arithmetic, from the instruction set table
  typedef struct packed { logic [15:0] w; logic c, v, n, z; logic wr; } res_t;
  function automatic res_t add3(logic [15:0] a, logic [15:0] b, logic ci);
    res_t r; logic [16:0] s;
    s = {1'b0, a} + {1'b0, b} + 17'(ci);
    r.w = s[15:0]; r.c = s[16];
    r.v = (a[15] == b[15]) && (s[15] != a[15]);
    return r;
  endfunction
  function automatic res_t ref_op(logic [4:0] op, logic [15:0] x, logic [15:0] y, logic cin);
    res_t r;
    r = '0; r.c = cin; r.wr = 1'b1;
    unique case (op)
      INC:  begin r = add3(x, 16'h0000, 1'b1); r.c = cin; end
      DEC:  begin r = add3(x, 16'hFFFF, 1'b0); r.c = cin; end
      ASR:  begin r.w = {x[15], x[15:1]}; r.c = x[0]; end
      ASL:  begin r.w = {x[14:0], 1'b0}; r.c = x[15]; r.v = x[15] ^ x[14]; end
      ROR:  begin r.w = {cin, x[15:1]}; r.c = x[0]; end
      ROL:  begin r.w = {x[14:0], cin}; r.c = x[15]; r.v = x[15] ^ x[14]; end
      LSR:  begin r.w = {1'b0, x[15:1]}; r.c = x[0]; end
      RNR:  r.w = {x[3:0], x[15:4]};
      ADD:  r = add3(x, y, 1'b0);
      ADDC: r = add3(x, y, cin);
      SUB:  r = add3(y, ~x, 1'b1);
      SUBC: r = add3(y, ~x, cin);
      SUBN: r = add3(x, ~y, 1'b1);
      SUBNC: r = add3(x, ~y, cin);
      NEG:  r = add3(~x, 16'h0000, 1'b1);
      INCC: r = add3(x, 16'h0000, cin);
      COM:  r.w = ~x;
      AND_: r.w = x & y;
      OR_:  r.w = x | y;
      XOR_: r.w = x ^ y;
      CMP:  r = add3(x, ~y, 1'b1);
      BITT: r.w = x & y;
      default: ;
    endcase
    r.wr = (op <= XOR_);
    r.z = (r.w == 0); r.n = r.w[15];
    return r;
  endfunction

  // ---- expected durations from the timing tables --------------------------------
  function automatic int exp_time(logic [15:0] iw, output bit exact);
    int tsrc[8] = '{0, 2, 2, 3, 0, 2, 1, 0};
    int tdst[8] = '{0, 2, 2, 4, 3, 3, 0, 0};
    int tmode[8] = '{0, 0, 0, 0, 2, 2, 4, 4};
    logic [4:0] op;
    exact = 1;
    if (iw[15:14] == 2'b00) begin
      if (iw[13:11] == 3'd6 || iw[10:8] == 3'd6) return -1;  // port moves wait and refetch
      return 3 + tsrc[iw[13:11]] + tdst[iw[10:8]];
    end
    op = iw[12:8];
    case (op)
      MUL: return 3 + tmode[iw[15:13]] + 18;
      JUMP, JRST: return 3 + tmode[iw[15:13]] + 1;
      POPJ, POPJR: return 3 + tmode[iw[15:13]] + 3;
      PUSHJ: return 3 + tmode[iw[15:13]] + 3;      // microcode: go, go2, go3, fetch
      BRAT, BRAF: begin exact = 0; return 3 + tmode[iw[15:13]]; end  // +1 if taken
      default: return 3 + tmode[iw[15:13]];
    endcase
  endfunction

  int cyc = 0, last_dec = -1;
  logic [15:0] last_iw;
  int timing_checked = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && dut.ctl.in_i) begin
      if (last_dec >= 0) begin
        bit exact; int t, d;
        t = exp_time(last_iw, exact);
        d = cyc - last_dec;
        if (t >= 0) begin checks++; timing_checked++; end
        if (t >= 0 && (exact ? (d != t) : (d != t && d != t + 1))) begin
          failures++;
          $display("FAIL timing of %h: %0d cycles, expected %0d", last_iw, d, t);
        end
      end
      last_dec <= cyc;
      last_iw  <= dut.i_eff;
    end
  end

  // ---- the program -------------------------------------------------------------
  localparam int RES = 'h800, FLG = 'hA00, DONE = 'hFF0;
  localparam logic [4:0] OPS [22] = '{INC, DEC, ASR, ASL, ROR, ROL, LSR, RNR, ADD, ADDC, SUB,
                                      SUBC, SUBN, SUBNC, NEG, INCC, COM, AND_, OR_, XOR_, CMP, BITT};
  localparam int ROUNDS = 3;
  logic [15:0] xv [ROUNDS*22], yv [ROUNDS*22];
  logic        cv [ROUNDS*22];
  logic [11:0] ret_addr [ROUNDS*22];
  logic [15:0] mx, mr, mx2, mr2;
  logic [3:0]  bflags [16];
  logic [11:0] bskip;

  initial begin
    foreach (mem[a]) mem[a] = 16'h0000;
    // stack pointer for flag captures
    e(mv(S_IMM, D_R, 0, 14)); e(16'(FLG));
    for (int t = 0; t < ROUNDS * 22; t++) begin
      logic [4:0] op;
      op = OPS[t % 22];
      xv[t] = 16'($urandom); yv[t] = 16'($urandom); cv[t] = 1'($urandom);
      if (t % 5 == 0) yv[t] = xv[t];                       // equal operands now and then
      if (t % 7 == 0) xv[t] = 16'h7FFF;                    // overflow corners
      e(mv(S_IMM, D_R, 0, 1)); e(xv[t]);                   // R1 = x
      e(mv(S_IMM, D_R, 0, 2)); e(yv[t]);                   // R2 = y
      e(ar(M_IJK, JRST, 0, 0)); e({cv[t], 3'b000, 12'(ap + 1)});   // C = cin
      e(ar(M_JKK, op, 2, 1));                              // OP R1, R2
      e(ar(M_IJK, PUSHJ, 14, 14)); e(16'(ap + 1));         // push {flags, PC}
      ret_addr[t] = 12'(ap);
      e(mv(S_R, D_AT_IMM, 0, 2)); e(16'(RES + t));         // store R2
    end
    // multiply: MUL #mx, R3 -> high in R3, low in R4
    mx = 16'($urandom); mr = 16'($urandom);
    e(mv(S_IMM, D_R, 0, 3)); e(mr);
    e(ar(M_IJK, MUL, 4, 3)); e(mx);
    e(mv(S_R, D_AT_IMM, 0, 3)); e(16'h0880);
    e(mv(S_R, D_AT_IMM, 0, 4)); e(16'h0881);
    // a second multiply with large operands, where the partial sums carry
    mx2 = 16'($urandom) | 16'hC000; mr2 = 16'($urandom) | 16'h8001;
    e(mv(S_IMM, D_R, 0, 3)); e(mr2);
    e(ar(M_IJK, MUL, 4, 3)); e(mx2);
    e(mv(S_R, D_AT_IMM, 0, 3)); e(16'h088E);
    e(mv(S_R, D_AT_IMM, 0, 4)); e(16'h088F);
    // MOVE sources and destinations through a pointer R5
    e(mv(S_IMM, D_R, 0, 5));      e(16'h0900);
    e(mv(S_IMM, D_AT_R, 0, 5));   e(16'hAAAA);             // @900 = AAAA
    e(mv(S_AT_R, D_R, 6, 5));                              // R6 = @R5
    e(mv(S_IMM, D_AT_RPP, 0, 5)); e(16'h1111);             // @900 = 1111, R5 = 901
    e(mv(S_IMM, D_AT_RPP, 0, 5)); e(16'h2222);             // @901 = 2222, R5 = 902
    e(mv(S_IMM, D_AT_RIDX, 0, 5)); e(16'h3333); e(16'h0002); // @904 = 3333
    e(mv(S_IMM, D_AT_MMR, 0, 5)); e(16'h4444);             // R5 = 901, @901 = 4444
    e(mv(S_AT_RPP, D_R, 7, 5));                            // R7 = @901, R5 = 902
    e(mv(S_AT_RIDX, D_R, 8, 5)); e(16'h0002);              // R8 = @904
    e(mv(S_AT_IMM, D_R, 0, 9)); e(16'h0900);               // R9 = @900
    e(mv(S_ZERO, D_R, 0, 10));                             // R10 = 0
    e(mv(S_IMM, D_R, 0, 10)); e(16'h0005);                 // R10 = 5 (pointer source test below)
    e(mv(S_R, D_AT_IMM, 0, 6));  e(16'h0882);
    e(mv(S_R, D_AT_IMM, 0, 7));  e(16'h0883);
    e(mv(S_R, D_AT_IMM, 0, 8));  e(16'h0884);
    e(mv(S_R, D_AT_IMM, 0, 9));  e(16'h0885);
    e(mv(S_R, D_AT_IMM, 0, 5));  e(16'h0886);
    e(mv(S_AT_IMM, D_AT_IMM, 0, 0)); e(16'h0901); e(16'h0887); // @887 = @901
    e(mv(S_R, D_NONE, 0, 10));                             // MOVE to nowhere
    // memory MODEs of arithmetic
    e(mv(S_IMM, D_R, 0, 5));  e(16'h0904);
    e(mv(S_IMM, D_R, 0, 11)); e(16'h0005);
    e(ar(M_AJKK, ADD, 11, 5));                             // R11 = @904 + R11 = 3338
    e(ar(M_AIJK, ADD, 12, 11)); e(16'h0900);               // R12 = @900 + R11 = 4449
    e(ar(M_AJKAJ, ADD, 11, 5));                            // @904 = @904 + R11 = 666B
    e(ar(M_AIJAI, ADD, 0, 12)); e(16'h0901);               // @901 = @901 + R12 = 888D
    e(mv(S_R, D_AT_IMM, 0, 11)); e(16'h0888);
    e(mv(S_R, D_AT_IMM, 0, 12)); e(16'h0889);
    // subroutine call and return
    e(mv(S_IMM, D_R, 0, 13)); e(16'h0A80);
    e(ar(M_IJK, PUSHJ, 13, 13)); e(16'(ap + 6));           // call sub (6 words ahead)
    e(mv(S_IMM, D_AT_IMM, 0, 0)); e(16'h0077); e(16'h088B);  // after return
    e(ar(M_IJK, JUMP, 0, 0)); e(16'(ap + 5));              // skip the subroutine
    // sub:
    e(mv(S_IMM, D_AT_IMM, 0, 0)); e(16'h5A5A); e(16'h088A);
    e(ar(M_JKK, POPJ, 13, 0));
    e(mv(S_R, D_AT_IMM, 0, 13)); e(16'h088C);              // R13 back to A80
    // POPJR restores flags: push a status word and pop it
    e(mv(S_IMM, D_R, 0, 13)); e(16'h0A90);
    e(mv(S_IMM, D_AT_MMR, 0, 13)); e(16'hA000 | 16'(ap + 2)); // @A8F = {C=1,N=1, next}
    e(ar(M_JKK, POPJR, 13, 0));
    e(ar(M_IJK, PUSHJ, 14, 14)); e(16'(ap + 1));           // capture flags
    // branches on each flag condition, taken and not taken
    for (int b = 0; b < 16; b++) begin
      bflags[b] = 4'($urandom);
      e(ar(M_IJK, JRST, 0, 0)); e({bflags[b], 12'(ap + 1)});
      e(ar(M_IJK, b[3] ? BRAF : BRAT, {1'b1, 3'(b)}, 0)); e(16'(ap + 4));
      e(mv(S_IMM, D_AT_IMM, 0, 0)); e(16'h0001); e(16'(16'h0C00 + b));
    end
    // port condition branch: output port 1 is empty, so BONR is not taken
    e(ar(M_IJK, BRAT, outp(1), 0)); e(16'(ap + 4));
    e(mv(S_IMM, D_AT_IMM, 0, 0)); e(16'h0001); e(16'h0C10);
    // port round trip through the loop-back of output port 2 into input port 2
    e(mv(S_IMM, D_PORT, outp(2), 0)); e(16'hBEEF);
    e(mv(S_PORT, D_R, inp(2, 1), 15));                     // R15 = P2+
    e(mv(S_R, D_AT_IMM, 0, 15)); e(16'h088D);
    // done
    e(mv(S_IMM, D_AT_IMM, 0, 0)); e(16'h0D0E); e(16'(DONE));
    e(ar(M_IJK, JUMP, 0, 0)); e(16'(ap - 1));

    repeat (3) @(posedge clk);
    rst = 0;
  end

  // ---- completion and checks -------------------------------------------------------
  initial begin
    wait (!rst);
    wait (mem_we && mem_addr == 12'(DONE));
    $display("done after %0d cycles, %0d instruction timings", cyc, timing_checked);
    @(posedge clk); @(posedge clk);
    for (int t = 0; t < ROUNDS * 22; t++) begin
      res_t r; logic [15:0] pushed;
      r = ref_op(OPS[t % 22], xv[t], yv[t], cv[t]);
      check($sformatf("op %h result", OPS[t % 22]), mem[RES + t], r.wr ? r.w : yv[t]);
      pushed = mem[FLG - 1 - t];
      check($sformatf("op %h flags x=%h y=%h c=%0d", OPS[t % 22], xv[t], yv[t], cv[t]),
            {pushed[15:12]}, {r.c, r.v, r.n, r.z});
      check("pushed PC", {4'h0, pushed[11:0]}, {4'h0, ret_addr[t]});
    end
    begin
      logic [31:0] p;
      p = mx * mr;
      check("MUL high", mem['h880], p[31:16]);
      check("MUL low",  mem['h881], p[15:0]);
      p = mx2 * mr2;
      check("MUL 2 high", mem['h88E], p[31:16]);
      check("MUL 2 low",  mem['h88F], p[15:0]);
    end
    check("MOVE @R",        mem['h882], 16'hAAAA);
    check("MOVE @R++ src",  mem['h883], 16'h4444);
    check("MOVE @(R+#) src",mem['h884], 16'h3333);
    check("MOVE @# src",    mem['h885], 16'h1111);
    check("pointer R5",     mem['h886], 16'h0902);
    check("MOVE @# to @#",  mem['h887], 16'h4444);
    check("@900",           mem['h900], 16'h1111);
    check("mode 4",         mem['h888], 16'h3338);
    check("mode 5",         mem['h889], 16'h4449);
    check("mode 6",         mem['h904], 16'h666B);
    check("mode 7",         mem['h901], 16'h888D);
    check("subroutine",     mem['h88A], 16'h5A5A);
    check("return",         mem['h88B], 16'h0077);
    check("stack restored", mem['h88C], 16'h0A80);
    check("POPJR flags",    {12'h0, mem[FLG - 1 - ROUNDS * 22][15:12]}, 16'h000A);
    for (int b = 0; b < 16; b++) begin
      logic c, v, n, z, cond, taken;
      {c, v, n, z} = bflags[b];
      case (b % 8)
        0: cond = v;
        1: cond = n;
        2: cond = !c;
        3: cond = n ^ v;
        4: cond = z;
        5: cond = z | n;
        6: cond = z | !c;
        default: cond = z | (n ^ v);
      endcase
      taken = (b >= 8) ? !cond : cond;
      check($sformatf("branch %0d", b), mem['hC00 + b], taken ? 16'h0000 : 16'h0001);
    end
    check("BONR not taken", mem['hC10], 16'h0001);
    check("port loop-back", mem['h88D], 16'hBEEF);
    if (timing_checked < 100) begin
      failures++;
      $display("FAIL only %0d instruction timings checked", timing_checked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
