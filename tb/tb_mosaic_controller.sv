// tb_mosaic_controller: self-checking test of the microcode controller on its
// own, with the instruction stream, flag condition, port condition and the
// multiplier's Mout/SRout bits driven by the test.
//
// The instruction register is modelled here: it takes the next word of a
// test list whenever the controller raises IN->I. For each instruction the
// number of cycles from one IN->I to the next is compared with the timing
// table (3 + time of MODE or MSOURCE + time of OP or MDEST; a taken branch
// one more, MUL 18 for the OP). The step counter SR is modelled from the
// controller's SRin line so that MUL ends after 16 steps. Also checked: the
// hard-reset word, that a port MOVE with the port not ready refetches
// instead of finishing, that MOVE to memory raises the write line exactly
// once, that a one-cycle interrupt pulse runs the interrupt sequence (one
// write at the status save, the new PC taken from the memory data input)
// and that a long pulse gives the soft-reset sequence.
module tb_mosaic_controller;
  import mosaic_pkg::*;
  import mosaic_asm_pkg::*;

  logic clk = 0, rst = 1, int_pin = 0, fcond = 0, portc = 0, mout = 0, srout;
  logic [15:0] i, i_q = 16'h0, nxt_word;
  logic [15:0] sr = 16'h0;
  ctl_t ctl;
  logic int_ff;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mosaic_controller dut (.clk, .rst, .int_pin, .i, .fcond, .portc, .mout, .srout, .ctl, .int_ff);

  assign i     = ctl.in_i ? nxt_word : i_q;
  assign srout = sr[0];
  always_ff @(posedge clk) begin
    i_q <= i;
    sr  <= {ctl.srin, sr[15:1]};
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // run one instruction: wait for IN->I with nxt_word, then count cycles to
  // the following IN->I; count writes and refetches meanwhile
  int cycles, writes, refetches, ints, softs, vec_reads;
  task automatic run(input logic [15:0] w);
    nxt_word = w;
    writes = 0; refetches = 0; ints = 0; softs = 0; vec_reads = 0;
    cycles = 0;
    while (!ctl.in_i && cycles < 200) begin       // an interrupt may come first
      count();
      @(negedge clk);
      cycles++;
    end
    @(negedge clk);
    nxt_word = ar(M_JKK, ADD, 1, 2);             // filler for the next decode
    cycles = 1;
    while (!ctl.in_i && cycles < 200) begin
      count();
      @(negedge clk);
      cycles++;
    end
  endtask
  task automatic count();
      if (ctl.write) writes++;
      if (ctl.fb == FB_REFETCH) refetches++;
      if (ctl.fb == FB_INTERRUPT2) ints++;
      if (ctl.fb == FB_RESET2) softs++;
      if (ctl.src_in && ctl.to_a && ctl.a_pc) vec_reads++;
  endtask

  initial begin
    nxt_word = 16'h0;
    @(negedge clk);
    check("hard reset word", ctl.to_x && ctl.to_y && ctl.int_clr && ctl.a_ra && ctl.fb == FB_RESET4);
    @(negedge clk); rst = 0;
    // MOVE timing: 3 + Time(MSOURCE) + Time(MDEST)
    begin
      int tsrc[8] = '{0, 2, 2, 3, 0, 2, 1, 0};
      int tdst[8] = '{0, 2, 2, 4, 3, 3, 0, 0};
      for (int s = 0; s < 8; s++)
        for (int d = 0; d < 8; d++) begin
          if (s == 6 || d == 6) continue;
          run(mv(3'(s), 3'(d), 4'h1, 4'h2));
          check($sformatf("MOVE src %0d dst %0d: %0d cycles, expected %0d", s, d, cycles, 3 + tsrc[s] + tdst[d]),
                cycles == 3 + tsrc[s] + tdst[d]);
          check($sformatf("MOVE src %0d dst %0d writes %0d", s, d, writes),
                writes == ((d >= 1 && d <= 5) ? 1 : 0));
        end
    end
    // arithmetic timing: 3 + Time(MODE) for the plain OPs
    begin
      int tmode[8] = '{0, 0, 0, 0, 2, 2, 4, 4};
      for (int m = 2; m < 8; m++)
        for (int op = 0; op <= 5'h15; op++) begin
          int tm;
          tm = (op > 5'h13 && m >= 6) ? 2 : tmode[m];   // CMP, BITT store nothing
          run(ar(3'(m), 5'(op), 4'h1, 4'h2));
          check($sformatf("mode %0d op %h: %0d cycles, expected %0d", m, op, cycles, 3 + tm),
                cycles == 3 + tm);
          check($sformatf("mode %0d op %h writes", m, op), writes == ((m >= 6 && op <= 5'h13) ? 1 : 0));
        end
      // MUL
      for (int m = 2; m < 4; m++) begin
        mout = 1'($urandom);
        run(ar(3'(m), MUL, 4'h1, 4'h2));
        check($sformatf("MUL mode %0d: %0d cycles", m, cycles), cycles == 21);
      end
      // branches on the flag condition: one more cycle when taken
      for (int t = 0; t < 4; t++) begin
        fcond = t[0];
        run(ar(M_IJK, t[1] ? BRAF : BRAT, C_Z, 4'h0));
        check($sformatf("branch %0d: %0d cycles", t, cycles), cycles == ((t[0] ^ t[1]) ? 4 : 3));
      end
    end
    // port MOVE: not ready refetches, ready completes in 3 (+1 for Pt source)
    portc = 1;
    run(mv(S_PORT, D_R, inp(1, 1), 4'h3));
    check("input port not ready: refetch", refetches == 1);
    portc = 0;
    run(mv(S_PORT, D_R, inp(1, 1), 4'h3));
    check($sformatf("input port ready: %0d cycles", cycles), refetches == 0 && cycles == 4);
    run(mv(S_IMM, D_PORT, outp(2), 4'h0));
    check($sformatf("output port ready: %0d cycles", cycles), refetches == 0 && cycles == 3);
    // interrupt: one-cycle pulse
    @(negedge clk); int_pin = 1; @(negedge clk); int_pin = 0;
    run(ar(M_JKK, ADD, 1, 2));                    // the decode after the pulse is taken over
    check($sformatf("interrupt sequence: ints %0d writes %0d vector %0d", ints, writes, vec_reads),
          ints == 1 && writes == 1 && vec_reads == 1 && softs == 0);
    // soft reset: long pulse
    @(negedge clk); int_pin = 1;
    writes = 0; softs = 0;
    repeat (40) begin count(); @(negedge clk); end
    int_pin = 0;
    begin
      int s0, w0;
      s0 = softs; w0 = writes;
      run(ar(M_JKK, ADD, 1, 2));
      check($sformatf("soft reset sequence: softs %0d writes %0d", s0 + softs, w0 + writes),
            s0 + softs == 1 && w0 + writes == 1);
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
