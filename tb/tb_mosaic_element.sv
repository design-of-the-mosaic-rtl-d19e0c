// tb_mosaic_element: end-to-end test of one Mosaic element (processor, ports
// and the default eight banks of on-chip memory) at its default parameters.
//
// Each output port is wired back to the input port of the same number through
// a modelled pull-up wire (the wire is high unless either end clamps it). The
// program is placed in the memory banks before reset is released; the
// element then runs it from address 0 on its own. What the test drives and
// observes from outside is only: reset, the interrupt pin and the port wires;
// memory traffic is watched on the element's internal memory bus to keep a
// shadow copy of the memory, and every word the memory returns is compared
// with that copy.
//
// The program:
//   boot     counts boots in memory word BOOT, so a restart is visible;
//   ports    sends two words back to back through output port 0 (the second
//            MOVE must wait while the first is still being shifted out) and
//            reads them from input port 0 (the second read waits for the
//            word to arrive), then one word round trip through ports 1-3;
//   multiply MUL with random operands (X large enough for the partial
//            sums to carry), result checked against X*Y;
//   branch   a taken BRAT over a store of an error marker;
//   idle     an endless loop that counts in R13 and stores the count.
// While the program idles the test pulses the interrupt pin for one cycle:
// the handler (vector read from address -2) counts interrupts in memory and
// returns with JRST through the status word saved at -1. Then the pin is held
// high for 40 cycles: a soft reset, which saves the status word at -3 and
// restarts the program at 0, so the whole program runs a second time.
//
// Mechanisms counted (a failure for any that never happens): port transfers,
// output-port waits, input-port waits, refetches, interrupts, soft resets,
// multiplies, taken branches, refresh cycles, write-back suppressions in the
// memory. The gap between refresh cycles (RA issued as address) is measured
// and checked against the promised maximum of 8 cycles; the interrupt and
// reset sequences, which issue no refresh address, are left out of it.
module tb_mosaic_element;
  import mosaic_pkg::*;
  import mosaic_asm_pkg::*;

  logic clk = 0, rst = 1, int_pin = 0;
  logic [3:0] in_link, in_clamp, out_link, out_clamp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mosaic_element dut (
    .clk, .rst, .int_pin, .in_link, .in_clamp, .out_link, .out_clamp
  );

  // output port n looped back to input port n over a pulled-up wire
  assign in_link  = ~in_clamp & ~out_clamp;
  assign out_link = in_link;

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---- program image and loader ------------------------------------------------
  localparam int MEMW = 2048;                   // 8 banks of 256 words
  logic [15:0] img [MEMW];
  logic [15:0] shadow [MEMW];
  bit img_ready = 0;
  int ap = 0;
  task automatic e(input logic [15:0] w); img[ap] = w; ap++; endtask

  for (genvar b = 0; b < 8; b++) begin : g_load
    initial begin
      wait (img_ready);
      for (int r = 0; r < 64; r++)
        dut.u_mem.g_bank[b].u_bank.cells[r] = {img[b*256 + r*4 + 3], img[b*256 + r*4 + 2],
                                               img[b*256 + r*4 + 1], img[b*256 + r*4]};
    end
  end

  localparam logic [15:0] BOOT = 16'h0600, NINT = 16'h0601, IDLE = 16'h0602,
                          RES = 16'h0610, DONE = 16'h06F0, BAD = 16'h06F4;
  logic [15:0] pv [8];
  logic [15:0] mx, my;
  logic [11:0] loop_lo, loop_hi, handler;

  initial begin
    foreach (img[a]) img[a] = 16'h0000;
    for (int k = 0; k < 8; k++) pv[k] = 16'($urandom);
    mx = 16'($urandom) | 16'h8000; my = 16'($urandom);
    // boot: BOOT = BOOT + 1
    e(mv(S_AT_IMM, D_R, 0, 1)); e(BOOT);
    e(ar(M_JKK, INC, 1, 1));
    e(mv(S_R, D_AT_IMM, 0, 1)); e(BOOT);
    // two words back to back through port 0, then read both
    e(mv(S_IMM, D_PORT, outp(0), 0)); e(pv[0]);
    e(mv(S_IMM, D_PORT, outp(0), 0)); e(pv[1]);
    e(mv(S_PORT, D_R, inp(0, 1), 2));
    e(mv(S_PORT, D_R, inp(0, 1), 3));
    e(mv(S_R, D_AT_IMM, 0, 2)); e(RES + 0);
    e(mv(S_R, D_AT_IMM, 0, 3)); e(RES + 1);
    // one round trip through each of ports 1 to 3
    for (int p = 1; p < 4; p++) begin
      e(mv(S_IMM, D_PORT, outp(p), 0)); e(pv[p + 1]);
      e(mv(S_PORT, D_R, inp(p, 1), 4));
      e(mv(S_R, D_AT_IMM, 0, 4)); e(RES + 16'(p + 1));
    end
    // multiply: R5 = my; MUL #mx, R5 -> high in R5, low in R6
    e(mv(S_IMM, D_R, 0, 5)); e(my);
    e(ar(M_IJK, MUL, 6, 5)); e(mx);
    e(mv(S_R, D_AT_IMM, 0, 5)); e(RES + 8);
    e(mv(S_R, D_AT_IMM, 0, 6)); e(RES + 9);
    // taken branch: Z is set by comparing equal values
    e(ar(M_JKK, CMP, 5, 5));
    e(ar(M_IJK, BRAT, C_Z, 0)); e(16'(ap + 4));
    e(mv(S_IMM, D_AT_IMM, 0, 0)); e(16'h0BAD); e(BAD);
    // done: DONE = boot count
    e(mv(S_AT_IMM, D_R, 0, 7)); e(BOOT);
    e(mv(S_R, D_AT_IMM, 0, 7)); e(DONE);
    // idle loop
    loop_lo = 12'(ap);
    e(ar(M_JKK, INC, 13, 13));
    e(mv(S_R, D_AT_IMM, 0, 13)); e(IDLE);
    e(ar(M_IJK, JUMP, 0, 0)); e(16'(loop_lo));
    loop_hi = 12'(ap - 1);
    // interrupt handler: NINT = NINT + 1, then return through the word at -1
    handler = 12'(ap);
    e(mv(S_AT_IMM, D_R, 0, 12)); e(NINT);
    e(ar(M_JKK, INC, 12, 12));
    e(mv(S_R, D_AT_IMM, 0, 12)); e(NINT);
    e(ar(M_AIJK, JRST, 0, 0)); e(16'h0FFF);
    img[11'h7FE] = 16'(handler);                   // interrupt vector at -2
    shadow = img;
    repeat (2) @(posedge clk);                      // row buffers settle in reset
    img_ready = 1;
    repeat (2) @(posedge clk);
    rst = 0;
  end

  // ---- memory traffic: shadow copy and read check ------------------------------------
  // A read of the row written in the cycle before returns the row as it was
  // before that write (the write is still on its way into the cells); such a
  // read is counted as stale. Its other words are unchanged and are compared;
  // the word just written is not.
  logic [10:0] raddr_q, waddr_q, waddr_q2;
  logic        rvalid_q, we_q = 1'b0, we_q2 = 1'b0;
  int          mem_reads = 0, mem_errs = 0, n_stale = 0;
  always_ff @(posedge clk) begin
    rvalid_q <= !rst;
    raddr_q  <= dut.mem_addr[10:0];
    we_q     <= dut.mem_we;
    waddr_q  <= dut.mem_addr[10:0];
    we_q2    <= we_q;
    waddr_q2 <= waddr_q;
    if (rvalid_q && we_q2 && waddr_q2[10:2] == raddr_q[10:2] && !we_q)
      n_stale <= n_stale + 1;
    if (rvalid_q && !(we_q2 && waddr_q2 == raddr_q && !we_q)) begin
      mem_reads <= mem_reads + 1;
      if (dut.mem_rdata !== shadow[raddr_q]) begin
        mem_errs <= mem_errs + 1;
        if (mem_errs < 5)
          $display("FAIL memory read at %h: got %h expected %h", raddr_q, dut.mem_rdata, shadow[raddr_q]);
      end
    end
    if (dut.mem_we) shadow[dut.mem_addr[10:0]] <= dut.mem_wdata;
  end

  // ---- mechanism counters ---------------------------------------------------------------
  int n_xfer = 0, n_outwait = 0, n_inwait = 0, n_refetch = 0, n_int = 0, n_soft = 0;
  int n_mul = 0, n_taken = 0, n_refresh = 0, n_suppress = 0, gap = 0, max_gap = 0;
  logic [3:0] in_clamp_q = '0;
  ctl_t       c;
  logic [15:0] iw;
  assign c  = dut.u_proc.ctl;
  assign iw = dut.u_proc.i_reg;
  logic [7:0] bank_supp;
  for (genvar b = 0; b < 8; b++) begin : g_bs
    assign bank_supp[b] = dut.u_mem.g_bank[b].u_bank.we_last && dut.u_mem.g_bank[b].u_bank.sel;
  end

  always_ff @(posedge clk) begin
    in_clamp_q <= in_clamp;
    if (!rst) begin
      n_xfer     <= n_xfer + $countones(in_clamp & ~in_clamp_q);
      n_suppress <= n_suppress + $countones(bank_supp);
      if (c.fb == FB_REFETCH) begin
        n_refetch <= n_refetch + 1;
        if (iw[15:14] == 2'b00 && iw[10:8] == D_PORT) n_outwait <= n_outwait + 1;
        if (iw[15:14] == 2'b00 && iw[13:11] == S_PORT) n_inwait <= n_inwait + 1;
      end
      if (c.fb == FB_INTERRUPT2) n_int <= n_int + 1;
      if (c.fb == FB_RESET2) n_soft <= n_soft + 1;
      if (c.mshift && iw[12:8] == MUL && iw[15:14] != 2'b00) n_mul <= n_mul + 1;
      if (c.src_w && c.to_a && c.a_pc && iw[15:14] != 2'b00 && iw[12:9] == 4'b1110) n_taken <= n_taken + 1;
      if (c.a_ra || c.fb inside {FB_INTERRUPT2, FB_INTERRUPT3, FB_INTERRUPT4, FB_INTERRUPT5,
                                 FB_INTERRUPT6, FB_RESET2, FB_RESET3, FB_RESET4}) begin
        if (c.a_ra) n_refresh <= n_refresh + 1;
        gap <= 0;
      end else begin
        gap <= gap + 1;
        if (gap + 1 > max_gap) max_gap <= gap + 1;
      end
    end
  end

  // ---- the run -------------------------------------------------------------------------
  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  task automatic check_run(input int boot);
    logic [31:0] p;
    check($sformatf("boot %0d: boot count", boot), shadow[BOOT[10:0]], 16'(boot));
    check($sformatf("boot %0d: port 0 first word", boot), shadow[11'(RES + 0)], pv[0]);
    check($sformatf("boot %0d: port 0 second word", boot), shadow[11'(RES + 1)], pv[1]);
    for (int p = 1; p < 4; p++)
      check($sformatf("boot %0d: port %0d word", boot, p), shadow[11'(RES + 16'(p + 1))], pv[p + 1]);
    p = mx * my;
    check($sformatf("boot %0d: MUL high", boot), shadow[11'(RES + 8)], p[31:16]);
    check($sformatf("boot %0d: MUL low", boot), shadow[11'(RES + 9)], p[15:0]);
    check($sformatf("boot %0d: branch taken", boot), shadow[BAD[10:0]], 16'h0000);
  endtask

  task automatic wait_store(input logic [15:0] addr, input logic [15:0] val, input int limit);
    int n = 0;
    while (!(dut.mem_we && dut.mem_addr[10:0] == addr[10:0] && dut.mem_wdata == val) && n < limit) begin
      @(posedge clk); n++;
    end
    checks++;
    if (n >= limit) begin
      failures++;
      $display("FAIL no store of %h at %h within %0d cycles", val, addr, limit);
    end
    @(posedge clk);
  endtask

  initial begin
    logic [15:0] idle0, saved;
    wait (!rst);
    wait_store(DONE, 16'h0001, 3000);
    $display("first run done at cycle %0d", cyc);
    check_run(1);
    // let the idle loop run, then interrupt it
    repeat (50) @(posedge clk);
    idle0 = shadow[IDLE[10:0]];
    int_pin = 1; @(posedge clk); int_pin = 0;
    wait_store(NINT, 16'h0001, 200);
    saved = shadow[11'h7FF];
    check("interrupt: saved PC inside the idle loop",
          16'(saved[11:0] >= loop_lo && saved[11:0] <= loop_hi), 16'h0001);
    repeat (60) @(posedge clk);
    check("idle loop resumes after the interrupt", 16'(shadow[IDLE[10:0]] > idle0 + 2), 16'h0001);
    // soft reset: hold the pin
    int_pin = 1; repeat (40) @(posedge clk); int_pin = 0;
    wait_store(DONE, 16'h0002, 3000);
    $display("second run done at cycle %0d", cyc);
    check_run(2);
    saved = shadow[11'h7FD];
    check("soft reset: saved PC inside the idle loop",
          16'(saved[11:0] >= loop_lo && saved[11:0] <= loop_hi), 16'h0001);
    check("interrupt count unchanged by soft reset", shadow[NINT[10:0]], 16'h0001);
    checks++;
    if (mem_errs != 0) begin
      failures++;
      $display("FAIL %0d of %0d memory reads differ from the shadow copy", mem_errs, mem_reads);
    end
    checks++;
    if (max_gap > 8) begin
      failures++;
      $display("FAIL refresh gap of %0d cycles", max_gap);
    end
    $display("port transfers %0d, output waits %0d, input waits %0d, refetches %0d",
             n_xfer, n_outwait, n_inwait, n_refetch);
    $display("interrupts %0d, soft resets %0d, multiply steps %0d, taken branches %0d",
             n_int, n_soft, n_mul, n_taken);
    $display("refresh cycles %0d (largest gap %0d), write-back suppressions %0d, memory reads %0d, stale reads %0d",
             n_refresh, max_gap, n_suppress, mem_reads, n_stale);
    begin
      int cnt [10];
      string nm [10];
      cnt = '{n_xfer, n_outwait, n_inwait, n_refetch, n_int, n_soft, n_mul, n_taken, n_refresh, n_suppress};
      nm  = '{"port transfer", "output wait", "input wait", "refetch", "interrupt", "soft reset",
              "multiply", "taken branch", "refresh", "write-back suppression"};
      for (int k = 0; k < 10; k++) begin
        checks++;
        if (cnt[k] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", nm[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
