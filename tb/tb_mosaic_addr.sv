// tb_mosaic_addr: self-checking test of the address section (A, PC, RA and
// the incrementer).
//
// Exercises the microcode's address macros - PC++->A (PC+1 to A and PC),
// PC->A through the incrementer with no carry in, RA++->A (refresh address
// step), bus->A with A->PC (jump) - plus random mixtures of the lines, and
// compares A, PC and RA after each clock edge with a model. RA has no reset,
// so it is loaded from the bus first.
module tb_mosaic_addr;
  logic clk = 0, rst = 1;
  logic pc_inc = 0, ra_inc = 0, add1 = 0, inc_a = 0, a_pc = 0, a_ra = 0, bus_a = 0;
  logic [11:0] bus = 0, a, pc, ra;
  logic [11:0] ma, mpc, mra;
  int checks = 0, failures = 0, pcpp = 0;

  always #5 clk = ~clk;

  mosaic_addr dut (.clk, .rst, .pc_inc, .ra_inc, .add1, .inc_a, .a_pc, .a_ra, .bus_a, .bus, .a, .pc, .ra);

  initial begin
    @(negedge clk); rst = 0;
    ma = 0; mpc = 0;
    bus_a = 1; a_ra = 1; bus = 12'h123; @(negedge clk); bus_a = 0; a_ra = 0;
    ma = 12'h123; mra = 12'h123;
    repeat (1000) begin
      logic [11:0] inc, nxt;
      int kind;
      kind = $urandom % 5;
      {pc_inc, ra_inc, add1, inc_a, a_pc, a_ra, bus_a} = '0;
      bus = 12'($urandom);
      case (kind)
        0: {pc_inc, add1, inc_a, a_pc} = '1;      // PC++->A
        1: {pc_inc, inc_a, a_pc} = '1;            // PC->A
        2: {ra_inc, add1, inc_a, a_ra} = '1;      // RA++->A
        3: {bus_a, a_pc} = '1;                    // jump
        default: {pc_inc, ra_inc, add1, inc_a, a_pc, a_ra, bus_a} = 7'($urandom);
      endcase
      if (kind == 0) pcpp++;
      inc = (pc_inc ? mpc : 12'h0) | (ra_inc ? mra : 12'h0);
      inc = inc + 12'(add1);
      nxt = bus_a ? bus : inc_a ? inc : ma;
      ma = nxt;
      if (a_pc) mpc = nxt;
      if (a_ra) mra = nxt;
      @(negedge clk);
      checks++;
      if (a !== ma || pc !== mpc || ra !== mra) begin
        failures++;
        $display("FAIL kind %0d: A=%h PC=%h RA=%h expected %h %h %h", kind, a, pc, ra, ma, mpc, mra);
      end
    end
    if (pcpp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
