// tb_mosaic_mulregs: self-checking test of the multiplier register M and the
// step-counter shift register SR.
//
// First random control is compared with a model cycle by cycle (M loads
// from the bus or shifts right taking Y<-1> into bit 15; SR shifts right
// every cycle taking srin). Then the multiply sequence is run around the
// block with a behavioural Y register and adder: a 1 injected into SR marks
// the 16 steps, each step adds X to Y when Mout is 1 and shifts Y right into
// M. The product high half ends in Y and the low half in M, compared with
// X*M0; the step count (16, the last one taken as SRout is seen) is
// checked too.
module tb_mosaic_mulregs;
  logic clk = 0, rst = 1, load_m = 0, mshift = 0, y_m1 = 0, srin = 0;
  logic [15:0] bus = 0, m;
  logic mout, srout;
  logic [15:0] mm, msr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mosaic_mulregs dut (.clk, .rst, .load_m, .mshift, .y_m1, .bus, .srin, .m, .mout, .srout);

  initial begin
    @(negedge clk); rst = 0; mm = 0; msr = 0;
    repeat (500) begin
      load_m = 1'($urandom); mshift = 1'($urandom); y_m1 = 1'($urandom);
      srin = ($urandom % 8) == 0; bus = 16'($urandom);
      if (load_m) mm = bus; else if (mshift) mm = {y_m1, mm[15:1]};
      msr = {srin, msr[15:1]};
      @(negedge clk);
      checks++;
      if (m !== mm || mout !== mm[0] || srout !== msr[0]) begin
        failures++;
        $display("FAIL M=%h SRout=%0d expected %h %0d", m, srout, mm, msr[0]);
      end
    end
    // multiply sequence
    {load_m, mshift, srin} = '0;
    repeat (20) @(negedge clk);      // SR empties
    repeat (30) begin
      logic [15:0] xv, mv, yv;
      logic [16:0] s;
      logic [31:0] prod;
      int steps;
      xv = 16'($urandom); mv = 16'($urandom);
      load_m = 1; bus = mv; @(negedge clk); load_m = 0;
      yv = 0; srin = 1; mshift = 0;
      @(negedge clk); srin = 0;
      steps = 0;
      begin
        logic last;
        do begin
          last = srout;
          s = {1'b0, yv} + (mout ? {1'b0, xv} : 17'h0);
          mshift = 1; y_m1 = s[0];
          yv = s[16:1];
          @(negedge clk);
          mshift = 0;
          steps++;
        end while (!last && steps < 40);
      end
      prod = xv * mv;
      checks++;
      if ({yv, m} !== prod || steps != 16) begin
        failures++;
        $display("FAIL %h*%h = %h%h expected %h (steps %0d)", xv, mv, yv, m, prod, steps);
      end
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
