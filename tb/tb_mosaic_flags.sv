// tb_mosaic_flags: self-checking test of the C, V, N, Z flag register.
//
// Random control lines and data are applied each cycle and the flags are
// compared, after the clock edge, with a model written from the flag rules:
// reset clears all four; =>F loads them from bus bits 15:12; otherwise C
// takes the ALU carry when set_c, else the bit shifted out by a 1-bit right
// shift, and Z, N, V follow the ALU/shifter output when set_znv.
module tb_mosaic_flags;
  logic clk = 0, rst = 1;
  logic set_c = 0, set_znv = 0, shift1 = 0, load_f = 0, cout = 0, ovf = 0, shift_out = 0;
  logic [3:0] bus_f = 0;
  logic [15:0] w = 0;
  logic c, v, n, z;
  logic [3:0] m;     // model {C,V,N,Z}
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mosaic_flags dut (.clk, .rst, .set_c, .set_znv, .shift1, .load_f, .bus_f, .w, .cout, .ovf,
                    .shift_out, .c, .v, .n, .z);

  initial begin
    @(negedge clk); @(negedge clk);
    m = 4'h0;
    repeat (1000) begin
      rst = ($urandom % 50) == 0;
      set_c = 1'($urandom); set_znv = 1'($urandom); shift1 = 1'($urandom);
      load_f = ($urandom % 6) == 0;
      bus_f = 4'($urandom); w = ($urandom % 5 == 0) ? 16'h0 : 16'($urandom);
      cout = 1'($urandom); ovf = 1'($urandom); shift_out = 1'($urandom);
      if (rst) m = 4'h0;
      else if (load_f) m = bus_f;
      else begin
        if (set_c) m[3] = cout;
        else if (shift1) m[3] = shift_out;
        if (set_znv) m[2:0] = {ovf, w[15], w == 16'h0};
      end
      @(negedge clk);
      checks++;
      if ({c, v, n, z} !== m) begin
        failures++;
        $display("FAIL flags %b expected %b", {c, v, n, z}, m);
      end
    end
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
