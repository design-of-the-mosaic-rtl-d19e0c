// tb_mosaic_flag_cond: exhaustive test of the flag condition decoder.
//
// All 8 conditions against all 16 flag combinations are compared with the
// condition table: V, N, not C, N xor V (less than), Z, Z or N, Z or not C
// (lower or same), Z or (N xor V) (less or equal). Combinational.
module tb_mosaic_flag_cond;
  logic [2:0] cond;
  logic c, v, n, z, fcond;
  int checks = 0, failures = 0;

  mosaic_flag_cond dut (.cond, .c, .v, .n, .z, .fcond);

  initial begin
    for (int t = 0; t < 128; t++) begin
      logic e;
      cond = 3'(t >> 4);
      {c, v, n, z} = 4'(t);
      case (cond)
        3'd0: e = v;
        3'd1: e = n;
        3'd2: e = !c;
        3'd3: e = n ^ v;
        3'd4: e = z;
        3'd5: e = z | n;
        3'd6: e = z | !c;
        default: e = z | (n ^ v);
      endcase
      #1;
      checks++;
      if (fcond !== e) begin
        failures++;
        $display("FAIL cond %0d cvnz=%b: %0d expected %0d", cond, {c, v, n, z}, fcond, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
