// tb_mosaic_regfile: self-checking test of the 16-word general register file.
//
// Random writes through the K or J field and random reads through either
// field are compared with a plain array kept by the test. Reads are
// combinational (same cycle), writes take effect at the clock edge. All
// registers are written once first, as the file has no reset.
module tb_mosaic_regfile;
  logic clk = 0, use_j = 0, we = 0;
  logic [3:0] j = 0, k = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mosaic_regfile dut (.clk, .use_j, .j, .k, .we, .wdata, .rdata);

  initial begin
    for (int r = 0; r < 16; r++) begin
      @(negedge clk); use_j = r[0]; j = 4'(r); k = 4'(r); we = 1; wdata = 16'($urandom);
      model[r] = wdata;
    end
    @(negedge clk); we = 0;
    repeat (400) begin
      @(negedge clk);
      use_j = 1'($urandom); j = 4'($urandom); k = 4'($urandom);
      we = 1'($urandom); wdata = 16'($urandom);
      #1;
      checks++;
      if (rdata !== model[use_j ? j : k]) begin
        failures++;
        $display("FAIL read %s=%0d got %h expected %h", use_j ? "J" : "K", use_j ? j : k, rdata, model[use_j ? j : k]);
      end
      if (we) model[use_j ? j : k] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
