// tb_mosaic_inport: self-checking test of one input port fed by a
// behavioural sender on a modelled pull-up wire.
//
// The sender, when it has a word and the wire is high (the port not full),
// drives one start cycle and then the 16 bits MSB first by clamping for 0
// and releasing for 1. The port must become full 17 cycles after the start
// bit, present the word, hold the wire low (clamp) while full whatever the
// sender does, and empty again on advance.
module tb_mosaic_inport;
  logic clk = 0, rst = 1, advance = 0, link, full, clamp;
  logic [15:0] data;
  logic tx_clamp = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign link = !clamp && !tx_clamp;

  mosaic_inport dut (.clk, .rst, .advance, .link, .data, .full, .clamp);

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    repeat (5) @(negedge clk);
    check("empty and idle", !full && !clamp);
    repeat (40) begin
      logic [15:0] wv;
      int t;
      wv = 16'($urandom);
      tx_clamp = 0;                          // start bit
      @(negedge clk);
      for (int b = 15; b >= 0; b--) begin
        check("not full during the word", !full);
        tx_clamp = !wv[b];
        @(negedge clk);
      end
      tx_clamp = 1'($urandom);
      check("full after 17 cycles", full && clamp && !link);
      check($sformatf("word %h received as %h", wv, data), data == wv);
      t = $urandom % 5;
      repeat (t) begin
        tx_clamp = 1'($urandom);
        @(negedge clk);
        check("holds while full", full && data == wv);
      end
      tx_clamp = 1;
      advance = 1; @(negedge clk); advance = 0;
      check("empty after advance", !full && !clamp);
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
