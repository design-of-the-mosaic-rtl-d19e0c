// tb_mosaic_outport: self-checking test of one output port against a
// behavioural receiver on a modelled pull-up wire.
//
// The wire is high unless the port or the receiver clamps it. The receiver
// clamps while it is busy (full) and otherwise samples the wire each cycle:
// the first high cycle is the start bit, the next 16 cycles carry the word
// MSB first. The test loads random words, checks that the port reports
// empty only once the word has been shifted out, that the word arrives
// intact, that the transfer takes 1 + 16 cycles from the start bit, and that
// the port holds its word while the receiver stays busy.
module tb_mosaic_outport;
  logic clk = 0, rst = 1, load = 0, clamp, empty;
  logic [15:0] data = 0;
  logic rx_clamp = 1, link;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign link = !clamp && !rx_clamp;

  mosaic_outport dut (.clk, .rst, .load, .data, .link, .clamp, .empty);

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    @(negedge clk); rst = 0; @(negedge clk);
    check("empty after reset", empty && clamp);
    repeat (40) begin
      logic [15:0] got;
      int busy, t;
      busy = $urandom % 6;
      data = 16'($urandom);
      load = 1; @(negedge clk); load = 0;
      check("not empty after load", !empty);
      rx_clamp = 1;
      repeat (busy) begin
        @(negedge clk);
        check("holds while receiver is busy", !empty && link == 0);
      end
      rx_clamp = 0;
      #1;
      t = 0;
      while (!link && t < 5) begin @(negedge clk); t++; end
      check("start bit", link);
      @(negedge clk);                        // start bit cycle over
      for (int b = 15; b >= 0; b--) begin
        got[b] = link;
        if (b != 0) check("not empty while sending", !empty);
        @(negedge clk);
      end
      rx_clamp = 1;                          // receiver now full
      check($sformatf("word %h received as %h", data, got), got == data);
      check("empty after the 16th bit", empty);
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
