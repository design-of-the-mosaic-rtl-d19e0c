// tb_mosaic_ports: self-checking test of the four input and four output
// ports with their selection by the instruction's port field.
//
// Each output port is wired to the input port of the same number through a
// modelled pull-up wire. Random words are loaded into random output ports
// (field I<6:4> = {direction 0, port}); the port condition must show the
// output port busy until its word has left, and the matching input port
// (field {direction 1, port}) ready once the word has arrived, 17 cycles
// after the start bit. The word read through Pt=> is compared, and advance
// must empty only the selected input port.
module tb_mosaic_ports;
  logic clk = 0, rst = 1, load = 0, advance = 0, portc;
  logic [2:0] sel = 0;
  logic [15:0] bus = 0, pt_data;
  logic [3:0] in_link, in_clamp, out_link, out_clamp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign in_link  = ~in_clamp & ~out_clamp;
  assign out_link = in_link;

  mosaic_ports dut (.clk, .rst, .sel, .load, .advance, .bus, .pt_data, .portc,
                    .in_link, .in_clamp, .out_link, .out_clamp);

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    @(negedge clk); rst = 0; @(negedge clk);
    for (int p = 0; p < 4; p++) begin
      sel = {1'b0, 2'(p)}; #1 check("output port ready after reset", portc == 0);
      sel = {1'b1, 2'(p)}; #1 check("input port empty after reset", portc == 1);
    end
    @(negedge clk);
    repeat (60) begin
      int p, t;
      logic [15:0] wv;
      p = $urandom % 4;
      wv = 16'($urandom);
      sel = {1'b0, 2'(p)}; load = 1; bus = wv;
      @(negedge clk); load = 0;
      check("output port busy after load", portc == 1);
      sel = {1'b1, 2'(p)};
      t = 0;
      while (portc && t < 40) begin @(negedge clk); t++; end
      check($sformatf("port %0d word arrives in 17 cycles (took %0d)", p, t), t == 17);
      check($sformatf("port %0d word %h read as %h", p, wv, pt_data), pt_data == wv);
      for (int q = 0; q < 4; q++)
        check("only the addressed input port is full", in_clamp[q] == (q == p));
      sel = {1'b0, 2'(p)}; #1 check("output port empty again", portc == 0);
      sel = {1'b1, 2'((p + 1) % 4)}; advance = 1;          // advance another port: no effect
      @(negedge clk);
      sel = {1'b1, 2'(p)};
      @(negedge clk); advance = 0;
      #1 check("advance empties the selected port", portc == 1 && in_clamp == 4'h0);
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
