// tb_mosaic_memory: self-checking test of the banked on-chip memory at its
// default size of 8 banks (2048 words on the 12-bit address).
//
// Every word is written once, then random reads and writes are compared with
// a model; reads return data one cycle after the address. As in the
// processor, writes are never back to back, and a read right after a write
// goes to another row. Addresses with bit 11 set must reach the same word as
// with it clear (only log2(8) bank bits are decoded). The read data is
// checked after the next address is applied, as the processor does.
module tb_mosaic_memory;
  logic clk = 0, rst = 1, we = 0;
  logic [11:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [2048];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mosaic_memory dut (.clk, .rst, .addr, .we, .wdata, .rdata);

  initial begin
    logic pw;
    logic [11:0] pa;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int a = 0; a < 2048; a++) begin
      we = 1; addr = 12'(a); wdata = 16'($urandom); model[a] = wdata;
      @(negedge clk);
      we = 0; addr = 12'(a) ^ 12'h400; @(negedge clk);     // other bank in between
    end
    pw = 0; pa = 0;
    repeat (4000) begin
      we = !pw && ($urandom % 3 == 0);
      do addr = 12'($urandom); while (pw && addr[10:2] == pa[10:2]);
      wdata = 16'($urandom);
      if (we) model[addr[10:0]] = wdata;
      @(negedge clk);
      pw = we; pa = addr;
      we = 0;
      addr = 12'($urandom);                 // next address already on the bus
      #1;
      checks++;
      if (rdata !== model[pa[10:0]]) begin
        failures++;
        if (failures <= 10) $display("FAIL %h: got %h expected %h", pa, rdata, model[pa[10:0]]);
      end
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
