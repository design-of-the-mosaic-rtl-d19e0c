// tb_mosaic_mem_bank: self-checking test of one 64-row by 4-word memory
// bank with its row buffer.
//
// Random reads and writes (never two writes in a row, as in the processor)
// are compared with a model: read data appears the cycle after the address;
// a written word is merged into the row read in the same cycle and written
// back to the cells in the next cycle. A read of the same row in the cycle
// right after a write returns the row as it was before the write and is
// counted as a stale read; the model checks that this stale row is not
// written back (the write-back is held off in the second cycle after a write),
// so the written word survives. Cycles with the bank unselected are mixed in.
module tb_mosaic_mem_bank;
  logic clk = 0, rst = 1, sel = 0, we = 0;
  logic [7:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [256];
  int checks = 0, failures = 0, stale = 0;

  always #5 clk = ~clk;

  mosaic_mem_bank dut (.clk, .rst, .sel, .addr, .we, .wdata, .rdata);

  initial begin
    logic        pw, psel, pstale;
    logic [7:0]  pa, wa;
    logic [15:0] prow [4];
    @(negedge clk); @(negedge clk); rst = 0;
    // initialise through the port
    for (int a = 0; a < 256; a++) begin
      sel = 1; we = (a % 2 == 0); addr = 8'(a); wdata = 16'($urandom);
      if (!we) begin addr = 8'(a - 1); end
      if (we) model[a] = wdata;
      @(negedge clk);
      if (!we) begin
        sel = 1; we = 1; addr = 8'(a); wdata = 16'($urandom); model[a] = wdata;
        @(negedge clk);
        we = 0; sel = 0; @(negedge clk);
      end
    end
    we = 0; sel = 0; @(negedge clk); @(negedge clk);
    pw = 0; psel = 0; pstale = 0; pa = 0; wa = 0;
    repeat (3000) begin
      logic stl;
      sel = ($urandom % 8) != 0;
      we  = sel && !pw && ($urandom % 3 == 0);
      addr = ($urandom % 3 == 0) ? {pa[7:2], 2'($urandom)} : 8'($urandom);
      wdata = 16'($urandom);
      // stale: this read is to the row written in the previous cycle
      stl = sel && !we && pw && addr[7:2] == wa[7:2];
      if (stl) for (int c = 0; c < 4; c++) prow[c] = model[{addr[7:2], 2'(c)}];
      if (we) model[addr] = wdata;
      @(negedge clk);
      if (sel && !stl) begin
        checks++;
        if (rdata !== model[addr]) begin
          failures++;
          $display("FAIL read %h: got %h expected %h", addr, rdata, model[addr]);
        end
      end
      if (stl) stale++;
      pw = we; pa = addr; if (we) wa = addr;
    end
    // all cells must still hold the model after everything is written back
    sel = 0; we = 0; @(negedge clk); @(negedge clk);
    for (int a = 0; a < 256; a++) begin
      sel = 1; addr = 8'(a); @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL final %h: got %h expected %h", a, rdata, model[a]);
      end
    end
    checks++;
    if (stale == 0) begin failures++; $display("FAIL no stale read happened"); end
    $display("stale reads %0d", stale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
