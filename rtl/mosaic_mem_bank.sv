// mosaic_mem_bank: one 4096-bit memory array, 64 rows of 64 bits, seen by the
// processor as 256 words of 16 bits.
//
// Each access reads a whole row (word line) of four words into a row buffer;
// the addressed word is the read data in the next cycle. On the cycle after
// the read, the row buffer is written back to the same row - this is what
// refreshes the dynamic cells - while the next row is being read (separate
// read and write data paths let both happen in one cycle). A write replaces
// the addressed word of the row buffer with the write data, so the new word
// reaches the array with the write-back one cycle later.
// A read of the same row in the cycle right after a write sees the array
// before that write-back, i.e. stale data; to keep that stale row from
// undoing the write, the write-back on the second cycle after a write is
// suppressed. As in the document, a write followed at once by a read of the
// same row, or two writes in a row, therefore do not work; the microcode
// never does either except when a program writes into its own instruction
// stream.
// Interface: sel enables the bank for this cycle; addr = {row[5:0], word[1:0]};
// rdata is valid one cycle after the address.
// The 3-transistor dynamic cells, and their leakage, are not modelled: the
// array is plain storage, so refresh only matters for the timing above.
module mosaic_mem_bank #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned ROWS  = 64,
  parameter int unsigned WPR   = 4      // words per row
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               sel,
  input  logic [$clog2(ROWS*WPR)-1:0]        addr,
  input  logic                               we,
  input  logic [WIDTH-1:0]                   wdata,
  output logic [WIDTH-1:0]                   rdata
);
  localparam int unsigned RB = $clog2(ROWS);
  localparam int unsigned CB = $clog2(WPR);

  logic [WPR*WIDTH-1:0] cells [ROWS];
  logic [WPR*WIDTH-1:0] rowbuf, rowread;
  logic [RB-1:0]        buf_row;
  logic [CB-1:0]        buf_col;
  logic                 buf_wb;      // row buffer is to be written back
  logic                 we_last;     // previous cycle wrote this bank
  logic [RB-1:0]        row;
  logic [CB-1:0]        col;

  assign row = addr[CB +: RB];
  assign col = addr[CB-1:0];

  always_comb begin
    rowread = cells[row];
    if (we) rowread[col*WIDTH +: WIDTH] = wdata;
  end

  always_ff @(posedge clk) begin
    if (buf_wb) cells[buf_row] <= rowbuf;
    if (rst) begin
      buf_wb  <= 1'b0;
      we_last <= 1'b0;
    end else begin
      buf_wb  <= sel && !we_last;
      we_last <= sel && we;
    end
    if (sel) begin
      rowbuf  <= rowread;
      buf_row <= row;
      buf_col <= col;
    end
  end

  assign rdata = rowbuf[buf_col*WIDTH +: WIDTH];
endmodule
