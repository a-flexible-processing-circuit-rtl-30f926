// morph_line_banks: the multi-bank row buffer inside a process unit.
//
// N banks, each holding one image row of up to MAX_W pixels.  Image rows are
// written round robin (row r into bank r mod N, chosen by the caller through
// wbank), so the banks always hold the last N rows.  All banks are read at
// the same column address in one cycle, giving the column of N stored pixels
// that feeds the N cascade comparator chains.  This follows the document's
// process unit; the number of banks equals the structure-element height.
//
// Timing: synchronous read; rdata is valid the cycle after `re` and holds
// while `re` is low.  A read of the address being written returns the old
// contents (read-before-write), which the process unit relies on: the bank
// being written always holds a row that has left the window.
module morph_line_banks #(
  parameter int unsigned N     = 7,
  parameter int unsigned DW    = 16,
  parameter int unsigned MAX_W = 1920,
  localparam int unsigned BW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned AW   = $clog2(MAX_W)
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [BW-1:0]        wbank,
  input  logic [AW-1:0]        addr,
  input  logic [DW-1:0]        wdata,
  input  logic                 re,
  output logic [N-1:0][DW-1:0] rdata
);

  for (genvar b = 0; b < N; b++) begin : g_bank
    logic [DW-1:0] mem [MAX_W];
    always_ff @(posedge clk) begin
      if (re) rdata[b] <= mem[addr];
      if (we && wbank == BW'(b)) mem[addr] <= wdata;
    end
  end

  initial begin
    assert (N % 2 == 1) else $error("structure element size N must be odd");
  end

endmodule
