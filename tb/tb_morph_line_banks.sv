// tb_morph_line_banks: self-checking test of the multi-bank row buffer.
// Writes several image rows round robin, then reads every column back
// while the next row is written at the same address, checking that each
// bank returns the row it holds (old data on the bank being written) one
// cycle after the read, and that rdata holds while re is low.
module tb_morph_line_banks;
  localparam int N = 5, DW = 12, MAX_W = 40, W = 37;
  localparam int BW = $clog2(N), AW = $clog2(MAX_W);

  logic clk = 0, we = 0, re = 0;
  logic [BW-1:0] wbank = '0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0;
  logic [N-1:0][DW-1:0] rdata;
  int checks = 0, failures = 0;

  morph_line_banks #(.N(N), .DW(DW), .MAX_W(MAX_W)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [DW-1:0] pix(int r, int c);
    return DW'(r * 97 + c * 13 + 5);
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3 * N; r++) begin
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        we = 1; wbank = BW'(r % N); addr = AW'(c); wdata = pix(r, c);
        re = (r >= N);
        @(posedge clk); #1;
        if (r >= N) begin
          // banks hold rows r-N .. r-1 at this point (bank r%N: row r-N)
          for (int b = 0; b < N; b++) begin
            int row;
            row = r - N + ((b - r % N + N) % N);
            checks++;
            if (rdata[b] !== pix(row, c)) begin
              failures++;
              if (failures < 10) $display("MISMATCH r=%0d c=%0d b=%0d got %h exp %h", r, c, b, rdata[b], pix(row, c));
            end
          end
          // hold while re is low
          @(negedge clk); we = 0; re = 0; addr = AW'((c + 1) % W);
          @(posedge clk); #1;
          checks++;
          if (rdata[r % N] !== pix(r - N, c)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
