// tb_morph_cmp_chain: self-checking test of the configurable cascade
// comparator chain.  Random pixels are streamed with random stalls; the
// structure-element string changes every SEG pixels (like an image row) and
// both max and min are exercised, including the two strings worked through
// by hand in the document ("01011" and "10101" for N = 5).  A history of
// pixels and strings gives the expected result: the max/min over the marked
// pixels of the window that ended N-1 advancing cycles earlier.  Windows that
// straddle a string change, or whose string is all zeros, are not checked.
module tb_morph_cmp_chain;
  localparam int N  = 5;
  localparam int DW = 8;
  localparam int SEG = 13;
  localparam int HIST = 4096;

  logic clk = 0, rst_n = 0, en = 0, is_max = 1;
  logic [N-1:0]  row_cfg = '0;
  logic [DW-1:0] din = '0, dout;
  int checks = 0, failures = 0;

  morph_cmp_chain #(.N(N), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  logic [DW-1:0] xh [HIST];
  logic [N-1:0]  ch [HIST];
  int t = 0;       // advancing cycles so far

  function automatic logic [DW-1:0] ref_win(int tn, logic mx);
    logic [DW-1:0] r;
    r = mx ? '0 : '1;
    for (int i = 0; i < N; i++) begin
      // pixel i of the window (i = 0 oldest) sits at tn-N+1+i, bit N-1-i
      if (ch[tn-N+1][N-1-i]) begin
        logic [DW-1:0] p;
        p = xh[tn-N+1+i];
        if (mx ? (p > r) : (p < r)) r = p;
      end
    end
    return r;
  endfunction

  function automatic logic same_cfg(int tn);
    for (int i = 1; i < N; i++) if (ch[tn-N+1+i] != ch[tn-N+1]) return 0;
    return ch[tn-N+1] != '0;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] cur_cfg;
  int run;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      is_max = (phase == 0);
      t = 0;
      for (int s = 0; s < 120; s++) begin
        case (s % 6)
          0: cur_cfg = 5'b01011;
          1: cur_cfg = 5'b10101;
          2: cur_cfg = 5'b00001;
          3: cur_cfg = 5'b11111;
          default: cur_cfg = N'($urandom);
        endcase
        for (run = 0; run < SEG; run++) begin
          // random stall cycles
          while ($urandom_range(3) == 0) begin
            @(negedge clk); en = 0;
          end
          @(negedge clk);
          en = 1;
          din = DW'($urandom);
          row_cfg = cur_cfg;
          xh[t] = din; ch[t] = cur_cfg;
          @(posedge clk);
          #1;
          // dout now holds the window whose newest pixel entered at t-(N-2)
          // (this edge counts as the first of the N-1 cycles)
          if (t >= 3 * N && same_cfg(t - (N - 2))) begin
            checks++;
            if (dout !== ref_win(t - (N - 2), is_max)) begin
              failures++;
              if (failures < 10)
                $display("MISMATCH t=%0d cfg=%b got %0d exp %0d", t, ch[t-(N-2)-N+1], dout, ref_win(t-(N-2), is_max));
            end
          end
          t++;
        end
      end
      @(negedge clk); en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
