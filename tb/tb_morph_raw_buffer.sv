// tb_morph_raw_buffer: self-checking test of the multi-bank raw buffer.
// Pixels are written and read with random gaps on both sides, in phases
// where the reader is slower and then faster; every pixel read must be the
// next one written, the buffer must refuse writes exactly when its N banks
// are full, and `clear` must empty it.
module tb_morph_raw_buffer;
  localparam int N = 3, DW = 10, MAX_W = 12;

  logic clk = 0, rst_n = 0, clear = 0, wr_valid = 0, rd_ready = 0, wr_ready, rd_valid;
  logic [DW-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0, fulls = 0;
  logic [DW-1:0] q [$];

  morph_raw_buffer #(.N(N), .DW(DW), .MAX_W(MAX_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk); clear = 1; wr_valid = 0; rd_ready = 0;
      @(negedge clk); clear = 0;
      q.delete();
      for (int i = 0; i < 1500; i++) begin
        @(negedge clk);
        wr_valid = $urandom_range(3) != 0;
        wr_data  = DW'($urandom);
        rd_ready = (i % 300 < 150) ? ($urandom_range(3) == 0) : ($urandom_range(3) != 0);
        #1;
        // capacity: N rows in the banks plus the output register
        check(wr_ready == (q.size() - int'(rd_valid) < N * MAX_W), "wr_ready vs occupancy");
        if (!wr_ready) fulls++;
        if (rd_valid && rd_ready) begin
          check(q.size() > 0 && rd_data == q[0], "order");
          void'(q.pop_front());
        end
        if (wr_valid && wr_ready) q.push_back(wr_data);
      end
    end
    @(negedge clk); wr_valid = 0; clear = 1;
    @(negedge clk); clear = 0; #1;
    check(!rd_valid && wr_ready, "clear empties the buffer");
    check(fulls > 0, "buffer never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
