// tb_morph_step_chain: self-checking test of the step-shaped comparator
// chain.  Random row results and random "use" masks are applied every cycle
// (with random stalls) for both max and min; the expected value is the
// max/min over the used rows (the neutral value if no row is used), and it
// must appear exactly N-1 advancing cycles later.
module tb_morph_step_chain;
  localparam int N  = 7;
  localparam int DW = 16;
  localparam int L  = N - 1;

  logic clk = 0, rst_n = 0, en = 0, is_max = 1;
  logic [N-1:0] use_row = '0;
  logic [N-1:0][DW-1:0] din = '0;
  logic [DW-1:0] dout;
  int checks = 0, failures = 0;

  morph_step_chain #(.N(N), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  logic [DW-1:0] expq [$];

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      is_max = (phase == 0);
      expq.delete();
      for (int i = 0; i < 400; i++) begin
        logic [DW-1:0] e;
        while ($urandom_range(3) == 0) begin @(negedge clk); en = 0; end
        @(negedge clk);
        en = 1;
        use_row = N'($urandom);
        if (i % 50 == 0) use_row = '0;
        e = is_max ? '0 : '1;
        for (int j = 0; j < N; j++) begin
          din[j] = DW'($urandom);
          if (use_row[j] && (is_max ? din[j] > e : din[j] < e)) e = din[j];
        end
        expq.push_back(e);
        @(posedge clk); #1;
        // after this edge the result of the input L-1 edges ago is on dout
        if (expq.size() > L - 1 + 0) begin
          logic [DW-1:0] x;
          x = expq.pop_front();
          if (i >= L + 1) begin
            checks++;
            if (dout !== x) begin
              failures++;
              if (failures < 10) $display("MISMATCH i=%0d got %h exp %h", i, dout, x);
            end
          end
        end
      end
      @(negedge clk); en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
