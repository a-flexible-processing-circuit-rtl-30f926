// tb_morph_subtracter: self-checking test of the subtracter.  Random raw and
// processed streams with independent gaps and random output back-pressure;
// each output must be the difference of the next raw/processed pair in the
// selected order, clamped at zero, and no pair may be lost or repeated.
module tb_morph_subtracter;
  import morph_pkg::*;
  localparam int DW = 8;

  logic clk = 0, rst_n = 0;
  sub_dir_e dir = SUB_RAW_MINUS_PROC;
  logic raw_valid = 0, proc_valid = 0, out_ready = 0, raw_ready, proc_ready, out_valid;
  logic [DW-1:0] raw_data = '0, proc_data = '0, out_data;
  int checks = 0, failures = 0, clamps = 0;
  logic raw_taken, proc_taken;
  logic [DW-1:0] rq [$], pq [$], eq [$];

  morph_subtracter #(.DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 2; ph++) begin
      dir = ph ? SUB_PROC_MINUS_RAW : SUB_RAW_MINUS_PROC;
      raw_taken = 1; proc_taken = 1;
      for (int i = 0; i < 800; i++) begin
        @(negedge clk);
        // a stream holds its word until the word is taken
        if (!raw_valid || raw_taken) begin
          raw_valid = $urandom_range(3) != 0; raw_data = DW'($urandom);
        end
        if (!proc_valid || proc_taken) begin
          proc_valid = $urandom_range(3) != 0; proc_data = DW'($urandom);
        end
        out_ready = $urandom_range(3) != 0;
        #1;
        if (out_valid && out_ready) begin
          checks++;
          if (eq.size() == 0 || out_data != eq[0]) begin
            failures++;
            if (failures < 10) $display("MISMATCH got %0d", out_data);
          end
          if (eq.size() > 0) void'(eq.pop_front());
        end
        raw_taken  = raw_valid && raw_ready;
        proc_taken = proc_valid && proc_ready;
        if (raw_taken || proc_taken) begin
          checks++;
          if (raw_taken != proc_taken) failures++;   // pairs only
        end
        if (raw_taken && proc_taken) begin
          int d;
          d = ph ? int'(proc_data) - int'(raw_data) : int'(raw_data) - int'(proc_data);
          if (d < 0) begin d = 0; clamps++; end
          eq.push_back(DW'(d));
        end
      end
      // drain
      repeat (4) begin
        @(negedge clk); raw_valid = 0; proc_valid = 0; out_ready = 1; #1;
        if (out_valid) begin
          checks++;
          if (eq.size() == 0 || out_data != eq[0]) failures++;
          if (eq.size() > 0) void'(eq.pop_front());
        end
      end
      checks++;
      if (eq.size() != 0) begin failures++; $display("%0d results lost", eq.size()); end
    end
    checks++;
    if (clamps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
