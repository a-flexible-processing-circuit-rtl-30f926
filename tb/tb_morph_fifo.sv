// tb_morph_fifo: self-checking test of the synchronous FIFO.  A random
// writer and a random reader move 3000 words through a small FIFO; every
// word read is compared with a queue model, `count` with the model's
// occupancy, and the test checks that the FIFO fills (s_ready low exactly
// at DEPTH words in memory) and that a lone word passes in two cycles.
module tb_morph_fifo;
  localparam int DW = 12, DEPTH = 9, CW = $clog2(DEPTH + 2);

  logic clk = 0, rst_n = 0, s_valid = 0, m_ready = 0, s_ready, m_valid;
  logic [DW-1:0] s_data = '0, m_data;
  logic [CW-1:0] count;
  int checks = 0, failures = 0, fulls = 0;
  logic [DW-1:0] q [$];

  morph_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (.*);
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
    int sent = 0, got = 0, wr_bias, rd_bias;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency of a single word
    @(negedge clk); s_valid = 1; s_data = 12'h5a5; m_ready = 1;
    @(negedge clk); s_valid = 0;
    check(!m_valid, "word too early");
    @(negedge clk);
    check(m_valid && m_data == 12'h5a5, "single word after two cycles");
    @(negedge clk); m_ready = 0;
    for (int phase = 0; phase < 3; phase++) begin
      wr_bias = (phase == 0) ? 9 : (phase == 1) ? 2 : 5;
      rd_bias = (phase == 0) ? 2 : (phase == 1) ? 9 : 5;
      for (int i = 0; i < 1000; i++) begin
        @(negedge clk);
        s_valid = $urandom_range(9) < wr_bias;
        s_data  = DW'($urandom);
        m_ready = $urandom_range(9) < rd_bias;
        #1;
        check(int'(count) == q.size(), "count");
        check(s_ready == (int'(count) - int'(m_valid) < DEPTH), "s_ready");
        if (!s_ready) fulls++;
        if (m_valid && m_ready) begin
          check(q.size() > 0 && m_data == q[0], "data order");
          void'(q.pop_front()); got++;
        end
        if (s_valid && s_ready) begin q.push_back(s_data); sent++; end
      end
    end
    check(fulls > 0, "FIFO never filled");
    $display("words %0d in, %0d out, full %0d cycles", sent, got, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
