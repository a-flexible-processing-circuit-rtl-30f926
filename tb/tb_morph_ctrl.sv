// tb_morph_ctrl: self-checking test of the control unit.  Writes every
// register, checks the decoded configuration and enables for each mode,
// starts a frame, checks that writes are ignored while busy, and that done
// pulses once after exactly W*H output pixels.
module tb_morph_ctrl;
  import morph_pkg::*;
  localparam int N = 5, MAX_W = 64, MAX_H = 32;
  localparam int WW = $clog2(MAX_W + 1), HW = $clog2(MAX_H + 1);

  logic clk = 0, rst_n = 0, cfg_we = 0, out_fire = 0;
  logic [7:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic start, busy, done, pu2_en, buf_en, sub_en;
  logic [WW-1:0] img_w;
  logic [HW-1:0] img_h;
  morph_mode_t mode;
  logic [N-1:0][N-1:0] se;
  int checks = 0, failures = 0;

  morph_ctrl #(.N(N), .MAX_W(MAX_W), .MAX_H(MAX_H)) dut (.*);
  always #5 clk = ~clk;

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    morph_mode_t m;
    int starts = 0, dones = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(REG_WIDTH, 13); wr(REG_HEIGHT, 6);
    for (int i = 0; i < N; i++) wr(REG_SE0 + 8'(i), 32'(5'b00001 << i));
    check(img_w == 13 && img_h == 6, "size registers");
    for (int i = 0; i < N; i++) check(se[i] == N'(5'b00001 << i), "structure element row");
    // modes: dilation, opening, top-hat, single-unit subtraction
    m = '{pu1_op: OP_DILATE, pu2_en: 0, pu2_op: OP_ERODE, out_sel: SEL_PU1, sub_dir: SUB_RAW_MINUS_PROC};
    wr(REG_MODE, 32'(m)); check(mode == m && !pu2_en && !buf_en && !sub_en, "dilation mode");
    m = '{pu1_op: OP_ERODE, pu2_en: 1, pu2_op: OP_DILATE, out_sel: SEL_PU2, sub_dir: SUB_RAW_MINUS_PROC};
    wr(REG_MODE, 32'(m)); check(mode == m && pu2_en && !buf_en && !sub_en, "opening mode");
    m = '{pu1_op: OP_DILATE, pu2_en: 0, pu2_op: OP_ERODE, out_sel: SEL_SUB, sub_dir: SUB_PROC_MINUS_RAW};
    wr(REG_MODE, 32'(m)); check(mode == m && !pu2_en && buf_en && sub_en, "one-unit subtraction mode");
    m = '{pu1_op: OP_ERODE, pu2_en: 1, pu2_op: OP_DILATE, out_sel: SEL_SUB, sub_dir: SUB_RAW_MINUS_PROC};
    wr(REG_MODE, 32'(m)); check(mode == m && pu2_en && buf_en && sub_en, "top-hat mode");
    // start
    fork
      begin
        @(negedge clk); cfg_we = 1; cfg_addr = REG_CTRL; cfg_wdata = 1;
        @(negedge clk); cfg_we = 0; #1;
        check(start && busy, "start pulse");
        wr(REG_WIDTH, 40);
        check(img_w == 13, "write ignored while busy");
        for (int k = 0; k < 13 * 6; k++) begin
          @(negedge clk); out_fire = $urandom_range(1);
          while (!out_fire) begin @(negedge clk); out_fire = $urandom_range(1); end
          #1;
          if (k < 13 * 6 - 1) check(busy, "busy during frame");
        end
        @(negedge clk); out_fire = 0; #1;
        check(!busy && done, "done after W*H outputs");
        @(negedge clk); #1;
        check(!done, "done is a pulse");
      end
      begin
        repeat (200) begin
          @(posedge clk); #1;
          if (start) starts++;
          if (done) dones++;
        end
      end
    join
    check(starts == 1 && dones == 1, "one start, one done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
