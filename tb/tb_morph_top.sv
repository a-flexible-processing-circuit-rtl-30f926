// tb_morph_top: end-to-end test of the whole circuit at reduced size
// (5x5 element, 8-bit pixels, images up to 24 x 16).
//
// Frames are run in every mode - dilation, erosion, opening, closing,
// top-hat, bottom-hat and a one-unit subtraction that bypasses process
// unit #2 - with a diamond, a random and a partly empty structure element.
// Each result pixel is compared with a behavioural reference computed here
// (flat max/min over the element, positions outside the image ignored).
// The test counts how often each mechanism of the circuit happened and
// fails if one never did: border pauses of each process unit, pixels piling
// up in the input FIFO while process unit #1 pauses, back-pressure from the
// reader, the by-pass of process unit #2, the raw buffer / subtracter path,
// all-zero element rows ("use" masks) and mode switches.
module tb_morph_top;
  import morph_pkg::*;
  localparam int N = 5, DW = 8, MAX_W = 24, MAX_H = 16, R = (N - 1) / 2;
  localparam int DEPTH = (MAX_H - (N + 1) / 2) * (N - 1);
  localparam int CW = $clog2(DEPTH + 2);

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [7:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic busy, done;
  logic pix_in_valid = 0, pix_in_ready, pix_out_valid, pix_out_ready = 0;
  logic [DW-1:0] pix_in_data = '0, pix_out_data;
  logic [CW-1:0] in_fifo_count, out_fifo_count;
  logic [1:0] border_pause;
  int checks = 0, failures = 0;

  morph_top #(.N(N), .DW(DW), .MAX_W(MAX_W), .MAX_H(MAX_H)) dut (.*);
  always #5 clk = ~clk;

  // ------------------------------------------------------------ reference
  int W, H;
  logic [N-1:0][N-1:0] se;
  logic [DW-1:0] img [MAX_H][MAX_W];
  logic [DW-1:0] t1  [MAX_H][MAX_W];
  logic [DW-1:0] t2  [MAX_H][MAX_W];
  logic [DW-1:0] expv[MAX_H][MAX_W];

  // dst = src dilated (mx) or eroded by se
  task automatic morph(input logic mx, ref logic [DW-1:0] src [MAX_H][MAX_W],
                       ref logic [DW-1:0] dst [MAX_H][MAX_W]);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        logic [DW-1:0] r;
        r = mx ? '0 : '1;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            int yy, xx;
            yy = y - R + i; xx = x - R + j;
            if (se[i][N-1-j] && yy >= 0 && yy < H && xx >= 0 && xx < W)
              if (mx ? src[yy][xx] > r : src[yy][xx] < r) r = src[yy][xx];
          end
        dst[y][x] = r;
      end
  endtask

  // ------------------------------------------------------------ counters
  int n_pause1 = 0, n_pause2 = 0, n_backpressure = 0, max_in_fifo = 0;
  int n_bypass = 0, n_sub = 0, n_zero_row = 0, n_mode_switch = 0, n_in_full = 0;
  always @(posedge clk) if (rst_n) begin
    if (border_pause[0]) n_pause1++;
    if (border_pause[1]) n_pause2++;
    if (pix_out_valid && !pix_out_ready) n_backpressure++;
    if (pix_in_valid && !pix_in_ready) n_in_full++;
    if (int'(in_fifo_count) > max_in_fifo) max_in_fifo = int'(in_fifo_count);
  end

  initial begin
    #50000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  morph_mode_t last_mode;
  int frame = 0;

  task automatic run(morph_mode_t m, int w, int h, int gap_out);
    int got = 0;
    logic saw_done = 0;
    W = w; H = h; frame++;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = DW'($urandom);
    // reference
    case (m.out_sel)
      SEL_PU1: morph(m.pu1_op == OP_DILATE, img, expv);
      SEL_PU2: begin morph(m.pu1_op == OP_DILATE, img, t1); morph(m.pu2_op == OP_DILATE, t1, expv); end
      default: begin
        morph(m.pu1_op == OP_DILATE, img, t1);
        if (m.pu2_en) morph(m.pu2_op == OP_DILATE, t1, t2);
        else t2 = t1;
        for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
          int d;
          d = (m.sub_dir == SUB_RAW_MINUS_PROC) ? int'(img[y][x]) - int'(t2[y][x])
                                                : int'(t2[y][x]) - int'(img[y][x]);
          expv[y][x] = (d < 0) ? '0 : DW'(d);
        end
      end
    endcase
    if (frame > 1 && m != last_mode) n_mode_switch++;
    last_mode = m;
    if (m.out_sel != SEL_PU2 && !(m.out_sel == SEL_SUB && m.pu2_en)) n_bypass++;
    if (m.out_sel == SEL_SUB) n_sub++;
    for (int i = 0; i < N; i++) if (se[i] == '0) n_zero_row++;
    // configure and start
    wr(REG_WIDTH, 32'(W)); wr(REG_HEIGHT, 32'(H)); wr(REG_MODE, 32'(m));
    for (int i = 0; i < N; i++) wr(REG_SE0 + 8'(i), 32'(se[i]));
    wr(REG_CTRL, 1);
    fork
      begin : drive   // full-rate source, as from a camera
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            @(negedge clk);
            pix_in_valid = 1; pix_in_data = img[y][x];
            #1;
            while (!pix_in_ready) begin @(negedge clk); #1; end
          end
        @(negedge clk); pix_in_valid = 0;
      end
      begin : monitor
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            do begin
              @(negedge clk);
              pix_out_ready = (gap_out == 0) || ($urandom_range(gap_out) == 0);
              #1;
            end while (!(pix_out_valid && pix_out_ready));
            got++;
            checks++;
            if (pix_out_data !== expv[y][x]) begin
              failures++;
              if (failures < 10) $display("MISMATCH frame %0d y=%0d x=%0d got %0d exp %0d", frame, y, x, pix_out_data, expv[y][x]);
            end
          end
        @(negedge clk); pix_out_ready = 0;
      end
      begin : watch_done
        while (!saw_done) begin @(posedge clk); #1; if (done) saw_done = 1; end
      end
    join
    checks++;
    if (busy || !saw_done) begin failures++; $display("frame %0d: busy/done wrong", frame); end
    repeat (5) @(negedge clk);
    checks++;
    if (pix_out_valid) begin failures++; $display("frame %0d: extra output", frame); end
  endtask

  initial begin
    morph_mode_t m;
    repeat (3) @(posedge clk);
    rst_n = 1;
    se[0] = 5'b00100; se[1] = 5'b01110; se[2] = 5'b11111; se[3] = 5'b01110; se[4] = 5'b00100;
    m = '{pu1_op: OP_DILATE, pu2_en: 0, pu2_op: OP_ERODE, out_sel: SEL_PU1, sub_dir: SUB_RAW_MINUS_PROC};
    run(m, 20, 12, 0);                        // dilation
    m.pu1_op = OP_ERODE;
    run(m, MAX_W, 9, 2);                      // erosion
    m = '{pu1_op: OP_ERODE, pu2_en: 1, pu2_op: OP_DILATE, out_sel: SEL_PU2, sub_dir: SUB_RAW_MINUS_PROC};
    run(m, 17, 13, 0);                        // opening
    m = '{pu1_op: OP_ERODE, pu2_en: 1, pu2_op: OP_DILATE, out_sel: SEL_SUB, sub_dir: SUB_RAW_MINUS_PROC};
    run(m, 20, MAX_H, 0);                     // top-hat, Fig. 7 style
    for (int i = 0; i < N; i++) se[i] = N'($urandom);
    se[R][R] = 1'b1;
    run(m, 16, 10, 3);                        // top-hat, random element, slow reader
    m = '{pu1_op: OP_DILATE, pu2_en: 1, pu2_op: OP_ERODE, out_sel: SEL_PU2, sub_dir: SUB_RAW_MINUS_PROC};
    run(m, 18, 11, 1);                        // closing
    m.out_sel = SEL_SUB; m.sub_dir = SUB_PROC_MINUS_RAW;
    run(m, 19, 12, 0);                        // bottom-hat
    se = '0; se[0] = 5'b10010; se[3] = 5'b01101; se[2] = 5'b00100;
    m = '{pu1_op: OP_DILATE, pu2_en: 0, pu2_op: OP_ERODE, out_sel: SEL_SUB, sub_dir: SUB_PROC_MINUS_RAW};
    run(m, 15, 8, 1);                         // dilation minus original, unit #2 by-passed
    $display("pauses pu1 %0d pu2 %0d, backpressure %0d, max input FIFO %0d of %0d, input refused %0d",
             n_pause1, n_pause2, n_backpressure, max_in_fifo, DEPTH, n_in_full);
    $display("bypass %0d, subtract %0d, zero rows %0d, mode switches %0d",
             n_bypass, n_sub, n_zero_row, n_mode_switch);
    checks++; if (n_pause1 == 0)       begin failures++; $display("no pause in unit 1"); end
    checks++; if (n_pause2 == 0)       begin failures++; $display("no pause in unit 2"); end
    checks++; if (max_in_fifo < N - 1) begin failures++; $display("input FIFO never filled up"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("no back-pressure"); end
    checks++; if (n_bypass == 0)       begin failures++; $display("no by-pass"); end
    checks++; if (n_sub == 0)          begin failures++; $display("no subtraction"); end
    checks++; if (n_zero_row == 0)     begin failures++; $display("no empty row"); end
    checks++; if (n_mode_switch == 0)  begin failures++; $display("no mode switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
