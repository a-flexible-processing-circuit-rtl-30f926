// tb_morph_top_full: one complete operation at the circuit's default size.
//
// morph_top with its default parameters (7x7 element, 16-bit pixels, up to
// 1920 x 1080 images, FIFOs of (1080-4)*6 words) computes the top-hat
// transform (original minus opening) of one full 1920 x 1080 frame with a
// 7x7 diamond element, fed at one pixel per cycle and read without
// back-pressure.  Every result pixel is compared with a behavioural
// reference.  The test also checks that the input FIFO never refuses a
// pixel, i.e. that its depth covers the border pauses of a full frame, and
// reports the cycles per frame.
module tb_morph_top_full;
  import morph_pkg::*;
  localparam int N = 7, DW = 16, W = 1920, H = 1080, R = (N - 1) / 2;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [7:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic busy, done;
  logic pix_in_valid = 0, pix_in_ready, pix_out_valid, pix_out_ready = 0;
  logic [DW-1:0] pix_in_data = '0, pix_out_data;
  logic [$clog2((H - (N + 1) / 2) * (N - 1) + 2)-1:0] in_fifo_count, out_fifo_count;
  logic [1:0] border_pause;
  int checks = 0, failures = 0;

  morph_top dut (.*);
  always #5 clk = ~clk;

  logic [N-1:0][N-1:0] se;
  logic [DW-1:0] img  [H][W];
  logic [DW-1:0] ero  [H][W];
  logic [DW-1:0] opn  [H][W];

  task automatic morph(input logic mx, ref logic [DW-1:0] src [H][W], ref logic [DW-1:0] dst [H][W]);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        logic [DW-1:0] r;
        r = mx ? '0 : '1;
        for (int i = 0; i < N; i++) begin
          int yy;
          yy = y - R + i;
          if (yy >= 0 && yy < H)
            for (int j = 0; j < N; j++) begin
              int xx;
              xx = x - R + j;
              if (se[i][N-1-j] && xx >= 0 && xx < W)
                if (mx ? src[yy][xx] > r : src[yy][xx] < r) r = src[yy][xx];
            end
        end
        dst[y][x] = r;
      end
  endtask

  int refused = 0, pauses = 0, max_fifo = 0;
  longint cyc = 0, t_start = 0, t_end = 0;
  always @(posedge clk) begin
    cyc++;
    if (pix_in_valid && !pix_in_ready) refused++;
    if (border_pause[0]) pauses++;
    if (int'(in_fifo_count) > max_fifo) max_fifo = int'(in_fifo_count);
  end

  initial begin
    #200000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    morph_mode_t m;
    // 7x7 diamond: |i-3| + |j-3| <= 3
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        se[i][N-1-j] = ((i > R ? i - R : R - i) + (j > R ? j - R : R - j)) <= R;
    // smooth gradient plus noise, so that the top-hat is not trivial
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = DW'((x * 17 + y * 29) % 40000 + ($urandom_range(15) == 0 ? $urandom_range(20000) : 0));
    morph(1'b0, img, ero);
    morph(1'b1, ero, opn);
    repeat (3) @(posedge clk);
    rst_n = 1;
    m = '{pu1_op: OP_ERODE, pu2_en: 1, pu2_op: OP_DILATE, out_sel: SEL_SUB, sub_dir: SUB_RAW_MINUS_PROC};
    wr(REG_WIDTH, W); wr(REG_HEIGHT, H); wr(REG_MODE, 32'(m));
    for (int i = 0; i < N; i++) wr(REG_SE0 + 8'(i), 32'(se[i]));
    wr(REG_CTRL, 1);
    fork
      begin
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            @(negedge clk);
            pix_in_valid = 1; pix_in_data = img[y][x];
            if (y == 0 && x == 0) t_start = cyc;
            #1;
            while (!pix_in_ready) begin @(negedge clk); #1; end
          end
        @(negedge clk); pix_in_valid = 0;
      end
      begin
        pix_out_ready = 1;
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            logic [DW-1:0] e;
            do begin @(negedge clk); #1; end while (!pix_out_valid);
            e = img[y][x] - opn[y][x];
            checks++;
            if (pix_out_data !== e) begin
              failures++;
              if (failures < 10) $display("MISMATCH y=%0d x=%0d got %0d exp %0d", y, x, pix_out_data, e);
            end
          end
        t_end = cyc;
      end
    join
    checks++;
    if (refused != 0) begin failures++; $display("input FIFO refused %0d pixels", refused); end
    checks++;
    if (pauses != (H - R) * (N - 1)) begin failures++; $display("unit 1 paused %0d cycles", pauses); end
    $display("frame: %0d cycles from first pixel in to last result out, input FIFO peak %0d words, unit 1 border pauses %0d cycles",
             t_end - t_start, max_fifo, pauses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
