// tb_morph_workloads: the image operations the design was evaluated on, run
// on morph_top at its default parameters (7x7 element, 16-bit pixels):
//   1  top-hat of a 256 x 256 image with the 7x7 diamond element;
//   2  dilation with the 5x5 diamond element (held in the 7x7 string with an
//      empty outer ring) on a 64 x 48 image;
//   3  dilation with the full 7x7 square element on a 64 x 48 image, also
//      checking the latency of the first result against
//      W*(N-1)/2 + 2N + (N-1) plus the two FIFOs' cycles.
// Results are compared pixel by pixel with a behavioural reference.
module tb_morph_workloads;
  import morph_pkg::*;
  localparam int N = 7, DW = 16, R = (N - 1) / 2, MW = 256, MH = 256;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [7:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic busy, done;
  logic pix_in_valid = 0, pix_in_ready, pix_out_valid, pix_out_ready = 0;
  logic [DW-1:0] pix_in_data = '0, pix_out_data;
  logic [$clog2((1080 - (N + 1) / 2) * (N - 1) + 2)-1:0] in_fifo_count, out_fifo_count;
  logic [1:0] border_pause;
  int checks = 0, failures = 0;

  morph_top dut (.*);
  always #5 clk = ~clk;

  int W, H;
  logic [N-1:0][N-1:0] se;
  logic [DW-1:0] img  [MH][MW];
  logic [DW-1:0] t1   [MH][MW];
  logic [DW-1:0] t2   [MH][MW];
  logic [DW-1:0] expv [MH][MW];

  task automatic morph(input logic mx, ref logic [DW-1:0] src [MH][MW], ref logic [DW-1:0] dst [MH][MW]);
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

  function automatic logic [N-1:0][N-1:0] diamond(int rad);
    logic [N-1:0][N-1:0] s;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        s[i][N-1-j] = ((i > R ? i - R : R - i) + (j > R ? j - R : R - j)) <= rad;
    return s;
  endfunction

  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    #100000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  longint t_in, t_out;

  task automatic run(morph_mode_t m);
    wr(REG_WIDTH, 32'(W)); wr(REG_HEIGHT, 32'(H)); wr(REG_MODE, 32'(m));
    for (int i = 0; i < N; i++) wr(REG_SE0 + 8'(i), 32'(se[i]));
    wr(REG_CTRL, 1);
    fork
      begin
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            @(negedge clk);
            pix_in_valid = 1; pix_in_data = img[y][x];
            #1;
            while (!pix_in_ready) begin @(negedge clk); #1; end
            if (y == 0 && x == 0) t_in = cyc;
          end
        @(negedge clk); pix_in_valid = 0;
      end
      begin
        pix_out_ready = 1;
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            do begin @(negedge clk); #1; end while (!pix_out_valid);
            if (y == 0 && x == 0) t_out = cyc;
            checks++;
            if (pix_out_data !== expv[y][x]) begin
              failures++;
              if (failures < 10) $display("MISMATCH y=%0d x=%0d got %0d exp %0d", y, x, pix_out_data, expv[y][x]);
            end
          end
      end
    join
    @(negedge clk); pix_out_ready = 0;
    while (busy) @(negedge clk);
  endtask

  initial begin
    morph_mode_t m;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1: top-hat, 256 x 256, 7x7 diamond
    W = 256; H = 256; se = diamond(3);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = DW'(((x - 128) * (x - 128) + (y - 100) * (y - 100)) / 4 + $urandom_range(255));
    morph(1'b0, img, t1); morph(1'b1, t1, t2);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) expv[y][x] = img[y][x] - t2[y][x];
    m = '{pu1_op: OP_ERODE, pu2_en: 1, pu2_op: OP_DILATE, out_sel: SEL_SUB, sub_dir: SUB_RAW_MINUS_PROC};
    run(m);
    $display("top-hat 256x256 done, %0d checks", checks);
    // 2: dilation, 5x5 diamond
    W = 64; H = 48; se = diamond(2);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) if (i == 0 || i == N - 1 || j == 0 || j == N - 1) se[i][j] = 1'b0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = DW'($urandom);
    morph(1'b1, img, expv);
    m = '{pu1_op: OP_DILATE, pu2_en: 0, pu2_op: OP_ERODE, out_sel: SEL_PU1, sub_dir: SUB_RAW_MINUS_PROC};
    run(m);
    // 3: dilation, 7x7 square, latency
    se = '1;
    morph(1'b1, img, expv);
    run(m);
    // eq. (7) inside process unit #1, plus 2 cycles through each FIFO and
    // the pixel offered one cycle before it enters the input FIFO's memory
    checks++;
    if (t_out - t_in != longint'(W * (N - 1) / 2 + 2 * N + (N - 1) + 4)) begin
      failures++;
      $display("latency %0d, expected %0d", t_out - t_in, W * (N - 1) / 2 + 2 * N + (N - 1) + 4);
    end
    $display("dilation 7x7: first result %0d cycles after the first pixel", t_out - t_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
