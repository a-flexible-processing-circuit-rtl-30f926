// tb_morph_pu: self-checking test of one process unit.
//
// Several frames are processed, each compared pixel by pixel with a
// behavioural reference (max/min over the structure element, positions
// outside the image ignored):
//   0  dilation, 5x5 diamond, both streams free-flowing: also checks the
//      latency of the first result, ((N-1)/2)*W + 3N - 1 cycles, and the
//      frame time, ((N-1)/2)*W + H*(W+N-1) feed cycles;
//   1  erosion, random element, random gaps on the input, random back-pressure;
//   2  dilation, element with all-zero rows (exercises the "use" masks);
//   3  erosion, a single off-centre pixel, image as wide as MAX_W.
// It also counts the border pauses of the input stream.
module tb_morph_pu;
  localparam int N = 5, DW = 8, MAX_W = 24, MAX_H = 16, R = (N - 1) / 2;
  localparam int WW = $clog2(MAX_W + 1), HW = $clog2(MAX_H + 1);

  logic clk = 0, rst_n = 0, start = 0, is_max = 0, busy;
  logic [WW-1:0] img_w = '0;
  logic [HW-1:0] img_h = '0;
  logic [N-1:0][N-1:0] se = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, border_pause;
  logic [DW-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0, pauses = 0;

  morph_pu #(.N(N), .DW(DW), .MAX_W(MAX_W), .MAX_H(MAX_H)) dut (.*);
  always #5 clk = ~clk;

  logic [DW-1:0] img [MAX_H][MAX_W];
  int W, H, gap_in, gap_out, frame = 0;
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (border_pause) pauses++;
  end

  function automatic logic [DW-1:0] ref_pix(int y, int x);
    logic [DW-1:0] r;
    r = is_max ? '0 : '1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int yy, xx;
        yy = y - R + i; xx = x - R + j;
        if (se[i][N-1-j] && yy >= 0 && yy < H && xx >= 0 && xx < W)
          if (is_max ? img[yy][xx] > r : img[yy][xx] < r) r = img[yy][xx];
      end
    return r;
  endfunction

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t_first_in, t_first_out, t_last_out;

  task automatic run_frame();
    fork
      begin : drive
        // signals are driven and sampled between clock edges, so the
        // handshake seen here is the one the clock edge will take
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            @(negedge clk);
            while (gap_in > 0 && $urandom_range(gap_in) != 0) begin
              in_valid = 0; @(negedge clk);
            end
            in_valid = 1; in_data = img[y][x];
            #1;
            while (!in_ready) begin @(negedge clk); #1; end
            if (y == 0 && x == 0) t_first_in = cyc;
          end
        @(negedge clk); in_valid = 0;
      end
      begin : monitor
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            do begin
              @(negedge clk);
              out_ready = (gap_out == 0) || ($urandom_range(gap_out) == 0);
              #1;
            end while (!(out_valid && out_ready));
            if (y == 0 && x == 0) t_first_out = cyc;
            t_last_out = cyc;
            checks++;
            if (out_data !== ref_pix(y, x)) begin
              failures++;
              if (failures < 10) $display("MISMATCH frame=%0d y=%0d x=%0d got %0d exp %0d", frame, y, x, out_data, ref_pix(y, x));
            end
          end
        @(negedge clk); out_ready = 0;
      end
    join
  endtask

  task automatic setup(int w, int h, logic mx);
    W = w; H = h; is_max = mx; frame++;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = DW'($urandom);
    @(negedge clk);
    while (busy) @(negedge clk);
    img_w = WW'(W); img_h = HW'(H); start = 1;
    @(negedge clk); start = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // frame 0: free-flowing, 5x5 diamond dilation
    se[0] = 5'b00100; se[1] = 5'b01110; se[2] = 5'b11111; se[3] = 5'b01110; se[4] = 5'b00100;
    gap_in = 0; gap_out = 0;
    setup(20, 11, 1);
    pauses = 0;
    run_frame();
    checks++;
    if (t_first_out - t_first_in != longint'(R * W + 3 * N - 1)) begin
      failures++; $display("latency %0d, expected %0d", t_first_out - t_first_in, R * W + 3 * N - 1);
    end
    checks++;
    if (t_last_out - t_first_in != longint'(R * W + H * (W + N - 1) - 1 + 2 * N)) begin
      failures++; $display("frame time %0d", t_last_out - t_first_in);
    end
    checks++;
    if (pauses != (H - R) * (N - 1)) begin
      failures++; $display("border pauses %0d, expected %0d", pauses, (H - R) * (N - 1));
    end
    // frame 1: random element, erosion, stalls on both sides
    for (int i = 0; i < N; i++) se[i] = N'($urandom);
    se[R][R] = 1'b1;
    gap_in = 3; gap_out = 3;
    setup(17, 13, 0);
    run_frame();
    // frame 2: all-zero rows
    se = '0; se[0] = 5'b10010; se[3] = 5'b01101;
    gap_in = 2; gap_out = 1;
    setup(19, 9, 1);
    run_frame();
    // frame 3: one off-centre pixel, full width
    se = '0; se[4][0] = 1'b1;
    gap_in = 1; gap_out = 2;
    setup(MAX_W, 7, 0);
    run_frame();
    repeat (3 * N) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("busy after the last frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
