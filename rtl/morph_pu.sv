// morph_pu: process unit - grayscale dilation or erosion of a streamed image
// by an arbitrary flat N x N structure element.
//
// Pixels arrive in raster order on a valid/ready stream and leave, one
// result per pixel, in raster order on another.  Inside, following the
// document's process unit:
//   * a row buffer of N banks (morph_line_banks), image row r in bank r mod N;
//   * a scan controller with a row counter.  The first (N-1)/2 rows are only
//     stored.  After that, every scan row feeds W + N - 1 columns to the
//     compare module: (N-1)/2 virtual columns, the W image columns, and
//     (N-1)/2 virtual columns again.  During the N-1 virtual columns the
//     input stream is not read.  After the last image row, (N-1)/2 virtual
//     rows are scanned without reading input, to finish the bottom rows;
//   * border handling: virtual pixels (outside the image, left/right/top/
//     bottom) are not stored but replaced at the chain inputs by the neutral
//     extreme value (0 for dilation, all ones for erosion);
//   * N cascade comparator chains (morph_cmp_chain), chain j fed by bank j.
//     The newest row of the window comes straight from the input, the others
//     from the banks;
//   * the structure element, one N-bit string per row, rotated by one row
//     (a circular shift by one string) at each new scan row, because chain j
//     stays tied to bank j while the rows in the banks move;
//   * the step-shaped chain (morph_step_chain) with the "use" masks (OR of
//     each chain's string) that drop rows with an all-zero string.
//
// Configuration (img_w, img_h, is_max, se) is sampled on `start` when the
// unit is idle.  se[i] is structure-element row i (row 0 = top); bit N-1 of
// a row is its left-most column.  The element is applied as written for
// both operators (no reflection), centred on the output pixel.
//
// Flow control (this design's choice; the document says only that the unit
// stops reading during border columns): the whole pipeline advances in a
// cycle where the output register is empty or being read and, if the scan
// needs an input pixel, one is offered.  Otherwise everything holds.  in_ready
// does not depend on in_valid.  `busy` stays high until the last result has
// left, so a new configuration never meets data of the previous frame.
//
// Timing: with both streams free-flowing, the first result leaves
// ((N-1)/2)*W + 3N - 1 cycles after the first pixel is accepted, the
// document's latency formula (7): (N-1)/2 rows of data preparation, 2N
// cycles through the stage-1 register, the cascade chain and the output
// register, N-1 cycles in the step-shaped chain.  A frame takes
// ((N-1)/2)*W + H*(W+N-1) cycles of feeding: the input pauses N-1 cycles
// between image rows (H-(N+1)/2 pauses, as the document counts them) plus
// (N-1)/2 cycles before row (N-1)/2.  Requires odd N >= 3 and
// img_h > (N-1)/2, 1 <= img_w <= MAX_W, img_h <= MAX_H.
module morph_pu #(
  parameter int unsigned N     = 7,
  parameter int unsigned DW    = 16,
  parameter int unsigned MAX_W = 1920,
  parameter int unsigned MAX_H = 1080,
  localparam int unsigned WW   = $clog2(MAX_W + 1),
  localparam int unsigned HW   = $clog2(MAX_H + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration, sampled on start
  input  logic                start,
  input  logic [WW-1:0]       img_w,
  input  logic [HW-1:0]       img_h,
  input  logic                is_max,
  input  logic [N-1:0][N-1:0] se,
  output logic                busy,
  // pixel input stream
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [DW-1:0]       in_data,
  // result stream
  output logic                out_valid,
  input  logic                out_ready,
  output logic [DW-1:0]       out_data,
  // status: the input is paused this cycle for border columns (N-1 cycles
  // between consecutive image rows from row (N-1)/2 on)
  output logic                border_pause
);

  localparam int unsigned R   = (N - 1) / 2;
  localparam int unsigned FW  = $clog2(MAX_W + N);      // feed column counter
  localparam int unsigned SW  = $clog2(MAX_H + N);      // scan row counter
  localparam int unsigned BW  = $clog2(N);
  localparam int unsigned AW  = $clog2(MAX_W);
  localparam int unsigned L   = 2 * N - 1;              // feed to step-chain output

  // ---------------------------------------------------------------- config
  logic                active;
  logic [WW-1:0]       cfg_w;
  logic [HW-1:0]       cfg_h;
  logic                cfg_max;
  logic [N-1:0]        cfg_rot [N];   // string currently tied to chain j

  // ---------------------------------------------------------------- scan
  logic [SW-1:0] sr;        // scan row
  logic [FW-1:0] fc;        // feed column within the scan row
  logic [BW-1:0] bank_wr;   // sr mod N
  logic          fill_row, img_row, need_input, row_last, scan_last;
  logic          colvalid, out_tag;
  logic [FW-1:0] row_len;
  logic signed [FW:0] col;
  logic          adv, out_free, tags_busy;

  always_comb begin
    fill_row   = sr < SW'(R);
    img_row    = sr < SW'(cfg_h);
    row_len    = fill_row ? FW'(cfg_w) : FW'(cfg_w) + FW'(N - 1);
    col        = fill_row ? $signed({1'b0, fc}) : $signed({1'b0, fc}) - (FW+1)'(R);
    colvalid   = (col >= 0) && (col < $signed((FW+1)'(cfg_w)));
    need_input = active && img_row && colvalid;
    row_last   = fc == row_len - FW'(1);
    scan_last  = row_last && (sr == SW'(cfg_h) + SW'(R) - SW'(1));
    out_tag    = active && !fill_row && (fc >= FW'(N - 1));
  end

  assign out_free     = !out_valid || out_ready;
  assign in_ready     = out_free && need_input;
  assign adv          = out_free && (!need_input || in_valid);
  assign border_pause = active && adv && !fill_row && img_row && !need_input;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      cfg_w   <= '0;
      cfg_h   <= '0;
      cfg_max <= 1'b0;
      sr      <= '0;
      fc      <= '0;
      bank_wr <= '0;
      for (int j = 0; j < N; j++) cfg_rot[j] <= '0;
    end else if (start && !busy) begin
      active  <= 1'b1;
      cfg_w   <= img_w;
      cfg_h   <= img_h;
      cfg_max <= is_max;
      sr      <= '0;
      fc      <= '0;
      bank_wr <= '0;
      // scan row 0 is written to bank 0; the window of scan row sr is rows
      // sr-N+1 .. sr, so chain j carries structure-element row (j+N-1-sr) mod N
      for (int j = 0; j < N; j++) cfg_rot[j] <= se[(j + N - 1) % N];
    end else if (active && adv) begin
      if (row_last) begin
        fc      <= '0;
        sr      <= sr + SW'(1);
        bank_wr <= (bank_wr == BW'(N - 1)) ? '0 : bank_wr + BW'(1);
        for (int j = 0; j < N; j++) cfg_rot[j] <= cfg_rot[(j + N - 1) % N];
        if (scan_last) active <= 1'b0;
      end else begin
        fc <= fc + FW'(1);
      end
    end
  end

  // ---------------------------------------------------------------- banks
  logic [N-1:0][DW-1:0] bank_rd;
  logic [AW-1:0]        addr;

  assign addr = AW'(col);

  morph_line_banks #(.N(N), .DW(DW), .MAX_W(MAX_W)) u_banks (
    .clk   (clk),
    .we    (need_input && adv),
    .wbank (bank_wr),
    .addr  (addr),
    .wdata (in_data),
    .re    (adv),
    .rdata (bank_rd)
  );

  // which chains see a real image row at this feed
  logic [N-1:0] row_ok;
  always_comb begin
    for (int j = 0; j < N; j++) begin
      int d;
      d = (int'(bank_wr) - j + N) % N;           // rows back from the newest
      row_ok[j] = (d <= int'(sr)) && (int'(sr) - d < int'(cfg_h));
    end
  end

  // ---------------------------------------------------------------- stage 1
  logic [DW-1:0] pix_q;
  logic [BW-1:0] bank_q;
  logic          colvalid_q;
  logic [N-1:0]  row_ok_q;
  logic [N-1:0]  cfg_q [N];
  logic [L-1:0]  tag_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_q      <= '0;
      bank_q     <= '0;
      colvalid_q <= 1'b0;
      row_ok_q   <= '0;
      tag_d      <= '0;
      for (int j = 0; j < N; j++) cfg_q[j] <= '0;
    end else if (adv) begin
      pix_q      <= in_data;
      bank_q     <= bank_wr;
      colvalid_q <= active && colvalid;
      row_ok_q   <= row_ok;
      tag_d      <= {tag_d[L-2:0], out_tag};
      for (int j = 0; j < N; j++) cfg_q[j] <= cfg_rot[j];
    end
  end

  logic [DW-1:0] neutral;
  logic [DW-1:0] chain_in  [N];
  logic [N-1:0][DW-1:0] chain_out;
  logic [N-1:0]  use_now;
  logic [DW-1:0] step_out;

  assign neutral = cfg_max ? '0 : '1;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      if (!colvalid_q || !row_ok_q[j])  chain_in[j] = neutral;
      else if (bank_q == BW'(j))         chain_in[j] = pix_q;
      else                               chain_in[j] = bank_rd[j];
      use_now[j] = |cfg_q[j];
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_chain
    morph_cmp_chain #(.N(N), .DW(DW)) u_chain (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (adv),
      .is_max  (cfg_max),
      .row_cfg (cfg_q[j]),
      .din     (chain_in[j]),
      .dout    (chain_out[j])
    );
  end

  // the "use" masks follow the chain data through the N-1 chain cycles
  logic [N-1:0] use_d [N];
  assign use_d[0] = use_now;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s < N; s++) use_d[s] <= '0;
    end else if (adv) begin
      for (int s = 1; s < N; s++) use_d[s] <= use_d[s-1];
    end
  end

  morph_step_chain #(.N(N), .DW(DW)) u_step (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (adv),
    .is_max  (cfg_max),
    .use_row (use_d[N-1]),
    .din     (chain_out),
    .dout    (step_out)
  );

  // output register: a result taken while the pipeline is held (input
  // stream empty) must still leave, so it is decoupled from `adv`
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (adv) begin
      out_valid <= tag_d[L-1];
      out_data  <= step_out;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  assign tags_busy = |tag_d;
  assign busy      = active || tags_busy || out_valid;

endmodule
