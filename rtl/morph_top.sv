// morph_top: configurable circuit for grayscale morphological transforms.
//
// Streams an image (raster order, one pixel per cycle) through
//   input FIFO -> process unit #1 -> process unit #2 -> subtracter
//              -> output multiplexer -> output FIFO
// with by-pass paths, and a raw-image buffer beside the process units.
// Each process unit dilates (max) or erodes (min) by an arbitrary flat
// N x N structure element.  The mode set in the control unit picks the
// path:
//   out_sel = PU1                 dilation or erosion
//   out_sel = PU2                 opening (erode, dilate) / closing
//   out_sel = SUB, pu2_en = 1     top-hat (raw - opening) /
//                                 bottom-hat (closing - raw)
//   out_sel = SUB, pu2_en = 0     raw minus/plus one process unit's result
// Units the mode does not use get neither data nor a start.  This block
// arrangement is the document's; the stream handshakes, the register map
// and the single-frame start/done protocol are this design's.
//
// Interface: configuration writes (cfg_we/cfg_addr/cfg_wdata, register map
// in morph_pkg), then a write of 1 to REG_CTRL starts a frame.  The frame's
// img_w*img_h pixels are then offered on pix_in_* and the results read on
// pix_out_* (valid/ready streams).  busy is high from start until the last
// result has entered the output FIFO; done pulses then.
//
// Timing: after the fill latency the circuit produces one result per cycle
// except for N-1 cycles per image row spent on the border columns; both
// FIFOs default to the document's depth (MAX_H-(N+1)/2)*(N-1), enough to
// take a full-rate input stream during those pauses.
module morph_top
  import morph_pkg::*;
#(
  parameter int unsigned N          = 7,
  parameter int unsigned DW         = 16,
  parameter int unsigned MAX_W      = 1920,
  parameter int unsigned MAX_H      = 1080,
  parameter int unsigned FIFO_DEPTH = (MAX_H - (N + 1) / 2) * (N - 1),
  localparam int unsigned CW        = $clog2(FIFO_DEPTH + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration
  input  logic          cfg_we,
  input  logic [7:0]    cfg_addr,
  input  logic [31:0]   cfg_wdata,
  output logic          busy,
  output logic          done,
  // image in
  input  logic          pix_in_valid,
  output logic          pix_in_ready,
  input  logic [DW-1:0] pix_in_data,
  // result out
  output logic          pix_out_valid,
  input  logic          pix_out_ready,
  output logic [DW-1:0] pix_out_data,
  // fill levels of the two FIFOs
  output logic [CW-1:0] in_fifo_count,
  output logic [CW-1:0] out_fifo_count,
  // per process unit: input paused this cycle for a border column
  output logic [1:0]    border_pause
);

  localparam int unsigned WW = $clog2(MAX_W + 1);
  localparam int unsigned HW = $clog2(MAX_H + 1);

  // ------------------------------------------------------------ control
  logic                start, pu2_en, buf_en, sub_en, out_fire;
  logic [WW-1:0]       img_w;
  logic [HW-1:0]       img_h;
  morph_mode_t         mode;
  logic [N-1:0][N-1:0] se;

  morph_ctrl #(.N(N), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_ctrl (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .out_fire,
    .start, .busy, .done, .img_w, .img_h, .mode, .se,
    .pu2_en, .buf_en, .sub_en
  );

  // ------------------------------------------------------------ input FIFO
  logic          fi_valid, fi_ready;
  logic [DW-1:0] fi_data;

  morph_fifo #(.DW(DW), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .s_valid (pix_in_valid), .s_ready (pix_in_ready), .s_data (pix_in_data),
    .m_valid (fi_valid),     .m_ready (fi_ready),     .m_data (fi_data),
    .count   (in_fifo_count)
  );

  // the FIFO output goes to process unit #1 and, when used, the raw buffer;
  // a pixel leaves only when every destination takes it
  logic          pu1_in_valid, pu1_in_ready;
  logic          rb_wr_valid, rb_wr_ready;

  assign pu1_in_valid = fi_valid && (!buf_en || rb_wr_ready);
  assign rb_wr_valid  = fi_valid && buf_en && pu1_in_ready;
  assign fi_ready     = pu1_in_ready && (!buf_en || rb_wr_ready);

  // ------------------------------------------------------------ process unit #1
  logic          pu1_out_valid, pu1_out_ready, pu1_pause;
  logic [DW-1:0] pu1_out_data;

  morph_pu #(.N(N), .DW(DW), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_pu1 (
    .clk, .rst_n,
    .start (start), .img_w, .img_h, .is_max (mode.pu1_op == OP_DILATE), .se,
    .busy (),
    .in_valid (pu1_in_valid), .in_ready (pu1_in_ready), .in_data (fi_data),
    .out_valid (pu1_out_valid), .out_ready (pu1_out_ready), .out_data (pu1_out_data),
    .border_pause (pu1_pause)
  );

  // ------------------------------------------------------------ process unit #2
  logic          pu2_in_ready, pu2_out_valid, pu2_out_ready, pu2_pause;
  logic [DW-1:0] pu2_out_data;

  morph_pu #(.N(N), .DW(DW), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_pu2 (
    .clk, .rst_n,
    .start (start && pu2_en), .img_w, .img_h, .is_max (mode.pu2_op == OP_DILATE), .se,
    .busy (),
    .in_valid (pu1_out_valid && pu2_en), .in_ready (pu2_in_ready), .in_data (pu1_out_data),
    .out_valid (pu2_out_valid), .out_ready (pu2_out_ready), .out_data (pu2_out_data),
    .border_pause (pu2_pause)
  );

  // ------------------------------------------------------------ raw buffer
  logic          rb_rd_valid, rb_rd_ready;
  logic [DW-1:0] rb_rd_data;

  morph_raw_buffer #(.N(N), .DW(DW), .MAX_W(MAX_W)) u_raw_buf (
    .clk, .rst_n,
    .clear (start),
    .wr_valid (rb_wr_valid), .wr_ready (rb_wr_ready), .wr_data (fi_data),
    .rd_valid (rb_rd_valid), .rd_ready (rb_rd_ready), .rd_data (rb_rd_data)
  );

  // ------------------------------------------------------------ subtracter
  logic          sp_valid, sp_ready, sub_valid, sub_ready;
  logic [DW-1:0] sp_data, sub_data;

  // processed operand: process unit #2 if it is in the path, else #1
  assign sp_valid = sub_en && (pu2_en ? pu2_out_valid : pu1_out_valid);
  assign sp_data  = pu2_en ? pu2_out_data : pu1_out_data;

  morph_subtracter #(.DW(DW)) u_sub (
    .clk, .rst_n, .dir (mode.sub_dir),
    .raw_valid (rb_rd_valid && sub_en), .raw_ready (rb_rd_ready), .raw_data (rb_rd_data),
    .proc_valid (sp_valid), .proc_ready (sp_ready), .proc_data (sp_data),
    .out_valid (sub_valid), .out_ready (sub_ready), .out_data (sub_data)
  );

  // ------------------------------------------------------------ multiplexer
  logic          mx_pu1_ready, mx_pu2_ready, mo_valid, mo_ready;
  logic [DW-1:0] mo_data;

  morph_out_mux #(.DW(DW)) u_mux (
    .sel (mode.out_sel),
    .pu1_valid (pu1_out_valid), .pu1_ready (mx_pu1_ready), .pu1_data (pu1_out_data),
    .pu2_valid (pu2_out_valid), .pu2_ready (mx_pu2_ready), .pu2_data (pu2_out_data),
    .sub_valid (sub_valid),     .sub_ready (sub_ready),    .sub_data (sub_data),
    .out_valid (mo_valid),      .out_ready (mo_ready),     .out_data (mo_data)
  );

  // where the results of process unit #1 and #2 go
  assign pu1_out_ready = pu2_en ? pu2_in_ready
                       : sub_en ? sp_ready
                       : mx_pu1_ready;
  assign pu2_out_ready = sub_en ? sp_ready : mx_pu2_ready;

  // ------------------------------------------------------------ output FIFO
  morph_fifo #(.DW(DW), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .s_valid (mo_valid),      .s_ready (mo_ready),      .s_data (mo_data),
    .m_valid (pix_out_valid), .m_ready (pix_out_ready), .m_data (pix_out_data),
    .count   (out_fifo_count)
  );

  assign out_fire     = mo_valid && mo_ready;
  assign border_pause = {pu2_pause, pu1_pause};

endmodule
