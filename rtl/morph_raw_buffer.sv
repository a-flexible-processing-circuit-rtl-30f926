// morph_raw_buffer: multi-bank buffer for the raw image.
//
// For the compound operations (top-hat, bottom-hat and the like) the
// subtracter needs each original pixel again when its processed value leaves
// the process units, a few image rows later.  This buffer keeps the raw
// pixels meanwhile.  As in the document it is organised as N banks of MAX_W
// pixels (one maximum-width image row each).  Pixels are written bank after
// bank, column by column, and read back in the same order, so the banks
// work as one FIFO of N*MAX_W pixels whatever the image width.  Two process
// units in a row hold back N-1 image rows plus a few tens of pixels in
// their pipelines (about 8N), so N*MAX_W is enough for any img_w <= MAX_W
// as long as MAX_W itself exceeds that pipeline depth, as it does at the
// default sizes.  If the buffer did fill, the circuit would stall for good.
//
// `clear` (pulse at frame start) empties the buffer.  Both sides are
// valid/ready streams; rd_data comes from a register loaded by a
// synchronous read of the banks, so a pixel can be read two cycles after it
// was written.  wr_ready does not depend on wr_valid.  Filling the banks
// independently of the image width is this design's choice; the document
// gives the bank organisation and the size N*W only.
module morph_raw_buffer #(
  parameter int unsigned N     = 7,
  parameter int unsigned DW    = 16,
  parameter int unsigned MAX_W = 1920,
  localparam int unsigned AW   = $clog2(MAX_W),
  localparam int unsigned BW   = $clog2(N),
  localparam int unsigned CW   = $clog2(N * MAX_W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          wr_valid,
  output logic          wr_ready,
  input  logic [DW-1:0] wr_data,
  output logic          rd_valid,
  input  logic          rd_ready,
  output logic [DW-1:0] rd_data
);

  logic [DW-1:0] bank [N][MAX_W];
  logic [BW-1:0] wbank, rbank;
  logic [AW-1:0] wcol, rcol;
  logic [CW-1:0] fill;
  logic          push, pop;

  assign wr_ready = !clear && (fill < CW'(N * MAX_W));
  assign push     = wr_valid && wr_ready;
  assign pop      = !clear && (fill != '0) && (!rd_valid || rd_ready);

  always_ff @(posedge clk) begin
    if (push) bank[wbank][wcol] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank    <= '0;
      rbank    <= '0;
      wcol     <= '0;
      rcol     <= '0;
      fill     <= '0;
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else if (clear) begin
      wbank    <= '0;
      rbank    <= '0;
      wcol     <= '0;
      rcol     <= '0;
      fill     <= '0;
      rd_valid <= 1'b0;
    end else begin
      if (push) begin
        if (wcol == AW'(MAX_W - 1)) begin
          wcol  <= '0;
          wbank <= (wbank == BW'(N - 1)) ? '0 : wbank + BW'(1);
        end else begin
          wcol <= wcol + AW'(1);
        end
      end
      if (pop) begin
        rd_data  <= bank[rbank][rcol];
        rd_valid <= 1'b1;
        if (rcol == AW'(MAX_W - 1)) begin
          rcol  <= '0;
          rbank <= (rbank == BW'(N - 1)) ? '0 : rbank + BW'(1);
        end else begin
          rcol <= rcol + AW'(1);
        end
      end else if (rd_ready) begin
        rd_valid <= 1'b0;
      end
      fill <= fill + CW'(push) - CW'(pop);
    end
  end

endmodule
