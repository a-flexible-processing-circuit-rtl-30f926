// morph_subtracter: the subtracter stage of the compound operations.
//
// Pairs each processed pixel with the raw pixel it came from and outputs
// their difference: raw - processed for the top-hat transform (original
// minus opening) or processed - raw for the bottom-hat transform (closing
// minus original), chosen by `dir`.  For these operations the difference is
// never negative; should a configuration make it so, the result is clamped
// to 0 (this design's choice, the document does not discuss it).
//
// Two input streams are joined: a pair is taken when both are valid and the
// output register is free; each input's ready does not depend on its own
// valid.  The result is registered: one cycle of latency, one pixel per
// cycle.
module morph_subtracter
  import morph_pkg::*;
#(
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  sub_dir_e      dir,
  input  logic          raw_valid,
  output logic          raw_ready,
  input  logic [DW-1:0] raw_data,
  input  logic          proc_valid,
  output logic          proc_ready,
  input  logic [DW-1:0] proc_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data
);

  logic          free, take;
  logic [DW-1:0] a, b;
  logic [DW:0]   diff;

  assign free       = !out_valid || out_ready;
  assign take       = free && raw_valid && proc_valid;
  assign raw_ready  = free && proc_valid;
  assign proc_ready = free && raw_valid;

  always_comb begin
    a    = (dir == SUB_RAW_MINUS_PROC) ? raw_data  : proc_data;
    b    = (dir == SUB_RAW_MINUS_PROC) ? proc_data : raw_data;
    diff = {1'b0, a} - {1'b0, b};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (take) begin
      out_valid <= 1'b1;
      out_data  <= diff[DW] ? '0 : diff[DW-1:0];
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

endmodule
