// morph_out_mux: the output multiplexer.
//
// Selects which of the three result streams - process unit #1, process
// unit #2 or the subtracter - is written to the output FIFO; the choice is
// what makes the circuit a dilation/erosion, an opening/closing or a
// top-/bottom-hat transform.  The selected stream's valid and data go to the
// output and the output's ready goes back to it; the other sources see
// ready low and so hold.  Purely combinational; `sel` must only change
// while no frame is running.
module morph_out_mux
  import morph_pkg::*;
#(
  parameter int unsigned DW = 16
) (
  input  out_sel_e      sel,
  input  logic          pu1_valid,
  output logic          pu1_ready,
  input  logic [DW-1:0] pu1_data,
  input  logic          pu2_valid,
  output logic          pu2_ready,
  input  logic [DW-1:0] pu2_data,
  input  logic          sub_valid,
  output logic          sub_ready,
  input  logic [DW-1:0] sub_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data
);

  always_comb begin
    pu1_ready = 1'b0;
    pu2_ready = 1'b0;
    sub_ready = 1'b0;
    unique case (sel)
      SEL_PU1: begin out_valid = pu1_valid; out_data = pu1_data; pu1_ready = out_ready; end
      SEL_PU2: begin out_valid = pu2_valid; out_data = pu2_data; pu2_ready = out_ready; end
      SEL_SUB: begin out_valid = sub_valid; out_data = sub_data; sub_ready = out_ready; end
      default: begin out_valid = 1'b0;      out_data = '0; end
    endcase
  end

endmodule
