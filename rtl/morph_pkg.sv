// morph_pkg: types and constants shared by the morphological transform circuit.
//
// The circuit computes grayscale flat dilation (max filter) and erosion
// (min filter) over an arbitrary N x N structure element, and the compound
// operations built from them (opening, closing, top-hat, bottom-hat).
// This package holds the operator and output-select encodings, the run-time
// configuration record written through the control unit and the control
// unit's register map.  The
// encodings are this design's own; the document names the operations but
// gives no encoding.
package morph_pkg;

  // Operator of one process unit.
  typedef enum logic {
    OP_ERODE  = 1'b0,   // min over the structure element
    OP_DILATE = 1'b1    // max over the structure element
  } morph_op_e;

  // Source picked by the output multiplexer.
  typedef enum logic [1:0] {
    SEL_PU1 = 2'd0,     // process unit #1 alone (dilation / erosion)
    SEL_PU2 = 2'd1,     // process unit #2 after #1 (opening / closing)
    SEL_SUB = 2'd2      // subtracter (top-hat / bottom-hat)
  } out_sel_e;

  // Order of the subtraction.
  typedef enum logic {
    SUB_RAW_MINUS_PROC = 1'b0,  // top-hat: original - opening
    SUB_PROC_MINUS_RAW = 1'b1   // bottom-hat: closing - original
  } sub_dir_e;

  // Operating mode held by the control unit.
  typedef struct packed {
    morph_op_e pu1_op;    // bit 5
    logic      pu2_en;    // bit 4: process unit #2 in the path
    morph_op_e pu2_op;    // bit 3
    out_sel_e  out_sel;   // bits 2:1
    sub_dir_e  sub_dir;   // bit 0
  } morph_mode_t;

  // Control unit register map (word addresses).
  localparam logic [7:0] REG_CTRL   = 8'h00;  // write bit0 = start frame
  localparam logic [7:0] REG_WIDTH  = 8'h01;  // image width in pixels
  localparam logic [7:0] REG_HEIGHT = 8'h02;  // image height in rows
  localparam logic [7:0] REG_MODE   = 8'h03;  // morph_mode_t in bits 5:0
  localparam logic [7:0] REG_SE0    = 8'h10;  // structure element row i at REG_SE0 + i

endpackage
