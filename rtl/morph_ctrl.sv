// morph_ctrl: control unit of the morphological transform circuit.
//
// Holds the configuration the document lists - image size, structure
// element and the function of the process units and output multiplexer -
// in registers written by a simple word-wide write port (see the register
// map in morph_pkg), and runs one frame per start command.
//
// Register writes (cfg_we, cfg_addr, cfg_wdata) take effect at the clock
// edge and are ignored while a frame runs.  Writing bit 0 of REG_CTRL
// starts a frame: `start` pulses for one cycle, `busy` rises and stays high
// until W*H result pixels have been written to the output FIFO (counted on
// out_fire), then `done` pulses.  The enables say which optional units the
// mode uses (process unit #2, raw buffer, subtracter); a unit that is not
// enabled receives no data and no start.  The register interface and its
// encoding are this design's own; the document only says the control unit
// "is initialized by setting image size, structure element, function of the
// process units and so on".
module morph_ctrl
  import morph_pkg::*;
#(
  parameter int unsigned N     = 7,
  parameter int unsigned MAX_W = 1920,
  parameter int unsigned MAX_H = 1080,
  localparam int unsigned WW   = $clog2(MAX_W + 1),
  localparam int unsigned HW   = $clog2(MAX_H + 1),
  localparam int unsigned PW   = $clog2(MAX_W * MAX_H + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_we,
  input  logic [7:0]          cfg_addr,
  input  logic [31:0]         cfg_wdata,
  input  logic                out_fire,
  output logic                start,
  output logic                busy,
  output logic                done,
  output logic [WW-1:0]       img_w,
  output logic [HW-1:0]       img_h,
  output morph_mode_t         mode,
  output logic [N-1:0][N-1:0] se,
  output logic                pu2_en,
  output logic                buf_en,
  output logic                sub_en
);

  logic [PW-1:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      img_w     <= WW'(MAX_W);
      img_h     <= HW'(MAX_H);
      mode      <= '0;
      se        <= '1;
      start     <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
      remaining <= '0;
    end else begin
      start <= 1'b0;
      done  <= 1'b0;
      if (busy) begin
        if (out_fire) begin
          remaining <= remaining - PW'(1);
          if (remaining == PW'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end else if (cfg_we) begin
        if (cfg_addr == REG_CTRL && cfg_wdata[0]) begin
          start     <= 1'b1;
          busy      <= 1'b1;
          remaining <= PW'(img_w) * PW'(img_h);
        end else if (cfg_addr == REG_WIDTH) begin
          img_w <= WW'(cfg_wdata);
        end else if (cfg_addr == REG_HEIGHT) begin
          img_h <= HW'(cfg_wdata);
        end else if (cfg_addr == REG_MODE) begin
          mode <= morph_mode_t'(cfg_wdata[$bits(morph_mode_t)-1:0]);
        end else begin
          for (int i = 0; i < N; i++)
            if (cfg_addr == REG_SE0 + 8'(i)) se[i] <= cfg_wdata[N-1:0];
        end
      end
    end
  end

  // process unit #2 runs for opening/closing, and for a subtraction when
  // the mode routes through it; the raw buffer and the subtracter only for
  // a subtraction
  assign pu2_en = (mode.out_sel == SEL_PU2) || (mode.out_sel == SEL_SUB && mode.pu2_en);
  assign sub_en = mode.out_sel == SEL_SUB;
  assign buf_en = sub_en;

endmodule
