// morph_step_chain: step-shaped comparator chain of a process unit.
//
// Combines the N row results of the cascade comparator chains into the
// result of the whole N x N window.  Row results arrive together; the chain
// is N-1 comparators in series with a pipeline register after each, so row j
// (j >= 2) is met by comparator j-1, j-1 cycles later; a staircase of j-1
// registers ("step" shape) on input j brings it there at the right time.
// In front of each input sits the "use" MUX from the document: a row whose
// structure-element string is all zeros is replaced by the neutral extreme
// value (0 for max, all ones for min), so the comparator behind it simply
// passes its other input.
//
// Interface: din[j] / use_row[j] belong to cascade chain j and are sampled
// together.  Timing: dout is registered and appears N-1 advancing cycles
// after din (the third term of the document's latency formula).  All
// registers hold while `en` is low.  The staircase layout is this design's
// reading of "step-shaped"; the document gives no drawing detail beyond it.
module morph_step_chain #(
  parameter int unsigned N  = 7,
  parameter int unsigned DW = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               is_max,
  input  logic [N-1:0]       use_row,
  input  logic [N-1:0][DW-1:0] din,
  output logic [DW-1:0]      dout
);

  localparam int unsigned NC = N - 1;

  logic [DW-1:0] neutral;
  logic [DW-1:0] masked [N];
  // stair[j][s]: input j delayed by s+1 cycles
  logic [DW-1:0] stair [N][N];
  logic [DW-1:0] acc   [NC];   // registered comparator outputs
  logic [DW-1:0] opa   [NC];
  logic [DW-1:0] opb   [NC];

  assign neutral = is_max ? '0 : '1;

  always_comb begin
    for (int j = 0; j < N; j++) masked[j] = use_row[j] ? din[j] : neutral;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++)
        for (int s = 0; s < N; s++) stair[j][s] <= '0;
    end else if (en) begin
      for (int j = 2; j < N; j++) begin
        stair[j][0] <= masked[j];
        for (int s = 1; s < j - 1; s++) stair[j][s] <= stair[j][s-1];
      end
    end
  end

  always_comb begin
    for (int k = 0; k < NC; k++) begin
      if (k == 0) begin
        opa[k] = masked[0];
        opb[k] = masked[1];
      end else begin
        opa[k] = acc[k-1];
        opb[k] = stair[k+1][k-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NC; k++) acc[k] <= '0;
    end else if (en) begin
      for (int k = 0; k < NC; k++) begin
        if (is_max) acc[k] <= (opa[k] > opb[k]) ? opa[k] : opb[k];
        else        acc[k] <= (opa[k] < opb[k]) ? opa[k] : opb[k];
      end
    end
  end

  assign dout = acc[NC-1];

endmodule
