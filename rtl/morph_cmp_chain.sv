// morph_cmp_chain: configurable cascade comparator chain.
//
// Computes, for a stream of pixels, the maximum (dilation) or minimum
// (erosion) over those pixels of an N-pixel sliding window that are marked
// '1' in an N-bit structure-element row string (MSB = oldest, left-most
// pixel of the window).
//
// Structure (as in the document's cascade chain): N-1 comparators in series.
// Two links run through the chain.  The bottom link carries raw pixels and
// advances one stage per cycle (one pipeline register per stage).  The top
// link carries the partial result; it passes a pipeline register and, when
// its MUX A selects the delayed path, one more register R, so it advances one
// stage per two cycles and therefore meets a new pixel at every comparator.
// Each comparator has a MUX B: when set it compares top and bottom inputs,
// when clear it passes the top input through.  Configuration rules, from
// the document:
//   M = number of leading '0's of the string (from the MSB);
//   the first M MUX A select the straight path, the rest the delayed path;
//   comparator k (k = 1 .. N-1, counted from the input) has MUX B = bit N-1-k.
//
// This design's own choice: the string given with each pixel (row_cfg)
// rides a delay line, and comparator k uses the copy delayed by 2k-1 cycles,
// which is the string of the window it is working on.  The string can
// therefore change between image rows while older windows are still in the
// chain, and the latency is the same for every string.
//
// Timing: with `en` high every cycle, dout at cycle t is the result for the
// window x(t-2N+2) .. x(t-N+1), i.e. N-1 cycles after the window's newest
// pixel entered on din.  All registers hold while `en` is low.  If the string
// is all zeros dout is meaningless (the process unit masks that row).
module morph_cmp_chain #(
  parameter int unsigned N  = 7,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          is_max,
  input  logic [N-1:0]  row_cfg,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  localparam int unsigned NC = N - 1;        // comparators
  localparam int unsigned CD = 2 * N - 3;    // deepest configuration delay

  // configuration delay line: cfg_d[j] = row_cfg j cycles ago
  logic [N-1:0] cfg_d [CD+1];
  assign cfg_d[0] = row_cfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 1; j <= CD; j++) cfg_d[j] <= '0;
    end else if (en) begin
      for (int j = 1; j <= CD; j++) cfg_d[j] <= cfg_d[j-1];
    end
  end

  // number of leading zeros of a string
  function automatic int unsigned lead_zeros(input logic [N-1:0] s);
    int unsigned m;
    m = N;
    for (int i = 0; i < N; i++) begin
      if (s[i]) m = N - 1 - i;
    end
    return m;
  endfunction

  logic [DW-1:0] bot   [NC];   // B_k node
  logic [DW-1:0] top   [NC];   // T_k node
  logic [DW-1:0] cmp   [NC];   // comparator outputs
  logic [DW-1:0] preg_b[NC];   // pipeline register, bottom link
  logic [DW-1:0] preg_c[NC];   // pipeline register, comparator output
  logic [DW-1:0] rdel  [NC];   // delay register R on the top link
  logic [DW-1:0] r_in;         // R in front of the first comparator
  logic [NC-1:0] mux_a;        // 1 = straight path
  logic [NC-1:0] mux_b;        // 1 = compare, 0 = pass top input

  always_comb begin
    for (int k = 0; k < NC; k++) begin
      // comparator k+1 works on the window whose string is 2k+1 cycles old
      mux_a[k] = (k + 1) <= lead_zeros(cfg_d[2*k+1]);
      mux_b[k] = cfg_d[2*k+1][N-2-k];
    end
  end

  always_comb begin
    for (int k = 0; k < NC; k++) begin
      if (k == 0) begin
        bot[k] = din;
        top[k] = mux_a[k] ? din : r_in;
      end else begin
        bot[k] = preg_b[k-1];
        top[k] = mux_a[k] ? preg_c[k-1] : rdel[k-1];
      end
      if (mux_b[k]) begin
        if (is_max) cmp[k] = (top[k] > bot[k]) ? top[k] : bot[k];
        else        cmp[k] = (top[k] < bot[k]) ? top[k] : bot[k];
      end else begin
        cmp[k] = top[k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_in <= '0;
      dout <= '0;
      for (int k = 0; k < NC; k++) begin
        preg_b[k] <= '0;
        preg_c[k] <= '0;
        rdel[k]   <= '0;
      end
    end else if (en) begin
      r_in <= din;
      for (int k = 0; k < NC; k++) begin
        preg_b[k] <= bot[k];
        preg_c[k] <= cmp[k];
        rdel[k]   <= preg_c[k];
      end
      dout <= cmp[NC-1];
    end
  end

endmodule
