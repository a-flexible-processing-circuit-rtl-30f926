// morph_fifo: synchronous first-word-fall-through FIFO, used as the input
// and the output FIFO of the morphological transform circuit.
//
// The input FIFO absorbs the pixels that keep arriving while process unit #1
// pauses at image borders; the output FIFO decouples the circuit from the
// reader.  The document sizes the input FIFO as (H-(N+1)/2)*(N-1) words and
// keeps the output FIFO the same depth; the default DEPTH is that number for
// 1080 rows and a 7x7 element.
//
// Both sides are valid/ready streams; a word moves when valid and ready are
// both high at a clock edge.  Storage is a memory with a synchronous read
// into an output register, so the first word appears on m_data two cycles
// after it was written, and one word per cycle flows when both sides are
// free.  s_ready does not depend on s_valid, m_valid not on m_ready.
// `count` is the number of words held (memory plus output register).
module morph_fifo #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 6456,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          s_valid,
  output logic          s_ready,
  input  logic [DW-1:0] s_data,
  output logic          m_valid,
  input  logic          m_ready,
  output logic [DW-1:0] m_data,
  output logic [CW-1:0] count
);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [CW-1:0] fill;          // words in the memory
  logic          push, pop;

  assign s_ready = fill < CW'(DEPTH);
  assign push    = s_valid && s_ready;
  assign pop     = (fill != '0) && (!m_valid || m_ready);
  assign count   = fill + CW'(m_valid);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= s_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr    <= '0;
      rptr    <= '0;
      fill    <= '0;
      m_valid <= 1'b0;
      m_data  <= '0;
    end else begin
      if (push) wptr <= inc(wptr);
      if (pop) begin
        rptr    <= inc(rptr);
        m_data  <= mem[rptr];
        m_valid <= 1'b1;
      end else if (m_ready) begin
        m_valid <= 1'b0;
      end
      fill <= fill + CW'(push) - CW'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) fill <= CW'(DEPTH));
  a_stable_out:  assert property (@(posedge clk) disable iff (!rst_n)
                                  m_valid && !m_ready |=> m_valid && $stable(m_data));

endmodule
