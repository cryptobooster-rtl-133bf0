// Multiplication modulo 2^16+1 spread over two pipeline stages.
//
// Operands use the IDEA convention that the all-zero word stands for 2^16.
// The first stage forms the full 16x16 bit-parallel product and the two zero
// flags; these are registered. The second stage, combinational after the
// register, applies the low-high reduction:
//   a*b mod (2^16+1) = lo - hi            if lo >= hi
//                    = lo - hi + 2^16 + 1 otherwise
// and handles the operands equal to 2^16 separately (2^16*b = 1-b).
// Timing: a and b are sampled at the clock edge; y belongs to the operands of
// the previous cycle. There is no enable: the pipeline it sits in never
// stalls. The bit-parallel multiplier, the low-high reduction and the split
// over two stages follow the described design; where exactly the register is
// placed (after the product) is this implementation's choice.
module idea_mulmod
  import cb_pkg::*;
(
  input  logic  clk,
  input  word_t a,
  input  word_t b,
  output word_t y
);

  typedef struct packed {
    logic [31:0] prod;
    logic        a_zero;
    logic        b_zero;
    word_t       a;
    word_t       b;
  } mul_stage_t;

  mul_stage_t s_d, s_q;

  always_comb begin
    s_d.prod   = 32'(a) * 32'(b);
    s_d.a_zero = (a == 16'h0);
    s_d.b_zero = (b == 16'h0);
    s_d.a      = a;
    s_d.b      = b;
  end

  always_ff @(posedge clk) s_q <= s_d;

  logic [15:0] lo, hi;
  always_comb begin
    lo = s_q.prod[15:0];
    hi = s_q.prod[31:16];
    if (s_q.a_zero)      y = word_t'(17'h1 - {1'b0, s_q.b});
    else if (s_q.b_zero) y = word_t'(17'h1 - {1'b0, s_q.a});
    else                 y = lo - hi + ((lo < hi) ? 16'h1 : 16'h0);
  end

endmodule
