// peanut_alu: accumulator arithmetic and comparison.
//
// Combinational, two's complement 16-bit words. a is the accumulator,
// b the operand. result is what the accumulator receives:
//   load: b   add: a+b   sub: a-b   mul: low word of a*b
//   div: a/b truncated toward zero (a when b is 0)
// ov is signed overflow of add, sub, mul or div (-32768/-1); div_zero is
// set for a divide by 0. gt (a > b) and eq (a == b) are the outcome of a
// compare. The meaning of GT, EQ and OV and the existence of the
// overflow and divide-by-zero exceptions follow the document; signed
// arithmetic, the truncating divide and which operations exist beyond
// load, add and compare are this design's choices.
module peanut_alu
  import peanut_pkg::*;
(
  input  alu_op_t op,
  input  word_t   a,
  input  word_t   b,
  output word_t   result,
  output logic    gt,
  output logic    eq,
  output logic    ov,
  output logic    div_zero
);
  logic signed [WORD_W-1:0]   sa, sb, sum, diff, quot;
  logic signed [2*WORD_W-1:0] prod;

  always_comb begin
    sa   = signed'(a);
    sb   = signed'(b);
    sum  = sa + sb;
    diff = sa - sb;
    prod = sa * sb;
    quot = (sb == 0) ? sa : sa / sb;

    gt       = sa > sb;
    eq       = (a == b);
    ov       = 1'b0;
    div_zero = 1'b0;
    result   = b;
    unique case (op)
      ALU_ADD: begin
        result = word_t'(sum);
        ov     = (sa[WORD_W-1] == sb[WORD_W-1]) && (sum[WORD_W-1] != sa[WORD_W-1]);
      end
      ALU_SUB: begin
        result = word_t'(diff);
        ov     = (sa[WORD_W-1] != sb[WORD_W-1]) && (diff[WORD_W-1] != sa[WORD_W-1]);
      end
      ALU_MUL: begin
        result = word_t'(prod[WORD_W-1:0]);
        ov     = (prod[2*WORD_W-1:WORD_W-1] != {(WORD_W+1){1'b0}}) &&
                 (prod[2*WORD_W-1:WORD_W-1] != {(WORD_W+1){1'b1}});
      end
      ALU_DIV: begin
        result   = word_t'(quot);
        div_zero = (sb == 0);
        ov       = (sb == -1) && (a == {1'b1, {(WORD_W-1){1'b0}}});
      end
      ALU_COMP:  result = a;
      ALU_STORE: result = a;
      default:   result = b;   // load
    endcase
  end
endmodule
