// Combinational datapath of one functional unit for each of the six functions
// a unit can take: 64-bit integer add/subtract, 64x64 multiply (low 64 bits of
// the product), 64-bit unsigned divide (quotient or remainder), and IEEE 754
// double add/subtract, multiply and divide.
// The document names these functions but not their datapaths or operation
// sets; the operation set here (subop bit: subtract or remainder) and the
// divide-by-zero result (all-ones quotient, remainder = dividend) are this
// design's choices. Timing is added around it by fu_exec_pipe.
module fn_exec
  import rfu_pkg::*;
(
  input  fn_e   fn,
  input  logic  subop,
  input  word_t a,
  input  word_t b,
  output word_t y
);
  word_t fadd_y, fmul_y, fdiv_y;

  fp_add64 u_fadd (.a(a), .b(b), .sub(subop), .y(fadd_y));
  fp_mul64 u_fmul (.a(a), .b(b), .y(fmul_y));
  fp_div64 u_fdiv (.a(a), .b(b), .y(fdiv_y));

  always_comb begin
    case (fn)
      FN_INT_ADD: y = subop ? (a - b) : (a + b);
      FN_FP_ADD:  y = fadd_y;
      FN_FP_MUL:  y = fmul_y;
      FN_INT_MUL: y = a * b;
      FN_INT_DIV: begin
        if (b == '0) y = subop ? a : '1;
        else         y = subop ? (a % b) : (a / b);
      end
      default:    y = fdiv_y;   // FN_FP_DIV
    endcase
  end
endmodule
