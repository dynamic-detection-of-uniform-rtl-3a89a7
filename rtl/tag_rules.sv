// tag_rules: result-tag propagation of the tagged vector register file.
//
// Purely combinational. From the operation and the tags of the first (ta) and
// second (tb) operand it gives the tag of the result:
//   add : U+U=U, U+A=A, A+U=A, everything else V (A+A is V because the sum
//         of two power-of-two strides need not be a power of two)
//   mul : U*U=U, everything else V (affine x uniform is made V on purpose)
//   shl : U<<U=U, A<<U=A, everything else V
//   mov : the tag of the first operand
//   bcast (broadcast of a constant/shared-memory word): U
// These follow the propagation table of the mechanism exactly. A predicated
// write whose mask leaves some lanes untouched ("partial") cannot keep the
// uniform/affine property, so it always yields V. `scalar_ok` says that the
// result can be computed on base/stride by the scalar path.
module tag_rules
  import uavec_pkg::*;
(
  input  op_t  op,
  input  tag_t ta,
  input  tag_t tb,
  input  logic partial,
  output tag_t tr,
  output logic scalar_ok
);

  tag_t t;

  always_comb begin
    t = TAG_V;
    unique case (op)
      OP_ADD: begin
        if      (ta == TAG_U && tb == TAG_U) t = TAG_U;
        else if (ta == TAG_U && tb == TAG_A) t = TAG_A;
        else if (ta == TAG_A && tb == TAG_U) t = TAG_A;
      end
      OP_MUL:   if (ta == TAG_U && tb == TAG_U) t = TAG_U;
      OP_SHL: begin
        if      (ta == TAG_U && tb == TAG_U) t = TAG_U;
        else if (ta == TAG_A && tb == TAG_U) t = TAG_A;
      end
      OP_MOV:   t = norm_tag(ta);
      OP_BCAST: t = TAG_U;
      default:  t = TAG_V;
    endcase
    tr        = partial ? TAG_V : t;
    scalar_ok = (tr != TAG_V);
  end

endmodule
