// scalar_unit: computes a uniform or affine result from the base (x) and
// stride (y) of its operands instead of on all lanes.
//
// A uniform result takes one SP lane (the base), an affine result two (base
// and stride), each in a single cycle; the rest of the SIMD array can stay
// clock-gated. Operations, for a result tag `tr` given by tag_rules:
//   add : base = xa + xb, stride = the stride of the affine operand (0 if none)
//   mul : base = xa * xb (uniform only)
//   shl : base = xa << s, stride = ya << s, with s = xb[4:0]
//   mov : copies the first operand; bcast: base = xb (the broadcast word)
// Overflow (`ovf`): lane values of an affine result are exact only if the
// largest lane, x + (LANES-1)*y, still fits in XLEN bits as an unsigned
// number. Strides are non-negative powers of two, so the lanes increase and
// checking the last lane covers all of them. When the check fails the core
// re-issues the instruction on the SIMD path and tags the result V. Reading
// the lanes as unsigned is this design's choice; uniform results never
// overflow in this sense and are not checked. Combinational.
module scalar_unit
  import uavec_pkg::*;
#(
  parameter int LANES = 32,
  parameter int XLEN  = 32
) (
  input  op_t             op,
  input  tag_t            ta,
  input  tag_t            tb,
  input  tag_t            tr,
  input  logic [XLEN-1:0] a_base,
  input  logic [XLEN-1:0] a_stride,
  input  logic [XLEN-1:0] b_base,
  input  logic [XLEN-1:0] b_stride,
  output logic [XLEN-1:0] r_base,
  output logic [XLEN-1:0] r_stride,
  output logic            ovf
);

  localparam int LW = $clog2(LANES) + 2;   // headroom for x + (LANES-1)*y
  localparam int WW = XLEN + LW;

  logic [4:0]      sh;
  logic [XLEN-1:0] ya, yb;
  logic [WW-1:0]   last;        // exact value of the last lane before shifting
  logic [2*WW-1:0] last_sh;     // ... and after it

  assign sh = b_base[4:0];
  assign ya = (ta == TAG_A) ? a_stride : '0;
  assign yb = (tb == TAG_A) ? b_stride : '0;

  always_comb begin
    r_base   = '0;
    r_stride = '0;
    last     = '0;
    last_sh  = '0;
    ovf      = 1'b0;
    unique case (op)
      OP_ADD: begin
        r_base   = a_base + b_base;
        r_stride = ya | yb;              // at most one operand is affine
        last     = WW'(a_base) + WW'(b_base) + WW'(LANES - 1) * WW'(ya | yb);
        ovf      = (tr == TAG_A) && (last[WW-1:XLEN] != '0);
      end
      OP_MUL: begin
        r_base = a_base * b_base;
      end
      OP_SHL: begin
        r_base   = a_base << sh;
        r_stride = ya << sh;
        last     = WW'(a_base) + WW'(LANES - 1) * WW'(ya);
        last_sh  = (2*WW)'(last) << sh;
        ovf      = (tr == TAG_A) && ((last_sh >> XLEN) != '0);
      end
      OP_MOV: begin
        r_base   = a_base;
        r_stride = ya;
      end
      OP_BCAST: begin
        r_base = b_base;
      end
      default: ;
    endcase
  end

endmodule
