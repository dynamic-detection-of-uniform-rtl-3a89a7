// uavec_pkg: types shared by the tagged-register-file SIMT core.
//
// Every vector register carries a 2-bit tag saying how its 32 lanes relate:
//   TAG_V  generic vector, all lanes stored
//   TAG_U  uniform, every lane holds the same value x (only lane 0 is stored)
//   TAG_A  affine, lane i holds x + i*y with y a power of two (lane 0 = x,
//          lane 1 = y are stored)
// The encoding puts TAG_V at zero so that a cleared tag is the conservative
// "generic vector" state; the unused code 2'b11 is read as TAG_V everywhere.
//
// The instruction word is this design's own: the ISA of the GPU family the
// mechanism targets is not public, so only the operations whose tag rules are
// defined (add, multiply, shift left, move, broadcast) plus mask setting and
// warp exit are provided.
package uavec_pkg;

  typedef enum logic [1:0] {
    TAG_V = 2'd0,
    TAG_U = 2'd1,
    TAG_A = 2'd2
  } tag_t;

  typedef enum logic [3:0] {
    OP_NOP     = 4'd0,
    OP_ADD     = 4'd1,   // d = a + b
    OP_MUL     = 4'd2,   // d = a * b (low 32 bits)
    OP_SHL     = 4'd3,   // d = a << b[4:0]
    OP_MOV     = 4'd4,   // d = a
    OP_BCAST   = 4'd5,   // d = imm broadcast to all lanes (constant/shared word)
    OP_SETMASK = 4'd6,   // warp active mask = imm (models divergence state)
    OP_EXIT    = 4'd7    // warp finished
  } op_t;

  localparam int REG_W = 8;   // register number field of the instruction

  typedef struct packed {
    op_t              op;
    logic             pred;      // write only lanes set in the warp's mask
    logic [REG_W-1:0] dst;
    logic [REG_W-1:0] src1;
    logic [REG_W-1:0] src2;
    logic             src2_imm;  // second operand is the broadcast word imm
    logic [31:0]      imm;
  } inst_t;

  // Activity counters of one kernel run.
  typedef struct packed {
    logic [31:0] instrs;          // instructions that reached write-back or were squashed
    logic [31:0] scalar_ops;      // executed on one or two SPs
    logic [31:0] vector_ops;      // executed on the full SIMD width
    logic [31:0] reissues;        // affine overflow, re-issued as vector
    logic [31:0] conversions;     // affine operands expanded for a vector op
    logic [31:0] partial_writes;  // predicated writes with an incomplete mask
    logic [31:0] rd_u;            // register operand reads by tag
    logic [31:0] rd_a;
    logic [31:0] rd_v;
    logic [31:0] wr_u;            // register writes by result tag
    logic [31:0] wr_a;
    logic [31:0] wr_v;
    logic [31:0] lane_reads;      // register-file lanes read
    logic [31:0] lane_writes;     // register-file lanes written
  } stats_t;

  function automatic tag_t norm_tag(input logic [1:0] t);
    return (t == 2'd1) ? TAG_U : (t == 2'd2) ? TAG_A : TAG_V;
  endfunction

endpackage
