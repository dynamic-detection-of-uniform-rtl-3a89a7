// simd_alu: the vector (SIMD) execution path.
//
// NUM_SP scalar processors run at twice the register-file clock, so each
// register-file cycle they produce 2*NUM_SP lanes; a LANES-wide warp therefore
// takes LANES/(2*NUM_SP) cycles (two cycles for 32 lanes on 8 SPs). The two
// fast-clock phases are modelled as 2*NUM_SP lane operations per cycle.
//
// Timing: `start` is a one-cycle pulse; the operands a, b, old, op, pred and
// mask must stay stable until the result is taken. Lane group g is computed
// in the g-th cycle after (and including) start, `last` is high during the
// final group, and `done` pulses the cycle after, when `result` holds the
// whole vector. With pred set, lanes whose mask bit is clear keep the value
// of `old` (the previous destination), which is how a predicated instruction
// leaves part of its destination unchanged.
// Operations as in scalar_unit: add, mul (low half), shl by b[4:0], mov, bcast.
module simd_alu
  import uavec_pkg::*;
#(
  parameter int LANES  = 32,
  parameter int XLEN   = 32,
  parameter int NUM_SP = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  op_t                        op,
  input  logic                       pred,
  input  logic [LANES-1:0]           mask,
  input  logic [LANES-1:0][XLEN-1:0] a,
  input  logic [LANES-1:0][XLEN-1:0] b,
  input  logic [LANES-1:0][XLEN-1:0] old,
  output logic                       busy,
  output logic                       last,
  output logic                       done,
  output logic [LANES-1:0][XLEN-1:0] result
);

  localparam int LPC  = 2 * NUM_SP;          // lanes per register-file cycle
  localparam int NCYC = LANES / LPC;
  localparam int CW   = (NCYC > 1) ? $clog2(NCYC) : 1;

  logic          run;
  logic [CW-1:0] grp;
  logic          active;
  logic [CW-1:0] cur;

  assign active = start || run;
  assign cur    = start ? '0 : grp;
  assign last   = active && (cur == CW'(NCYC - 1));
  assign busy   = active;

  function automatic logic [XLEN-1:0] lane_op(input op_t o, input logic [XLEN-1:0] x,
                                              input logic [XLEN-1:0] y);
    unique case (o)
      OP_ADD:   return x + y;
      OP_MUL:   return x * y;
      OP_SHL:   return x << y[4:0];
      OP_MOV:   return x;
      OP_BCAST: return y;
      default:  return '0;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run  <= 1'b0;
      grp  <= '0;
      done <= 1'b0;
    end else begin
      done <= last;
      if (active) begin
        for (int j = 0; j < LPC; j++) begin
          automatic int l = int'(cur) * LPC + j;
          result[l] <= (pred && !mask[l]) ? old[l] : lane_op(op, a[l], b[l]);
        end
        run <= !last;
        grp <= last ? '0 : cur + 1'b1;
      end
    end
  end

  initial assert (LANES % LPC == 0) else $error("LANES must be a multiple of 2*NUM_SP");

endmodule
