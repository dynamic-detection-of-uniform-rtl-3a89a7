// uavec_sm: one SIMT multiprocessor whose vector register file is tagged
// with uniform / affine / generic-vector information, detected dynamically.
//
// How it works. Every register has a 2-bit tag (tag_array). At kernel launch
// all tags are cleared to V and register r0 of each warp, which holds the
// thread index, is written as the affine vector base = warp*LANES, stride = 1
// and tagged A. A broadcast from constant/shared memory produces a U result.
// Every other instruction derives its result tag from its operand tags
// (tag_rules). Registers are stored compressed: a U register occupies lane 0,
// an A register lanes 0 (base) and 1 (stride), a V register all lanes, and
// only those lanes are read or written (vector_regfile). When the result tag
// is U or A the operation is done on base/stride by scalar_unit in one cycle
// with one or two SPs clocked; otherwise affine_expand rebuilds the full
// operands and simd_alu computes all lanes in two cycles. An affine result
// whose lanes would overflow is re-issued on the SIMD path and tagged V. A
// predicated write with an incomplete mask is always V; if its destination
// was stored compressed the old value is read, expanded and merged so the
// untouched lanes keep their value.
//
// Instruction sequence (one instruction in flight, register-file cycles):
//   SCHED  round-robin warp choice (warp_scheduler), fetch at the warp's PC
//   DEC    decode; read tag of src1
//   RD1    read src1 lanes chosen by its tag; read tag of src2
//   RD2    read src2 lanes (or take the broadcast word); read tag of dst;
//          compute the result tag
//   RD3    only for a partial write over a U/A destination: read old dst
//   EXS    scalar path, 1 cycle          | EXV  SIMD path, 2 cycles
//   WB     write result lanes and result tag
// Operand reads follow each other and the tag of each operand is read one
// cycle before its lanes, as in the mechanism. Running one instruction at a
// time, rather than overlapping warps in a pipeline, is a simplification of
// this design; so are the instruction format (uavec_pkg), the instruction
// memory loaded by the host, the per-warp active mask set by an instruction
// in place of predicate registers, and the fixed register window
// warp*rpw + r chosen at launch.
//
// Interface: the host loads the program through imem_*, then pulses launch
// with the number of warps and registers per warp; busy stays high until all
// warps have executed EXIT, then done is set. Each register write is shown on
// wb_* with the expanded value of the lanes it defines (wb_lanes).
// sp_clk_en is the per-SP clock enable: one SP for a uniform, two for an
// affine scalar operation, all for a SIMD operation. stats counts activity.
module uavec_sm
  import uavec_pkg::*;
#(
  parameter int LANES      = 32,
  parameter int XLEN       = 32,
  parameter int NUM_REGS   = 512,
  parameter int NUM_WARPS  = 24,
  parameter int NUM_SP     = 8,
  parameter int IMEM_DEPTH = 64,
  parameter int TID_REG    = 0,
  localparam int AW  = $clog2(NUM_REGS),
  localparam int WW  = (NUM_WARPS > 1) ? $clog2(NUM_WARPS) : 1,
  localparam int PW  = $clog2(IMEM_DEPTH)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // program load
  input  logic                       imem_we,
  input  logic [PW-1:0]              imem_addr,
  input  inst_t                      imem_wdata,
  // kernel launch
  input  logic                       launch,
  input  logic [WW:0]                launch_nwarps,
  input  logic [REG_W-1:0]           launch_rpw,
  output logic                       busy,
  output logic                       done,
  // write-back monitor
  output logic                       wb_valid,
  output logic [WW-1:0]              wb_warp,
  output logic [REG_W-1:0]           wb_reg,
  output tag_t                       wb_tag,
  output logic [LANES-1:0]           wb_lanes,
  output logic [LANES-1:0][XLEN-1:0] wb_data,
  // power management and activity
  output logic [NUM_SP-1:0]          sp_clk_en,
  output stats_t                     stats
);

  typedef enum logic [3:0] {
    S_IDLE, S_LAUNCH, S_SCHED, S_DEC, S_RD1, S_RD2, S_RD3, S_EXS, S_EXV, S_WB
  } state_t;

  typedef logic [LANES-1:0][XLEN-1:0] vec_t;

  state_t state;

  // ---------------------------------------------------------------- program
  inst_t imem [IMEM_DEPTH];
  always_ff @(posedge clk) if (imem_we) imem[imem_addr] <= imem_wdata;

  // ------------------------------------------------------------- warp state
  logic [PW-1:0]    pc     [NUM_WARPS];
  logic [LANES-1:0] wmask  [NUM_WARPS];
  logic [NUM_WARPS-1:0] wactive;
  logic [WW:0]      nwarps_q;
  logic [REG_W-1:0] rpw_q;
  logic [WW-1:0]    lw;          // warp being initialised at launch

  logic          grant_valid;
  logic [WW-1:0] grant_id;
  logic          sched_take;

  warp_scheduler #(.NUM_WARPS(NUM_WARPS)) u_sched (
    .clk, .rst_n, .ready(wactive), .take(sched_take),
    .grant_valid, .grant_id
  );

  // ------------------------------------------------------ instruction state
  inst_t         ir;
  logic [WW-1:0] cw;             // current warp
  logic [AW-1:0] rbase;          // first physical register of the warp
  tag_t          ta_q, tb_q, td_q, tr_q;
  vec_t          a_raw, b_raw, d_raw;
  logic [XLEN-1:0] res_base, res_stride;
  logic          partial_q;
  logic [LANES-1:0] mask_q;

  function automatic logic [AW-1:0] phys(input logic [AW-1:0] base, input logic [REG_W-1:0] r);
    return base + AW'(r);
  endfunction

  function automatic logic [LANES-1:0] lanes_of(input tag_t t);
    unique case (t)
      TAG_U:   return LANES'(1);
      TAG_A:   return LANES'(3);
      default: return '1;
    endcase
  endfunction

  // -------------------------------------------------------------- tag array
  logic          tag_clear;
  logic [AW-1:0] tag_rd_addr;
  tag_t          tag_rd;
  logic          tag_we;
  logic [AW-1:0] tag_wr_addr;
  tag_t          tag_wr;

  tag_array #(.NUM_REGS(NUM_REGS)) u_tags (
    .clk, .rst_n, .clear(tag_clear), .rd_addr(tag_rd_addr), .rd_tag(tag_rd),
    .wr_en(tag_we), .wr_addr(tag_wr_addr), .wr_tag(tag_wr)
  );

  // ---------------------------------------------------------- register file
  logic [AW-1:0]    rf_rd_addr;
  logic [LANES-1:0] rf_rd_en;
  vec_t             rf_rd_data;
  logic [AW-1:0]    rf_wr_addr;
  logic [LANES-1:0] rf_wr_en;
  vec_t             rf_wr_data;

  vector_regfile #(.NUM_REGS(NUM_REGS), .LANES(LANES), .XLEN(XLEN)) u_rf (
    .clk, .rd_addr(rf_rd_addr), .rd_lane_en(rf_rd_en), .rd_data(rf_rd_data),
    .wr_addr(rf_wr_addr), .wr_lane_en(rf_wr_en), .wr_data(rf_wr_data)
  );

  // ------------------------------------------------------------- tag rules
  logic partial_now;
  tag_t tr_now;
  logic scalar_ok;

  assign partial_now = ir.pred && (wmask[cw] != '1);

  tag_rules u_rules (
    .op(ir.op), .ta(ta_q), .tb(tb_q), .partial(partial_now),
    .tr(tr_now), .scalar_ok
  );

  // ----------------------------------------------------------- scalar path
  logic [XLEN-1:0] s_base, s_stride;
  logic            s_ovf;

  scalar_unit #(.LANES(LANES), .XLEN(XLEN)) u_scalar (
    .op(ir.op), .ta(ta_q), .tb(tb_q), .tr(tr_q),
    .a_base(a_raw[0]), .a_stride(a_raw[1]), .b_base(b_raw[0]), .b_stride(b_raw[1]),
    .r_base(s_base), .r_stride(s_stride), .ovf(s_ovf)
  );

  // ------------------------------------------------------------- SIMD path
  vec_t a_vec, b_vec, d_vec, v_res, r_vec;
  logic v_start, v_busy, v_last, v_done;
  logic exv_first;

  affine_expand #(.LANES(LANES), .XLEN(XLEN)) u_exp_a (.tag(ta_q), .raw(a_raw), .vec(a_vec));
  affine_expand #(.LANES(LANES), .XLEN(XLEN)) u_exp_b (.tag(tb_q), .raw(b_raw), .vec(b_vec));
  affine_expand #(.LANES(LANES), .XLEN(XLEN)) u_exp_d (.tag(td_q), .raw(d_raw), .vec(d_vec));

  assign v_start = (state == S_EXV) && exv_first;

  simd_alu #(.LANES(LANES), .XLEN(XLEN), .NUM_SP(NUM_SP)) u_simd (
    .clk, .rst_n, .start(v_start), .op(ir.op), .pred(ir.pred), .mask(mask_q),
    .a(a_vec), .b(b_vec), .old(d_vec),
    .busy(v_busy), .last(v_last), .done(v_done), .result(v_res)
  );

  // expanded view of a compressed result, for the write-back monitor
  vec_t res_raw;
  always_comb begin
    res_raw    = '0;
    res_raw[0] = res_base;
    res_raw[1] = res_stride;
  end
  affine_expand #(.LANES(LANES), .XLEN(XLEN)) u_exp_r (.tag(tr_q), .raw(res_raw), .vec(r_vec));

  // ------------------------------------------------------ combinational ports
  logic [LANES-1:0] wb_en_now;
  always_comb begin
    tag_clear   = 1'b0;
    tag_rd_addr = '0;
    tag_we      = 1'b0;
    tag_wr_addr = '0;
    tag_wr      = TAG_V;
    rf_rd_addr  = '0;
    rf_rd_en    = '0;
    rf_wr_addr  = '0;
    rf_wr_en    = '0;
    rf_wr_data  = '0;
    sched_take  = 1'b0;
    sp_clk_en   = '0;
    wb_en_now   = '0;

    unique case (state)
      S_IDLE:  tag_clear = launch;
      S_LAUNCH: begin
        rf_wr_addr    = AW'(lw) * AW'(rpw_q) + AW'(TID_REG);
        rf_wr_en      = LANES'(3);
        rf_wr_data[0] = XLEN'(lw) * XLEN'(LANES);
        rf_wr_data[1] = XLEN'(1);
        tag_we        = 1'b1;
        tag_wr_addr   = rf_wr_addr;
        tag_wr        = TAG_A;
      end
      S_SCHED: sched_take = 1'b1;
      S_DEC:   tag_rd_addr = phys(rbase, ir.src1);
      S_RD1: begin
        rf_rd_addr  = phys(rbase, ir.src1);
        rf_rd_en    = (ir.op == OP_BCAST) ? '0 : lanes_of(ta_q);
        tag_rd_addr = phys(rbase, ir.src2);
      end
      S_RD2: begin
        rf_rd_addr  = phys(rbase, ir.src2);
        rf_rd_en    = (ir.src2_imm || ir.op == OP_BCAST || ir.op == OP_MOV) ? '0 : lanes_of(tb_q);
        tag_rd_addr = phys(rbase, ir.dst);
      end
      S_RD3: begin
        rf_rd_addr = phys(rbase, ir.dst);
        rf_rd_en   = lanes_of(td_q);
      end
      S_EXS:   sp_clk_en = (tr_q == TAG_A) ? NUM_SP'(3) : NUM_SP'(1);
      S_EXV:   sp_clk_en = '1;
      S_WB: begin
        rf_wr_addr = phys(rbase, ir.dst);
        if (tr_q == TAG_V) begin
          // a partial write over a V destination touches only its lanes;
          // over a U/A destination the merged full vector is written
          wb_en_now  = (partial_q && td_q == TAG_V) ? mask_q : '1;
          rf_wr_data = v_res;
        end else begin
          wb_en_now     = lanes_of(tr_q);
          rf_wr_data[0] = res_base;
          rf_wr_data[1] = res_stride;
        end
        rf_wr_en    = wb_en_now;
        tag_we      = 1'b1;
        tag_wr_addr = rf_wr_addr;
        tag_wr      = tr_q;
      end
      default: ;
    endcase
  end

  // --------------------------------------------------------- sequencing FSM
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      wactive   <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      nwarps_q  <= '0;
      rpw_q     <= '0;
      lw        <= '0;
      cw        <= '0;
      rbase     <= '0;
      ir        <= '0;
      ta_q      <= TAG_V;
      tb_q      <= TAG_V;
      td_q      <= TAG_V;
      tr_q      <= TAG_V;
      a_raw     <= '0;
      b_raw     <= '0;
      d_raw     <= '0;
      res_base  <= '0;
      res_stride <= '0;
      partial_q <= 1'b0;
      mask_q    <= '0;
      exv_first <= 1'b0;
      stats     <= '0;
      for (int w = 0; w < NUM_WARPS; w++) begin
        pc[w]    <= '0;
        wmask[w] <= '1;
      end
    end else begin
      exv_first <= 1'b0;
      unique case (state)
        S_IDLE: if (launch) begin
          nwarps_q <= launch_nwarps;
          rpw_q    <= launch_rpw;
          lw       <= '0;
          busy     <= 1'b1;
          done     <= 1'b0;
          stats    <= '0;
          for (int w = 0; w < NUM_WARPS; w++) begin
            pc[w]      <= '0;
            wmask[w]   <= '1;
            wactive[w] <= (w < int'(launch_nwarps));
          end
          state <= (launch_nwarps == '0) ? S_SCHED : S_LAUNCH;
        end

        S_LAUNCH: begin
          lw <= lw + 1'b1;
          if ((WW+1)'(lw) + 1'b1 >= nwarps_q) state <= S_SCHED;
        end

        S_SCHED: begin
          if (grant_valid) begin
            cw            <= grant_id;
            rbase         <= AW'(grant_id) * AW'(rpw_q);
            ir            <= imem[pc[grant_id]];
            pc[grant_id]  <= pc[grant_id] + 1'b1;
            state         <= S_DEC;
          end else begin
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end

        S_DEC: begin
          unique case (ir.op)
            OP_EXIT: begin
              wactive[cw] <= 1'b0;
              state       <= S_SCHED;
            end
            OP_SETMASK: begin
              wmask[cw] <= ir.imm[LANES-1:0];
              state     <= S_SCHED;
            end
            OP_ADD, OP_MUL, OP_SHL, OP_MOV, OP_BCAST: begin
              ta_q  <= (ir.op == OP_BCAST) ? TAG_U : tag_rd;
              state <= S_RD1;
            end
            default: state <= S_SCHED;   // NOP and unused codes
          endcase
        end

        S_RD1: begin
          a_raw <= rf_rd_data;
          tb_q  <= (ir.src2_imm || ir.op == OP_BCAST || ir.op == OP_MOV) ? TAG_U : tag_rd;
          if (ir.op != OP_BCAST) begin
            stats.lane_reads <= stats.lane_reads + 32'($countones(rf_rd_en));
            unique case (ta_q)
              TAG_U:   stats.rd_u <= stats.rd_u + 1;
              TAG_A:   stats.rd_a <= stats.rd_a + 1;
              default: stats.rd_v <= stats.rd_v + 1;
            endcase
          end
          state <= S_RD2;
        end

        S_RD2: begin
          b_raw <= rf_rd_data;
          if (ir.src2_imm || ir.op == OP_BCAST) b_raw[0] <= ir.imm;
          td_q      <= tag_rd;
          tr_q      <= tr_now;
          partial_q <= partial_now;
          mask_q    <= ir.pred ? wmask[cw] : '1;
              if (!(ir.src2_imm || ir.op == OP_BCAST || ir.op == OP_MOV)) begin
            stats.lane_reads <= stats.lane_reads + 32'($countones(rf_rd_en));
            unique case (tb_q)
              TAG_U:   stats.rd_u <= stats.rd_u + 1;
              TAG_A:   stats.rd_a <= stats.rd_a + 1;
              default: stats.rd_v <= stats.rd_v + 1;
            endcase
          end
          if (ir.pred && wmask[cw] == '0) begin
            // no lane enabled: nothing is written, the tag is left alone
            stats.instrs <= stats.instrs + 1;
            state        <= S_SCHED;
          end else if (scalar_ok) begin
            state <= S_EXS;
          end else if (partial_now && tag_rd != TAG_V) begin
            state <= S_RD3;
          end else begin
            state     <= S_EXV;
            exv_first <= 1'b1;
          end
        end

        S_RD3: begin
          d_raw            <= rf_rd_data;
          stats.lane_reads <= stats.lane_reads + 32'($countones(rf_rd_en));
          state            <= S_EXV;
          exv_first        <= 1'b1;
        end

        S_EXS: begin
          if (s_ovf) begin
            // lanes would overflow: re-issue on the SIMD path as a vector op
            tr_q           <= TAG_V;
            stats.reissues <= stats.reissues + 1;
            state          <= S_EXV;
            exv_first      <= 1'b1;
          end else begin
            res_base         <= s_base;
            res_stride       <= s_stride;
            stats.scalar_ops <= stats.scalar_ops + 1;
            state            <= S_WB;
          end
        end

        S_EXV: begin
          if (exv_first) begin
            stats.vector_ops  <= stats.vector_ops + 1;
            stats.conversions <= stats.conversions
                               + 32'(ta_q == TAG_A && ir.op != OP_BCAST)
                               + 32'(tb_q == TAG_A)
                               + 32'(partial_q && td_q == TAG_A);
          end
          if (v_last) state <= S_WB;
        end

        S_WB: begin
          stats.instrs      <= stats.instrs + 1;
          stats.lane_writes <= stats.lane_writes + 32'($countones(wb_en_now));
          if (partial_q) stats.partial_writes <= stats.partial_writes + 1;
          unique case (tr_q)
            TAG_U:   stats.wr_u <= stats.wr_u + 1;
            TAG_A:   stats.wr_a <= stats.wr_a + 1;
            default: stats.wr_v <= stats.wr_v + 1;
          endcase
          state <= S_SCHED;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------- write-back monitor
  assign wb_valid = (state == S_WB);
  assign wb_warp  = cw;
  assign wb_reg   = ir.dst;
  assign wb_tag   = tr_q;
  assign wb_lanes = (tr_q == TAG_V) ? wb_en_now : '1;
  assign wb_data  = (tr_q == TAG_V) ? v_res : r_vec;

  // ------------------------------------------------------------- assertions
  // the scalar path only ever handles uniform/affine results
  a_exs_tag: assert property (@(posedge clk) disable iff (!rst_n)
                              state == S_EXS |-> tr_q != TAG_V);
  // the SIMD unit is working in every SIMD execution cycle
  a_exv_busy: assert property (@(posedge clk) disable iff (!rst_n)
                               state == S_EXV |-> v_busy);
  // the SIMD result is written only once the unit has finished
  a_wb_simd: assert property (@(posedge clk) disable iff (!rst_n)
                              (state == S_WB && tr_q == TAG_V) |-> v_done);
  // a write-back never produces a compressed result for a partial write
  a_partial: assert property (@(posedge clk) disable iff (!rst_n)
                              (state == S_WB && partial_q) |-> tr_q == TAG_V);

endmodule
