// tb_uavec_sm: end-to-end test of the tagged-register-file multiprocessor at
// its full default size (32 lanes, 512 registers, 24 warps, 8 SPs).
//
// A short SPMD kernel is loaded and launched twice: 24 warps x 16 registers,
// then 24 warps x 21 registers (504 of the 512 registers). The kernel builds
// memory addresses from the thread index, as GPU code does, and also makes
// every mechanism of the design happen: uniform and affine results on the
// scalar path, generic vectors on the SIMD path with affine operands
// expanded, affine overflow with re-issue, predicated partial writes over
// compressed and over generic destinations, a fully masked instruction, and
// round-robin interleaving of the warps.
//
// Twelve random kernels follow (random operations, immediates, masks and
// launch shapes), checked the same way.
//
// A reference model in this file runs the same kernel on full 32-lane vectors
// with its own copy of the tag rules. Every write-back is compared (tag, lanes
// written and their values), the activity counters are compared with the
// model's counts, the SP clock enables are compared with the scalar/SIMD
// split (one cycle for a scalar operation, two for a SIMD one) and the
// kernel's total cycle count is checked.
module tb_uavec_sm;
  import uavec_pkg::*;
  localparam int L = 32, NW = 24, WW = 5, PW = 6;

  logic clk = 0, rst_n = 0;
  logic imem_we = 0;
  logic [PW-1:0] imem_addr = '0;
  inst_t imem_wdata = '0;
  logic launch = 0;
  logic [WW:0] launch_nwarps = '0;
  logic [REG_W-1:0] launch_rpw = '0;
  logic busy, done;
  logic wb_valid;
  logic [WW-1:0] wb_warp;
  logic [REG_W-1:0] wb_reg;
  tag_t wb_tag;
  logic [L-1:0] wb_lanes;
  logic [L-1:0][31:0] wb_data;
  logic [7:0] sp_clk_en;
  stats_t stats;

  uavec_sm dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [%0d] %s", cyc, what);
    end
  endtask

  // ------------------------------------------------------------ the kernel
  function automatic inst_t mk(op_t op, bit pred, int d, int s1, int s2, bit im, logic [31:0] imm);
    inst_t i;
    i.op = op; i.pred = pred; i.dst = REG_W'(d); i.src1 = REG_W'(s1); i.src2 = REG_W'(s2);
    i.src2_imm = im; i.imm = imm;
    return i;
  endfunction

  localparam int PLEN = 22;
  inst_t prog [64];
  task automatic directed_kernel();
    prog[0]  = mk(OP_BCAST,   0,  1, 0, 0, 1, 32'h0000_1000); // U  base address
    prog[1]  = mk(OP_SHL,     0,  2, 0, 0, 1, 32'd2);         // A  tid*4
    prog[2]  = mk(OP_ADD,     0,  3, 1, 2, 0, 0);             // A  address = base + tid*4
    prog[3]  = mk(OP_ADD,     0,  4, 2, 3, 0, 0);             // V  A+A
    prog[4]  = mk(OP_MUL,     0,  5, 0, 0, 0, 0);             // V  tid*tid
    prog[5]  = mk(OP_MUL,     0,  6, 1, 0, 1, 32'd3);         // U  U*imm
    prog[6]  = mk(OP_ADD,     0,  7, 6, 5, 0, 0);             // V  U+V
    prog[7]  = mk(OP_BCAST,   0,  8, 0, 0, 1, 32'hffff_ff00); // U
    prog[8]  = mk(OP_ADD,     0,  9, 0, 8, 0, 0);             // A, overflows for warps >= 8
    prog[9]  = mk(OP_SHL,     0, 10, 3, 0, 1, 32'd20);        // A<<U overflows: re-issue
    prog[10] = mk(OP_BCAST,   0, 11, 0, 0, 1, 32'd7);         // U
    prog[11] = mk(OP_MOV,     0, 12, 4, 0, 0, 0);             // V copy
    prog[12] = mk(OP_SETMASK, 0,  0, 0, 0, 1, 32'h0000_ffff); // divergence
    prog[13] = mk(OP_ADD,     1, 11, 11, 0, 1, 32'd5);        // partial over U: merge
    prog[14] = mk(OP_ADD,     1, 12, 12, 0, 0, 0);            // partial over V
    prog[15] = mk(OP_SETMASK, 0,  0, 0, 0, 1, 32'h0);
    prog[16] = mk(OP_ADD,     1, 13, 0, 0, 0, 0);             // no lane active
    prog[17] = mk(OP_SETMASK, 0,  0, 0, 0, 1, 32'hffff_ffff);
    prog[18] = mk(OP_ADD,     1, 14, 3, 0, 1, 32'd8);         // full mask: stays A
    prog[19] = mk(OP_MOV,     0, 15, 3, 0, 0, 0);             // A copy
    prog[20] = mk(OP_ADD,     0,  7, 11, 12, 0, 0);           // reads both merged registers
    prog[21] = mk(OP_EXIT,    0,  0, 0, 0, 0, 0);
  endtask

  // Random straight-line kernel over registers r0..r7: r1..r7 are first
  // given broadcast values, then `len` random operations follow, with
  // immediates chosen to make uniform and affine values and masks that are
  // full, empty, half or random.
  task automatic random_kernel(int len);
    int p = 0;
    for (int r = 1; r < 8; r++)
      prog[p++] = mk(OP_BCAST, 0, r, 0, 0, 1, ($urandom_range(1) != 0) ? 32'($urandom_range(4096)) : $urandom);
    for (int n = 0; n < len; n++) begin
      automatic int k = $urandom_range(9);
      automatic int d = $urandom_range(1, 7);
      automatic int a = $urandom_range(7);
      automatic int b = $urandom_range(7);
      automatic bit im = $urandom_range(2) == 0;
      automatic bit pr = $urandom_range(2) == 0;
      automatic logic [31:0] imm = ($urandom_range(3) == 0) ? $urandom : 32'($urandom_range(64));
      case (k)
        0, 1: prog[p++] = mk(OP_ADD, pr, d, a, b, im, imm);
        2:    prog[p++] = mk(OP_MUL, pr, d, a, b, im, imm);
        3, 4: prog[p++] = mk(OP_SHL, pr, d, a, b, 1'b1, 32'($urandom_range(($urandom_range(3) == 0) ? 31 : 4)));
        5:    prog[p++] = mk(OP_MOV, pr, d, a, 0, 0, 0);
        6:    prog[p++] = mk(OP_BCAST, pr, d, 0, 0, 1, imm);
        7: begin
          automatic logic [31:0] m;
          case ($urandom_range(3))
            0: m = '1;
            1: m = '0;
            2: m = 32'h0000_ffff;
            default: m = $urandom;
          endcase
          prog[p++] = mk(OP_SETMASK, 0, 0, 0, 0, 1, m);
        end
        default: prog[p++] = mk(OP_ADD, pr, d, a, 0, 1'b1, imm);
      endcase
    end
    prog[p++] = mk(OP_EXIT, 0, 0, 0, 0, 0, 0);
  endtask

  task automatic load_program(int len);
    for (int p = 0; p < len; p++) begin
      @(negedge clk);
      imem_we = 1; imem_addr = PW'(p); imem_wdata = prog[p];
    end
    @(negedge clk);
    imem_we = 0;
  endtask

  // ------------------------------------------------------- reference model
  typedef logic [L-1:0][31:0] vec_t;
  vec_t mval [NW][32];
  tag_t mtag [NW][32];
  logic [L-1:0] mmask [NW];
  int   mpc [NW];

  // expected counts
  int e_instrs, e_scalar_u, e_scalar_a, e_vector, e_reissue, e_conv, e_partial;
  int e_partial_ua, e_partial_v, e_skip, e_wr [3], e_rd [3];
  int e_cycles;
  int warp_switches, last_warp;

  function automatic int ti(tag_t t);
    return (t == TAG_U) ? 0 : (t == TAG_A) ? 1 : 2;
  endfunction

  function automatic tag_t rule(op_t op, tag_t a, tag_t b);
    string s;
    byte c;
    case (op)
      OP_ADD:   s = "UAVAVVVVV";
      OP_MUL:   s = "UVVVVVVVV";
      OP_SHL:   s = "UVVAVVVVV";
      OP_MOV:   s = "UUUAAAVVV";
      OP_BCAST: s = "UUUUUUUUU";
      default:  s = "VVVVVVVVV";
    endcase
    c = s[ti(a)*3 + ti(b)];
    return (c == "U") ? TAG_U : (c == "A") ? TAG_A : TAG_V;
  endfunction

  // advance warp w's model to its next register write and return what the
  // write-back must show
  task automatic model_step(int w, output int d, output tag_t et, output logic [L-1:0] elanes,
                            output vec_t ev);
    forever begin
      inst_t i = prog[mpc[w]];
      mpc[w]++;
      case (i.op)
        OP_EXIT:    begin e_cycles += 2; d = -1; return; end
        OP_SETMASK: begin e_cycles += 2; mmask[w] = i.imm; end
        OP_NOP:     e_cycles += 2;
        default: begin
          automatic tag_t ta = (i.op == OP_BCAST) ? TAG_U : mtag[w][i.src1];
          automatic tag_t tb = (i.src2_imm || i.op == OP_BCAST || i.op == OP_MOV) ? TAG_U : mtag[w][i.src2];
          automatic vec_t a = mval[w][i.src1];
          automatic vec_t b = mval[w][i.src2];
          automatic logic [127:0] ex [L];
          automatic bit partial = i.pred && mmask[w] != '1;
          automatic bit ovf = 0;
          automatic tag_t t;
          if (i.op != OP_BCAST) e_rd[ti(ta)]++;
          if (!(i.src2_imm || i.op == OP_BCAST || i.op == OP_MOV)) e_rd[ti(tb)]++;
          if (i.src2_imm || i.op == OP_BCAST) for (int l = 0; l < L; l++) b[l] = i.imm;
          e_instrs++;
          if (i.pred && mmask[w] == '0) begin
            e_skip++;
            e_cycles += 4;
            continue;
          end
          for (int l = 0; l < L; l++)
            case (i.op)
              OP_ADD:  ex[l] = 128'(a[l]) + 128'(b[l]);
              OP_MUL:  ex[l] = 128'(a[l]) * 128'(b[l]);
              OP_SHL:  ex[l] = 128'(a[l]) << (b[l] % 32);
              OP_MOV:  ex[l] = 128'(a[l]);
              default: ex[l] = 128'(b[l]);
            endcase
          t = partial ? TAG_V : rule(i.op, ta, tb);
          if (t == TAG_A) for (int l = 0; l < L; l++) if ((ex[l] >> 32) != 0) ovf = 1;
          d = i.dst;
          elanes = '1;
          for (int l = 0; l < L; l++) ev[l] = ex[l][31:0];
          if (t != TAG_V) begin
            e_cycles += 6;
            if (t == TAG_U) e_scalar_u++; else e_scalar_a++;
          end
          if (ovf) begin
            t = TAG_V;
            e_reissue++;
            e_cycles += 2;   // SIMD cycles on top of the scalar attempt
          end
          if (t == TAG_V) begin
            e_vector++;
            if (!ovf) e_cycles += 7;
            e_conv += int'(ta == TAG_A && i.op != OP_BCAST) + int'(tb == TAG_A);
            if (partial) begin
              e_partial++;
              if (mtag[w][d] == TAG_V) begin
                e_partial_v++;
                elanes = mmask[w];
              end else begin
                e_partial_ua++;
                e_cycles += 1;
                e_conv += int'(mtag[w][d] == TAG_A);
              end
              for (int l = 0; l < L; l++) if (!mmask[w][l]) ev[l] = mval[w][d][l];
            end
          end
          e_wr[ti(t)]++;
          for (int l = 0; l < L; l++) if (elanes[l]) mval[w][d][l] = ev[l];
          mtag[w][d] = t;
          et = t;
          return;
        end
      endcase
    end
  endtask

  // -------------------------------------------------------------- monitor
  bit running = 0;
  int n_wb = 0, n_en1 = 0, n_en3 = 0, n_enall = 0;
  always @(posedge clk) if (running) begin
    if (sp_clk_en == 8'h01) n_en1++;
    if (sp_clk_en == 8'h03) n_en3++;
    if (sp_clk_en == 8'hff) n_enall++;
    if (wb_valid) begin
      int d; tag_t et; logic [L-1:0] el; vec_t ev;
      automatic int w = int'(wb_warp);
      n_wb++;
      if (w != last_warp) warp_switches++;
      last_warp = w;
      model_step(w, d, et, el, ev);
      chk(d == int'(wb_reg), $sformatf("warp %0d wrote r%0d, expected r%0d", w, wb_reg, d));
      chk(wb_tag == et, $sformatf("warp %0d r%0d tag %0d, expected %0d", w, wb_reg, wb_tag, et));
      chk(wb_lanes == el, $sformatf("warp %0d r%0d lanes %h, expected %h", w, wb_reg, wb_lanes, el));
      for (int l = 0; l < L; l++)
        if (el[l]) chk(wb_data[l] == ev[l],
                       $sformatf("warp %0d r%0d lane %0d = %h, expected %h", w, wb_reg, l, wb_data[l], ev[l]));
    end
  end

  task automatic run_kernel(int nwarps, int rpw, bit directed);
    int t0, t1;
    e_instrs = 0; e_scalar_u = 0; e_scalar_a = 0; e_vector = 0; e_reissue = 0;
    e_conv = 0; e_partial = 0; e_partial_ua = 0; e_partial_v = 0; e_skip = 0;
    e_wr = '{0, 0, 0}; e_rd = '{0, 0, 0};
    e_cycles = 0; warp_switches = 0; last_warp = -1;
    n_wb = 0; n_en1 = 0; n_en3 = 0; n_enall = 0;
    for (int w = 0; w < NW; w++) begin
      mpc[w] = 0;
      mmask[w] = '1;
      for (int r = 0; r < 32; r++) mtag[w][r] = TAG_V;
      mtag[w][0] = TAG_A;
      for (int l = 0; l < L; l++) mval[w][0][l] = 32'(w * L + l);
    end
    @(negedge clk);
    launch = 1; launch_nwarps = (WW+1)'(nwarps); launch_rpw = REG_W'(rpw);
    running = 1;
    t0 = cyc;
    @(negedge clk);
    launch = 0;
    wait (done);
    t1 = cyc;
    @(negedge clk);
    running = 0;
    // warps that ended: drain their EXIT in the model
    for (int w = 0; w < nwarps; w++) begin
      int d; tag_t et; logic [L-1:0] el; vec_t ev;
      model_step(w, d, et, el, ev);
      chk(d == -1, $sformatf("warp %0d did not reach EXIT", w));
    end
    // launch writes one thread-index register per warp; the final
    // scheduling cycle finds no warp left
    e_cycles += 1 + nwarps + 1;
    $display("kernel %0d warps x %0d regs: %0d cycles (expected %0d), %0d write-backs",
             nwarps, rpw, t1 - t0, e_cycles, n_wb);
    $display("  scalar U %0d, scalar A %0d, vector %0d, re-issue %0d, conversions %0d",
             e_scalar_u, e_scalar_a, e_vector, e_reissue, e_conv);
    $display("  partial over U/A %0d, partial over V %0d, masked-off %0d, warp switches %0d",
             e_partial_ua, e_partial_v, e_skip, warp_switches);
    $display("  operand reads U/A/V %0d/%0d/%0d, writes U/A/V %0d/%0d/%0d, lanes read %0d written %0d",
             stats.rd_u, stats.rd_a, stats.rd_v, stats.wr_u, stats.wr_a, stats.wr_v,
             stats.lane_reads, stats.lane_writes);
    chk(t1 - t0 == e_cycles, "total cycle count");
    chk(stats.instrs == 32'(e_instrs), "instruction counter");
    chk(stats.scalar_ops == 32'(e_scalar_u + e_scalar_a - e_reissue), "scalar op counter (re-issued ones excluded)");
    chk(stats.vector_ops == 32'(e_vector), "vector op counter");
    chk(stats.reissues == 32'(e_reissue), "re-issue counter");
    chk(stats.conversions == 32'(e_conv), "conversion counter");
    chk(stats.partial_writes == 32'(e_partial), "partial write counter");
    chk(stats.wr_u == 32'(e_wr[0]) && stats.wr_a == 32'(e_wr[1]) && stats.wr_v == 32'(e_wr[2]),
        "write tag counters");
    chk(stats.rd_u == 32'(e_rd[0]) && stats.rd_a == 32'(e_rd[1]) && stats.rd_v == 32'(e_rd[2]),
        "read tag counters");
    chk(n_en1 == e_scalar_u, "one SP clocked per uniform scalar op");
    chk(n_en3 == e_scalar_a, "two SPs clocked per affine scalar op");
    chk(n_enall == 2 * e_vector, "all SPs clocked two cycles per SIMD op");
    if (directed) check_mechanisms(nwarps);
  endtask

  // every mechanism must have happened in the directed kernel
  task automatic check_mechanisms(int nwarps);
    chk(e_scalar_u > 0, "uniform scalar op happened");
    chk(e_scalar_a > 0, "affine scalar op happened");
    chk(e_vector > 0, "SIMD op happened");
    chk(e_reissue > 0, "overflow re-issue happened");
    chk(e_conv > 0, "affine-to-vector conversion happened");
    chk(e_partial_ua > 0, "partial write over U/A happened");
    chk(e_partial_v > 0, "partial write over V happened");
    chk(e_skip > 0, "fully masked instruction happened");
    chk(warp_switches > nwarps, "warps interleaved");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    directed_kernel();
    load_program(PLEN);
    run_kernel(24, 16, 1);
    run_kernel(24, 21, 1);
    // random kernels on random launch shapes
    for (int k = 0; k < 12; k++) begin
      automatic int nw = $urandom_range(1, 24);
      automatic int rpw = $urandom_range(8, 512 / nw > 32 ? 32 : 512 / nw);
      random_kernel(56);
      load_program(64);
      run_kernel(nw, rpw, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
