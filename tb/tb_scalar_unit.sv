// tb_scalar_unit: random uniform/affine operands. The expected result is
// worked out lane by lane on the full 32-lane vectors in 128-bit arithmetic:
// overflow is expected exactly when an affine result has a lane that does not
// fit in 32 bits; otherwise base must equal lane 0 and stride lane1 - lane0
// (uniform results wrap modulo 2**32 and are never flagged). Directed cases
// first put the last lane exactly at 2**32-1 and at 2**32.
module tb_scalar_unit;
  import uavec_pkg::*;
  localparam int L = 32, X = 32;

  op_t op;
  tag_t ta, tb, tr;
  logic [X-1:0] a_base, a_stride, b_base, b_stride, r_base, r_stride;
  logic ovf;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_aff = 0;

  scalar_unit #(.LANES(L), .XLEN(X)) dut (.*);

  function automatic logic [X-1:0] rnd_val();
    case ($urandom_range(3))
      0: return $urandom_range(255);
      1: return $urandom_range(32'h0fff_ffff);
      2: return 32'hffff_ffff - $urandom_range(2000);
      default: return $urandom;
    endcase
  endfunction

  initial begin
    // directed boundary: the last lane of U+A equal to 2**32-1 (fits) and
    // to 2**32 (overflows), for every power-of-two stride that allows it
    for (int k = 0; k < 27; k++)
      for (int over = 0; over < 2; over++) begin
        automatic logic [63:0] x = 64'h1_0000_0000 - 64'(L - 1) * (64'd1 << k) - 64'(1 - over);
        op = OP_ADD; ta = TAG_U; tb = TAG_A; tr = TAG_A;
        a_base = 32'd0; a_stride = 32'd0;
        b_base = x[31:0]; b_stride = 32'd1 << k;
        #1;
        checks++;
        if (ovf !== over[0]) begin
          failures++;
          $display("FAIL boundary add stride 2^%0d over=%0d: ovf=%0d", k, over, ovf);
        end
        // the same boundary reached by a shift of an affine value by one
        op = OP_SHL; ta = TAG_A; tb = TAG_U; tr = TAG_A;
        a_base = 32'(x >> 1); a_stride = 32'd1 << k; b_base = 32'd1;
        #1;
        checks++;
        if (ovf !== (64'(a_base) + 64'(L - 1) * 64'(a_stride) >= 64'h8000_0000)) begin
          failures++;
          $display("FAIL boundary shl stride 2^%0d: ovf=%0d", k, ovf);
        end
      end
    for (int n = 0; n < 20000; n++) begin
      logic [127:0] e [L];
      logic exp_ovf;
      automatic int c = $urandom_range(8);
      case (c)
        0: begin op = OP_ADD; ta = TAG_U; tb = TAG_U; tr = TAG_U; end
        1: begin op = OP_ADD; ta = TAG_U; tb = TAG_A; tr = TAG_A; end
        2: begin op = OP_ADD; ta = TAG_A; tb = TAG_U; tr = TAG_A; end
        3: begin op = OP_MUL; ta = TAG_U; tb = TAG_U; tr = TAG_U; end
        4: begin op = OP_SHL; ta = TAG_U; tb = TAG_U; tr = TAG_U; end
        5: begin op = OP_SHL; ta = TAG_A; tb = TAG_U; tr = TAG_A; end
        6: begin op = OP_MOV; ta = TAG_A; tb = TAG_U; tr = TAG_A; end
        7: begin op = OP_MOV; ta = TAG_U; tb = TAG_U; tr = TAG_U; end
        default: begin op = OP_BCAST; ta = TAG_U; tb = TAG_U; tr = TAG_U; end
      endcase
      a_base = rnd_val(); b_base = rnd_val();
      if (op == OP_SHL) b_base = $urandom_range(40);
      a_stride = (ta == TAG_A) ? 32'd1 << $urandom_range(12) : 32'($urandom);
      b_stride = (tb == TAG_A) ? 32'd1 << $urandom_range(12) : 32'($urandom);
      // a register tagged A always holds lanes that fit (the core checks it)
      if (ta == TAG_A && 64'(a_base) + 64'(L - 1) * 64'(a_stride) > 64'hffff_ffff)
        a_base = $urandom_range(32'h0fff_ffff);
      if (tb == TAG_A && 64'(b_base) + 64'(L - 1) * 64'(b_stride) > 64'hffff_ffff)
        b_base = $urandom_range(32'h0fff_ffff);
      // operand lanes as exact integers, then result lanes
      for (int i = 0; i < L; i++) begin
        automatic logic [127:0] av = 128'(a_base) + ((ta == TAG_A) ? 128'(i) * 128'(a_stride) : 128'd0);
        automatic logic [127:0] bv = 128'(b_base) + ((tb == TAG_A) ? 128'(i) * 128'(b_stride) : 128'd0);
        case (op)
          OP_ADD:  e[i] = av + bv;
          OP_MUL:  e[i] = 128'(a_base) * 128'(b_base);
          OP_SHL:  e[i] = av << b_base[4:0];
          OP_MOV:  e[i] = av;
          default: e[i] = 128'(b_base);
        endcase
      end
      exp_ovf = 1'b0;
      if (tr == TAG_A) for (int i = 0; i < L; i++) if ((e[i] >> 32) != 0) exp_ovf = 1'b1;
      #1;
      checks++;
      if (ovf !== exp_ovf) begin
        failures++;
        if (failures < 10) $display("FAIL ovf op=%0d a=%h/%h b=%h/%h got %0d", op, a_base, a_stride, b_base, b_stride, ovf);
      end else if (!exp_ovf) begin
        checks++;
        if (r_base !== e[0][31:0]) begin
          failures++;
          if (failures < 10) $display("FAIL base op=%0d got %h want %h", op, r_base, e[0][31:0]);
        end
        if (tr == TAG_A) begin
          checks++;
          n_aff++;
          if (r_stride !== 32'(e[1] - e[0])) begin
            failures++;
            if (failures < 10) $display("FAIL stride op=%0d got %h want %h", op, r_stride, 32'(e[1] - e[0]));
          end
        end
      end
      if (exp_ovf) n_ovf++;
    end
    $display("affine results %0d, overflows %0d", n_aff, n_ovf);
    checks++;
    if (n_ovf == 0 || n_aff == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
