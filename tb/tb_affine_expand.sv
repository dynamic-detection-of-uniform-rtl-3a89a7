// tb_affine_expand: random bases and power-of-two strides; each lane of the
// expanded vector is compared with x + i*y computed with a multiplication.
// Uniform operands must broadcast lane 0 and generic vectors pass unchanged.
module tb_affine_expand;
  import uavec_pkg::*;
  localparam int L = 32, X = 32;

  tag_t tag;
  logic [L-1:0][X-1:0] raw, vec;
  int checks = 0, failures = 0;

  affine_expand #(.LANES(L), .XLEN(X)) dut (.*);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int l = 0; l < L; l++) raw[l] = $urandom;
      tag = tag_t'($urandom_range(2));
      if (tag == TAG_A) raw[1] = 32'd1 << $urandom_range(31);
      if (n < 32) begin tag = TAG_A; raw[1] = 32'd1 << n; end
      #1;
      for (int i = 0; i < L; i++) begin
        logic [X-1:0] e;
        case (tag)
          TAG_U:   e = raw[0];
          TAG_A:   e = raw[0] + 32'(i) * raw[1];
          default: e = raw[i];
        endcase
        checks++;
        if (vec[i] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL tag %0d lane %0d: got %h want %h", tag, i, vec[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
