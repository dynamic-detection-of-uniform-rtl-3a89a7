// tb_tag_rules: exhaustive check of the tag propagation rules.
// Every operation, every pair of operand tags (including the unused code 3,
// which must act as V) and both values of `partial` are applied; the expected
// tag comes from the propagation table written out below as text, row by
// row, independently of the RTL's case statements.
module tb_tag_rules;
  import uavec_pkg::*;

  op_t  op;
  tag_t ta, tb;
  logic partial;
  tag_t tr;
  logic scalar_ok;
  int checks = 0, failures = 0;

  tag_rules dut (.*);

  // table[op] is a 9-character string: for first operand U,A,V (outer) and
  // second operand U,A,V (inner), the result tag letter
  function automatic byte expect_letter(op_t o, int ia, int ib);
    string s;
    case (o)
      OP_ADD:   s = "UAVAVVVVV";
      OP_MUL:   s = "UVVVVVVVV";
      OP_SHL:   s = "UVVAVVVVV";
      OP_MOV:   s = "UUUAAAVVV";
      OP_BCAST: s = "UUUUUUUUU";
      default:  s = "VVVVVVVVV";
    endcase
    return s[ia*3 + ib];
  endfunction

  function automatic int idx(logic [1:0] t);
    return (t == 2'd1) ? 0 : (t == 2'd2) ? 1 : 2;
  endfunction

  initial begin
    for (int o = 0; o < 16; o++)
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++)
          for (int p = 0; p < 2; p++) begin
            byte e;
            tag_t et;
            op = op_t'(o); ta = tag_t'(a); tb = tag_t'(b); partial = p[0];
            #1;
            e  = expect_letter(op, idx(2'(a)), idx(2'(b)));
            et = p ? TAG_V : (e == "U") ? TAG_U : (e == "A") ? TAG_A : TAG_V;
            checks++;
            if (tr !== et || scalar_ok !== (et != TAG_V)) begin
              failures++;
              $display("FAIL op=%0d ta=%0d tb=%0d partial=%0d: got %0d want %0d", o, a, b, p, tr, et);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
