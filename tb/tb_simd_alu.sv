// tb_simd_alu: random vector operations with and without predication. The
// expected vector is computed lane by lane in the testbench. The latency is
// checked too: with 8 SPs at twice the register-file clock a 32-lane warp
// needs exactly two cycles, so `last` must be high in the start cycle + 1
// and `done` in the start cycle + 2. Back-to-back operations are also run.
module tb_simd_alu;
  import uavec_pkg::*;
  localparam int L = 32, X = 32;

  logic clk = 0, rst_n = 0, start = 0, pred = 0;
  op_t op = OP_ADD;
  logic [L-1:0] mask = '1;
  logic [L-1:0][X-1:0] a = '0, b = '0, old = '0, result;
  logic busy, last, done;
  int checks = 0, failures = 0, cyc = 0;

  simd_alu #(.LANES(L), .XLEN(X), .NUM_SP(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      automatic int t0;
      automatic int t_last = -1;
      automatic int t_done = -1;
      case ($urandom_range(4))
        0: op = OP_ADD;
        1: op = OP_MUL;
        2: op = OP_SHL;
        3: op = OP_MOV;
        default: op = OP_BCAST;
      endcase
      pred = $urandom_range(1);
      mask = $urandom;
      for (int l = 0; l < L; l++) begin
        a[l] = $urandom; b[l] = $urandom; old[l] = $urandom;
      end
      start = 1;
      t0 = cyc;
      for (int k = 0; k < 4 && t_done < 0; k++) begin
        #1;
        if (last && t_last < 0) t_last = cyc - t0;
        if (done) t_done = cyc - t0;
        @(posedge clk); #1 start = 0;
      end
      checks++;
      if (t_last != 1 || t_done != 2) begin
        failures++;
        $display("FAIL timing: last at +%0d done at +%0d", t_last, t_done);
      end
      for (int l = 0; l < L; l++) begin
        automatic logic [X-1:0] e;
        case (op)
          OP_ADD:  e = a[l] + b[l];
          OP_MUL:  e = a[l] * b[l];
          OP_SHL:  e = a[l] << (b[l] % 32);
          OP_MOV:  e = a[l];
          default: e = b[l];
        endcase
        if (pred && !mask[l]) e = old[l];
        checks++;
        if (result[l] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d lane %0d: got %h want %h", op, l, result[l], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
