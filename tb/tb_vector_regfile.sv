// tb_vector_regfile: random lane-masked writes and lane-masked reads of the
// 512 x 32 x 32-bit register file against a model. Lanes not enabled on a
// read must come back as zero; lanes not enabled on a write must keep their
// old value.
module tb_vector_regfile;
  localparam int N = 512, L = 32, X = 32, AW = 9;

  logic clk = 0;
  logic [AW-1:0] rd_addr = 0, wr_addr = 0;
  logic [L-1:0] rd_lane_en = 0, wr_lane_en = 0;
  logic [L-1:0][X-1:0] rd_data, wr_data = '0;
  logic [L-1:0][X-1:0] model [N];
  logic [N-1:0] written = '0;
  int checks = 0, failures = 0, cyc = 0;

  vector_regfile #(.NUM_REGS(N), .LANES(L), .XLEN(X)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic rd(int a, logic [L-1:0] en);
    rd_addr = AW'(a); rd_lane_en = en;
    #1;
    for (int l = 0; l < L; l++) begin
      automatic logic [X-1:0] e = en[l] ? model[a][l] : '0;
      checks++;
      if (rd_data[l] !== e) begin
        failures++;
        $display("FAIL reg %0d lane %0d: got %h want %h", a, l, rd_data[l], e);
      end
    end
  endtask

  initial begin
    // first write every register completely so the model is defined
    for (int a = 0; a < N; a++) begin
      wr_addr = AW'(a); wr_lane_en = '1;
      for (int l = 0; l < L; l++) wr_data[l] = $urandom;
      @(posedge clk); #1;
      model[a] = wr_data;
    end
    wr_lane_en = '0;
    for (int n = 0; n < 1500; n++) begin
      automatic int a = $urandom_range(N-1);
      logic [L-1:0] en;
      case ($urandom_range(3))
        0: en = 32'h1;                // uniform: lane 0
        1: en = 32'h3;                // affine: lanes 0 and 1
        default: en = $urandom;       // predicated vector write
      endcase
      wr_addr = AW'(a); wr_lane_en = en;
      for (int l = 0; l < L; l++) wr_data[l] = $urandom;
      @(posedge clk); #1;
      for (int l = 0; l < L; l++) if (en[l]) model[a][l] = wr_data[l];
      wr_lane_en = '0;
      rd(a, '1);
      rd($urandom_range(N-1), $urandom);
      rd($urandom_range(N-1), 32'h3);
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
