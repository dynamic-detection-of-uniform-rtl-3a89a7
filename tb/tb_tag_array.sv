// tb_tag_array: random writes and reads of the 512-entry tag array against a
// plain array model, plus the bulk clear to V. Reads are combinational, so
// each read is checked in the cycle it is applied; a write becomes visible
// after the clock edge.
module tb_tag_array;
  import uavec_pkg::*;
  localparam int N = 512, AW = 9;

  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0;
  logic [AW-1:0] rd_addr = 0, wr_addr = 0;
  tag_t rd_tag, wr_tag = TAG_V;
  tag_t model [N];
  int checks = 0, failures = 0, cyc = 0;

  tag_array #(.NUM_REGS(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check_read(int a);
    rd_addr = AW'(a);
    #1;
    checks++;
    if (rd_tag !== model[a]) begin
      failures++;
      $display("FAIL reg %0d: got %0d want %0d", a, rd_tag, model[a]);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) model[i] = TAG_V;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < N; i += 37) check_read(i);
    // fill with random tags
    for (int n = 0; n < 2000; n++) begin
      automatic int a = $urandom_range(N-1);
      automatic tag_t t = tag_t'($urandom_range(2));
      wr_en = 1; wr_addr = AW'(a); wr_tag = t;
      @(posedge clk); #1;
      model[a] = t;
      wr_en = 0;
      check_read($urandom_range(N-1));
      check_read(a);
    end
    for (int i = 0; i < N; i++) check_read(i);
    // clear
    clear = 1; @(posedge clk); #1 clear = 0;
    for (int i = 0; i < N; i++) model[i] = TAG_V;
    for (int i = 0; i < N; i++) check_read(i);
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
