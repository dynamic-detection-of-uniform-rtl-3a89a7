// tb_warp_scheduler: random ready patterns over 24 warps. The expected grant
// is the first ready warp after the previously granted one (wrapping), worked
// out by a counting loop in the testbench. Also checks that with all warps
// ready every warp is granted once in 24 consecutive grants.
module tb_warp_scheduler;
  localparam int NW = 24, WW = 5;

  logic clk = 0, rst_n = 0, take = 0;
  logic [NW-1:0] ready = '0;
  logic grant_valid;
  logic [WW-1:0] grant_id;
  int checks = 0, failures = 0, cyc = 0;
  int prev = NW - 1;

  warp_scheduler #(.NUM_WARPS(NW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // all ready: strict rotation starting at warp 0
    ready = '1; take = 1;
    for (int n = 0; n < 3 * NW; n++) begin
      #1;
      checks++;
      if (!grant_valid || int'(grant_id) != n % NW) begin
        failures++;
        $display("FAIL rotation step %0d: got %0d", n, grant_id);
      end
      prev = int'(grant_id);
      @(posedge clk); #1;
    end
    for (int n = 0; n < 5000; n++) begin
      automatic int exp_id = -1;
      ready = NW'({$urandom, $urandom} & {$urandom, $urandom});
      if (n % 50 == 0) ready = '0;
      take = $urandom_range(3) != 0;
      for (int k = 1; k <= NW && exp_id < 0; k++)
        if (ready[(prev + k) % NW]) exp_id = (prev + k) % NW;
      #1;
      checks++;
      if (grant_valid !== (exp_id >= 0) || (exp_id >= 0 && int'(grant_id) != exp_id)) begin
        failures++;
        $display("FAIL ready=%h prev=%0d: got %0d/%0d want %0d", ready, prev, grant_valid, grant_id, exp_id);
      end
      if (take && exp_id >= 0) prev = exp_id;
      @(posedge clk); #1;
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
