// warp_scheduler: round-robin choice of the next warp to issue.
//
// `ready` has one bit per warp. The grant goes to the first ready warp after
// the one granted last, wrapping around, so every ready warp is served within
// NUM_WARPS grants. The choice is combinational (grant_valid / grant_id);
// `take` tells the scheduler the grant was used, which moves the round-robin
// pointer to the granted warp at the next clock edge. After reset the search
// starts at warp 0.
module warp_scheduler #(
  parameter int NUM_WARPS = 24,
  localparam int WW = (NUM_WARPS > 1) ? $clog2(NUM_WARPS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_WARPS-1:0] ready,
  input  logic                 take,
  output logic                 grant_valid,
  output logic [WW-1:0]        grant_id
);

  logic [WW-1:0] last_q;

  always_comb begin
    grant_valid = 1'b0;
    grant_id    = '0;
    // scan NUM_WARPS positions starting right after last_q; keep the first hit
    for (int n = NUM_WARPS; n >= 1; n--) begin
      automatic logic [WW-1:0] w = WW'((int'(last_q) + n) % NUM_WARPS);
      if (ready[w]) begin
        grant_valid = 1'b1;
        grant_id    = w;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                  last_q <= WW'(NUM_WARPS - 1);
    else if (take && grant_valid) last_q <= grant_id;
  end

endmodule
