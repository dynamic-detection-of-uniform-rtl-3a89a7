// tag_array: two tag bits per vector register (1 kb for 512 registers).
//
// Held in flip-flops, read combinationally through one read port so that the
// tag of an operand is known one cycle before the operand's lanes are read
// from the register file (the tag read is the extra level of indirection,
// pipelined with the sequential operand reads). One synchronous write port
// stores the tag of each result. `clear` sets every tag to TAG_V, the safe
// "nothing known" state, and is used at reset and at kernel launch; a write
// in the same cycle as clear is lost. A read of the register being written in
// the same cycle returns the old tag.
module tag_array
  import uavec_pkg::*;
#(
  parameter int NUM_REGS = 512,
  localparam int AW = $clog2(NUM_REGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic [AW-1:0] rd_addr,
  output tag_t          rd_tag,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  tag_t          wr_tag
);

  tag_t tags [NUM_REGS];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int i = 0; i < NUM_REGS; i++) tags[i] <= TAG_V;
    end else if (wr_en) begin
      tags[wr_addr] <= wr_tag;
    end
  end

  assign rd_tag = norm_tag(tags[rd_addr]);

endmodule
