// vector_regfile: the multiprocessor's vector register file, NUM_REGS
// registers of LANES lanes of XLEN bits (512 x 32 x 32 bits = 512 kb).
//
// Each lane is enabled separately on both ports. This is what lets the tagged
// scheme save activity: a uniform register is read or written through lane 0
// only and an affine register through lanes 0 (base) and 1 (stride); a lane
// that is not enabled is not accessed and its read data are driven to zero
// (an idle bus). One combinational read port, used once per operand because
// operands are read one after another, and one synchronous write port.
// No reset: the contents are undefined until written, like the SRAM they
// stand for.
module vector_regfile #(
  parameter int NUM_REGS = 512,
  parameter int LANES    = 32,
  parameter int XLEN     = 32,
  localparam int AW = $clog2(NUM_REGS)
) (
  input  logic                       clk,
  input  logic [AW-1:0]              rd_addr,
  input  logic [LANES-1:0]           rd_lane_en,
  output logic [LANES-1:0][XLEN-1:0] rd_data,
  input  logic [AW-1:0]              wr_addr,
  input  logic [LANES-1:0]           wr_lane_en,
  input  logic [LANES-1:0][XLEN-1:0] wr_data
);

  logic [LANES-1:0][XLEN-1:0] mem [NUM_REGS];

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++)
      if (wr_lane_en[l]) mem[wr_addr][l] <= wr_data[l];
  end

  always_comb begin
    for (int l = 0; l < LANES; l++)
      rd_data[l] = rd_lane_en[l] ? mem[rd_addr][l] : '0;
  end

endmodule
