// affine_expand: converts a register read in compressed form into the full
// vector that the SIMD units consume.
//
//   TAG_U : every lane = raw[0]
//   TAG_A : lane i = raw[0] + (i << k), where raw[1] = 2**k is the stride
//   TAG_V : raw passes through unchanged
// Because strides are restricted to powers of two, no multiplier is needed:
// a priority encoder finds k and each lane adds its own index shifted by k.
// Only lanes 0 and 1 of `raw` are looked at for U and A. A zero stride (never
// produced by the core) expands like a uniform. Combinational.
module affine_expand
  import uavec_pkg::*;
#(
  parameter int LANES = 32,
  parameter int XLEN  = 32
) (
  input  tag_t                       tag,
  input  logic [LANES-1:0][XLEN-1:0] raw,
  output logic [LANES-1:0][XLEN-1:0] vec
);

  localparam int KW = $clog2(XLEN);

  logic [KW-1:0] k;
  logic          nz;

  // position of the (single) set bit of the stride
  always_comb begin
    k  = '0;
    nz = 1'b0;
    for (int b = 0; b < XLEN; b++)
      if (raw[1][b]) begin
        k  = KW'(b);
        nz = 1'b1;
      end
  end

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      unique case (tag)
        TAG_U:   vec[i] = raw[0];
        TAG_A:   vec[i] = nz ? raw[0] + (XLEN'(i) << k) : raw[0];
        default: vec[i] = raw[i];
      endcase
    end
  end

endmodule
