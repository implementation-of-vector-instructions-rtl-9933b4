// vpu_valu: element-wise SIMD adder across a whole vector register.
//
// Combinational. The VLEN-bit operands are split into elements of the
// selected width (8, 16, 32 or 64 bits) and added modulo 2^SEW, all
// elements at once, as vadd.vv requires. It is built as one VLEN-bit
// carry chain per 8-bit slice whose carry into a slice is suppressed at
// every element boundary, so a single adder serves all four widths.
//
// Which elements are written back (the body [0, vl)) is decided by the
// caller's byte enables.
module vpu_valu
  import vpu_pkg::*;
#(
  parameter int unsigned VLEN = 128,
  localparam int unsigned VB  = VLEN / 8
) (
  input  sew_e            sew,
  input  logic [VLEN-1:0] a,
  input  logic [VLEN-1:0] b,
  output logic [VLEN-1:0] sum
);

  always_comb begin
    logic       c;
    logic [8:0] s;
    c = 1'b0;
    for (int i = 0; i < VB; i++) begin
      // an element starts at byte i when i is a multiple of 2^sew
      if ((i & ((1 << sew) - 1)) == 0) c = 1'b0;
      s = {1'b0, a[i*8 +: 8]} + {1'b0, b[i*8 +: 8]} + {8'b0, c};
      sum[i*8 +: 8] = s[7:0];
      c = s[8];
    end
  end

endmodule
