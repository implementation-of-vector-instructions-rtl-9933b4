// vpu_vmul: element-wise multiply (vmul.vv, low half of each product).
//
// Multi-cycle: the description has the unit's execute stage take several
// cycles for multiplication. This implementation has one 64-bit
// partitioned multiplier and walks the VLEN-bit operands one 64-bit chunk
// per cycle, so an operation takes VLEN/64 cycles (2 at VLEN = 128).
// Within a chunk the multiplier forms, according to SEW, eight 8x8, four
// 16x16, two 32x32 or one 64x64 product and keeps the low SEW bits of
// each; the low half is the same for signed and unsigned operands.
//
// Interface: pulse `start` for one cycle with `sew`, `a` and `b` valid;
// the operands are captured. `busy` is high while the unit works; `done`
// pulses in the cycle after the last chunk is written, when `prod` holds
// the full result (it keeps it until the next start). The 64-bit chunk
// size is this design's choice.
module vpu_vmul
  import vpu_pkg::*;
#(
  parameter int unsigned VLEN = 128,
  localparam int unsigned NCH = VLEN / 64,
  localparam int unsigned CW  = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            start,
  input  sew_e            sew,
  input  logic [VLEN-1:0] a,
  input  logic [VLEN-1:0] b,
  output logic            busy,
  output logic            done,
  output logic [VLEN-1:0] prod
);

  logic [VLEN-1:0] a_q, b_q;
  sew_e            sew_q;
  logic [CW-1:0]   idx;
  logic [63:0]     ca, cb, cp;

  assign ca = a_q[idx*64 +: 64];
  assign cb = b_q[idx*64 +: 64];

  // partitioned 64-bit multiplier, low half of each element product
  always_comb begin
    cp = '0;
    unique case (sew_q)
      SEW8:  for (int e = 0; e < 8; e++) cp[e*8 +: 8]   = ca[e*8 +: 8]   * cb[e*8 +: 8];
      SEW16: for (int e = 0; e < 4; e++) cp[e*16 +: 16] = ca[e*16 +: 16] * cb[e*16 +: 16];
      SEW32: for (int e = 0; e < 2; e++) cp[e*32 +: 32] = ca[e*32 +: 32] * cb[e*32 +: 32];
      SEW64: cp = ca * cb;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      idx   <= '0;
      a_q   <= '0;
      b_q   <= '0;
      sew_q <= SEW8;
      prod  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        a_q   <= a;
        b_q   <= b;
        sew_q <= sew;
        idx   <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        prod[idx*64 +: 64] <= cp;
        if (32'(idx) == NCH - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule
