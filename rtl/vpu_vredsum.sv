// vpu_vredsum: integer sum reduction, vd[0] = vs1[0] + sum(vs2[0..vl-1]).
//
// Sequential, one element per cycle: the accumulator is loaded with
// element 0 of vs1 and element i of vs2 is added in the i-th cycle after
// start. All arithmetic is modulo 2^SEW. The serial walk is this design's
// choice; the description names the instruction and its purpose (the dot
// product) only.
//
// Interface: pulse `start` with `sew`, `vl`, `vs1_e0` (the low 64 bits of
// vs1) and `vs2` valid; they are captured. With start in cycle t, `done`
// pulses in cycle t+vl+2 (t+2 for vl = 0), with `result` holding the SEW-bit sum
// zero-extended to 64 bits; `result` keeps its value until the next start.
module vpu_vredsum
  import vpu_pkg::*;
#(
  parameter int unsigned VLEN = 128,
  localparam int unsigned VL_W = $clog2(VLEN / 8) + 1
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            start,
  input  sew_e            sew,
  input  logic [VL_W-1:0] vl,
  input  logic [63:0]     vs1_e0,
  input  logic [VLEN-1:0] vs2,
  output logic            busy,
  output logic            done,
  output logic [63:0]     result
);

  logic [VLEN-1:0] vs2_q;
  sew_e            sew_q;
  logic [VL_W-1:0] vl_q, idx;
  logic [63:0]     elem, emask;

  function automatic logic [63:0] sew_mask(sew_e s);
    unique case (s)
      SEW8:    return 64'h0000_0000_0000_00ff;
      SEW16:   return 64'h0000_0000_0000_ffff;
      SEW32:   return 64'h0000_0000_ffff_ffff;
      default: return '1;
    endcase
  endfunction

  assign emask = sew_mask(sew_q);
  assign elem  = 64'(vs2_q >> (32'(idx) << (32'(sew_q) + 3))) & emask;

  always_ff @(posedge clk) begin
    if (reset) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      vs2_q  <= '0;
      sew_q  <= SEW8;
      vl_q   <= '0;
      idx    <= '0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        vs2_q  <= vs2;
        sew_q  <= sew;
        vl_q   <= vl;
        idx    <= '0;
        result <= vs1_e0 & sew_mask(sew);
        busy   <= 1'b1;
      end else if (busy) begin
        if (idx == vl_q) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          result <= (result + elem) & emask;
          idx    <= idx + 1'b1;
        end
      end
    end
  end

endmodule
