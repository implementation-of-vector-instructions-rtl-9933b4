// vpu_vconfig: vector configuration state (vl, vtype) and vsetvli.
//
// vsetvli sets the element width (SEW) and the vector length:
//   VLMAX = VLEN / SEW          (LMUL = 1, the only grouping supported)
//   AVL   = rs1 value           if rs1 != x0
//         = all ones (-> VLMAX) if rs1 == x0 and rd != x0
//         = current vl          if rs1 == x0 and rd == x0
//   vl    = min(AVL, VLMAX)
// The unit's notion of "number done" returned in rd is this vl.
//
// Interface: the combinational result (new_vl, new_vtype) is valid for
// the operands on the inputs in the same cycle; `we` commits it on the
// next rising edge. vl and vtype are registered outputs.
//
// This module's own choices (the description says only that vsetvli sets
// the element type and that VLEN and SEW give the element count):
// a vtype with LMUL != 1, SEW above 64 or reserved bits set gives vill = 1
// and vl = 0, as RVV does for an unsupported vtype; reset leaves vill = 1
// and vl = 0. Synchronous, active-high reset as in the host core.
module vpu_vconfig
  import vpu_pkg::*;
#(
  parameter int unsigned VLEN = 128,
  localparam int unsigned VL_W = $clog2(VLEN / 8) + 1
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            we,
  input  logic [10:0]     zimm,
  input  logic [XLEN-1:0] avl_in,
  input  logic            rs1_is_x0,
  input  logic            rd_is_x0,
  output logic [VL_W-1:0] new_vl,
  output vtype_t          new_vtype,
  output logic [VL_W-1:0] vl,
  output vtype_t          vtype
);

  logic            ok;
  logic [VL_W-1:0] vlmax;
  logic [XLEN-1:0] avl;

  always_comb begin
    ok = (zimm[10:8] == 3'b000) && (zimm[2:0] == 3'b000) && !zimm[5];
    new_vtype       = '0;
    new_vtype.vill  = !ok;
    new_vtype.vma   = ok & zimm[7];
    new_vtype.vta   = ok & zimm[6];
    new_vtype.vsew  = ok ? sew_e'(zimm[4:3]) : SEW8;
    new_vtype.vlmul = 3'b000;
    vlmax = VL_W'((VLEN / 8) >> zimm[4:3]);
    if (!rs1_is_x0)     avl = avl_in;
    else if (!rd_is_x0) avl = '1;
    else                avl = XLEN'(vl);
    if (!ok)                     new_vl = '0;
    else if (avl < XLEN'(vlmax)) new_vl = VL_W'(avl);
    else                         new_vl = vlmax;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      vl         <= '0;
      vtype      <= '0;
      vtype.vill <= 1'b1;
    end else if (we) begin
      vl    <= new_vl;
      vtype <= new_vtype;
    end
  end

endmodule
