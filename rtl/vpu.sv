// vpu: vector unit attached to a five-stage in-order RV64 core.
//
// The unit sits beside the core's pipeline like a floating-point unit:
// the core hands it each instruction together with the two scalar source
// operands read in its decode stage; the unit executes vector
// instructions itself, returns a scalar result to the core's writeback
// (the new vl of vsetvli) and holds `stall_pipeline` high until it is
// done, so the core's in-order pipeline simply waits. Vector memory
// accesses go to the L1 data cache through a request port of its own
// (vpu_lsu) that the top level arbitrates with the core's.
//
// Internally an instruction follows the core's stages, one instruction at
// a time:
//   D  (idle): decode; accept a supported instruction unless killd
//   X        : one cycle; killx squashes the instruction
//   M        : one cycle; killm squashes it; otherwise vadd.vv and vsetvli
//              compute their result here and the multi-cycle units
//              (vpu_vmul, vpu_vredsum, vpu_lsu) are started
//   E        : wait for the multi-cycle unit (multiply, reduction, memory)
//   W        : commit: write the vector register / vl,vtype, pulse wb_valid
// Nothing architectural changes before M has passed, so a kill in X or M
// leaves no trace. With accept in cycle t, stall_pipeline is high in
// cycles t+1 .. t+3 for vsetvli and vadd.vv, and longer by the unit's
// latency for the others; wb_valid pulses in the last stalled cycle
// (W). Because a new instruction is accepted only in D, a vector load
// followed by an instruction that reads its result needs no bubble.
//
// Core interface (modelled on the description's VPUCoreIO): inst_valid,
// inst, op1_data (rs1), op2_data (rs2), killd/killx/killm, wb_valid and
// wb_data (Valid(xLen) there), stall_pipeline. inst_illegal flags, in the
// D cycle, a vector-space instruction the unit does not execute (any
// other than vsetvli, unit-stride vle/vse, vadd.vv, vmul.vv, vredsum.vs;
// or any but vsetvli while vtype.vill; or vle/vse with EEW > SEW, which
// would need register groups). The vector configuration is kept here;
// set_vconfig_* reports each change and set_vs_dirty each write of vector
// state, for the core's CSR file. vstart, vxrm and vxsat are not used.
//
// inst_valid, the stage timing above and the one-at-a-time issue are this
// design's choices; the description fixes the attachment points (decode
// operands, writeback result, stall, kills, cache port) and the
// instruction set.
module vpu
  import vpu_pkg::*;
#(
  parameter int unsigned VLEN      = 128,
  parameter int unsigned PORT_BITS = 1,
  parameter logic [PORT_BITS-1:0] PORT_ID = 1'b1,
  localparam int unsigned VB   = VLEN / 8,
  localparam int unsigned VL_W = $clog2(VLEN / 8) + 1
) (
  input  logic            clk,
  input  logic            reset,
  // core pipeline
  input  logic            inst_valid,
  input  logic [31:0]     inst,
  input  logic [XLEN-1:0] op1_data,
  input  logic [XLEN-1:0] op2_data,
  input  logic            killd,
  input  logic            killx,
  input  logic            killm,
  output logic            wb_valid,
  output logic [XLEN-1:0] wb_data,
  output logic            stall_pipeline,
  output logic            inst_illegal,
  // CSR side
  output logic            set_vconfig_valid,
  output logic [VL_W-1:0] set_vconfig_vl,
  output vtype_t          set_vconfig_vtype,
  output logic            set_vs_dirty,
  // L1 data-cache port
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output dc_req_t         mem_req,
  input  logic            mem_resp_valid,
  input  dc_resp_t        mem_resp
);

  typedef enum logic [2:0] {S_D, S_X, S_M, S_E, S_W} stage_e;

  stage_e          stage;
  vdec_t           dec, dq;
  logic [XLEN-1:0] op1_q;
  logic            accept;

  // configuration
  logic [VL_W-1:0] vl, new_vl;
  vtype_t          vtype, new_vtype;
  sew_e            sew;

  // register file
  logic [VLEN-1:0] rd1, rd2, rd3;
  logic            vrf_we;
  logic [VB-1:0]   vrf_be;
  logic [VLEN-1:0] vrf_wd;

  // units
  logic [VLEN-1:0] add_sum, mul_prod, lsu_data;
  logic [63:0]     red_res;
  logic            mul_start, red_start, lsu_start;
  logic            mul_busy, red_busy, lsu_busy;
  logic            mul_done, red_done, lsu_done;

  // result held between M/E and W
  logic [VLEN-1:0] res_q;
  logic [VB-1:0]   be_q;
  logic            wr_q;

  assign sew = vtype.vsew;

  // ---------------------------------------------------------------- D
  vpu_decoder u_dec (.inst(inst), .dec(dec));

  logic supported;
  always_comb begin
    supported = dec.valid;
    if (dec.op != VOP_VSETVLI && vtype.vill) supported = 1'b0;
    if ((dec.op == VOP_LOAD || dec.op == VOP_STORE) && (dec.eew > sew)) supported = 1'b0;
  end

  assign accept       = (stage == S_D) && inst_valid && supported && !killd;
  assign inst_illegal = (stage == S_D) && inst_valid && !killd &&
                        (dec.illegal || (dec.valid && !supported));
  assign stall_pipeline = (stage != S_D);

  // -------------------------------------------------- state and units
  vpu_vconfig #(.VLEN(VLEN)) u_cfg (
    .clk, .reset,
    .we        (stage == S_W && dq.op == VOP_VSETVLI),
    .zimm      (dq.zimm),
    .avl_in    (op1_q),
    .rs1_is_x0 (dq.vs1 == 5'd0),
    .rd_is_x0  (dq.vd == 5'd0),
    .new_vl, .new_vtype, .vl, .vtype
  );

  vpu_vregfile #(.VLEN(VLEN)) u_vrf (
    .clk, .reset,
    .raddr1(dq.vs1), .rdata1(rd1),
    .raddr2(dq.vs2), .rdata2(rd2),
    .raddr3(dq.vd),  .rdata3(rd3),
    .we(vrf_we), .waddr(dq.vd), .wbe(vrf_be), .wdata(vrf_wd)
  );

  vpu_valu #(.VLEN(VLEN)) u_alu (.sew(sew), .a(rd2), .b(rd1), .sum(add_sum));

  vpu_vmul #(.VLEN(VLEN)) u_mul (
    .clk, .reset, .start(mul_start), .sew(sew), .a(rd2), .b(rd1),
    .busy(mul_busy), .done(mul_done), .prod(mul_prod)
  );

  vpu_vredsum #(.VLEN(VLEN)) u_red (
    .clk, .reset, .start(red_start), .sew(sew), .vl(vl),
    .vs1_e0(rd1[63:0]), .vs2(rd2),
    .busy(red_busy), .done(red_done), .result(red_res)
  );

  vpu_lsu #(.VLEN(VLEN), .PORT_BITS(PORT_BITS), .PORT_ID(PORT_ID)) u_lsu (
    .clk, .reset,
    .start(lsu_start), .is_store(dq.op == VOP_STORE), .base(op1_q),
    .eew(dq.eew), .vl(vl), .st_data(rd3),
    .busy(lsu_busy), .done(lsu_done), .ld_data(lsu_data),
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .resp_valid(mem_resp_valid), .resp(mem_resp)
  );

  logic go_m;  // the instruction leaves M un-killed
  assign go_m      = (stage == S_M) && !killm;
  assign mul_start = go_m && dq.op == VOP_MUL;
  assign red_start = go_m && dq.op == VOP_REDSUM;
  assign lsu_start = go_m && (dq.op == VOP_LOAD || dq.op == VOP_STORE);

  // byte enables of the body elements [0, vl) at width w
  function automatic logic [VB-1:0] body_be(logic [VL_W-1:0] n, sew_e w);
    logic [VB-1:0] m;
    for (int b = 0; b < VB; b++) m[b] = (b < (32'(n) << w));
    return m;
  endfunction

  logic [VB-1:0] be_e0;  // element 0 only, for the reduction
  assign be_e0 = (vl == 0) ? '0 : body_be(VL_W'(1), sew);

  // ------------------------------------------------------ stage flow
  always_ff @(posedge clk) begin
    if (reset) begin
      stage <= S_D;
      dq    <= '0;
      op1_q <= '0;
      res_q <= '0;
      be_q  <= '0;
      wr_q  <= 1'b0;
    end else begin
      unique case (stage)
        S_D: if (accept) begin
          dq    <= dec;
          op1_q <= op1_data;
          stage <= S_X;
        end
        S_X: stage <= killx ? S_D : S_M;
        S_M: begin
          if (killm) stage <= S_D;
          else begin
            wr_q <= 1'b0;
            unique case (dq.op)
              VOP_ADD: begin
                res_q <= add_sum;
                be_q  <= body_be(vl, sew);
                wr_q  <= 1'b1;
                stage <= S_W;
              end
              VOP_VSETVLI: stage <= S_W;
              default:     stage <= S_E;
            endcase
          end
        end
        S_E: begin
          if (mul_done) begin
            res_q <= mul_prod;
            be_q  <= body_be(vl, sew);
            wr_q  <= 1'b1;
            stage <= S_W;
          end
          if (red_done) begin
            res_q <= {{(VLEN - 64){1'b0}}, red_res};
            be_q  <= be_e0;
            wr_q  <= 1'b1;
            stage <= S_W;
          end
          if (lsu_done) begin
            res_q <= lsu_data;
            be_q  <= body_be(vl, dq.eew);
            wr_q  <= (dq.op == VOP_LOAD);
            stage <= S_W;
          end
        end
        S_W: stage <= S_D;
        default: stage <= S_D;
      endcase
    end
  end

  // ------------------------------------------------------------- W
  assign vrf_we = (stage == S_W) && wr_q && (|be_q);
  assign vrf_be = be_q;
  assign vrf_wd = res_q;

  assign wb_valid = (stage == S_W) && (dq.op == VOP_VSETVLI);
  assign wb_data  = XLEN'(new_vl);

  assign set_vconfig_valid = wb_valid;
  assign set_vconfig_vl    = new_vl;
  assign set_vconfig_vtype = new_vtype;
  assign set_vs_dirty      = wb_valid || vrf_we;

  // only one multi-cycle unit may run at a time
  a_one_unit: assert property (@(posedge clk) disable iff (reset)
    $onehot0({mul_busy, red_busy, lsu_busy}))
    else $error("vpu: two execution units busy at once");

endmodule
