// rocket_vpu_top: the vector unit and the data-cache arbiter it shares
// with the scalar core, wired as in the core integration.
//
// The scalar core is not part of this RTL: its side of the vector unit
// interface (instruction and operands from decode, kills, writeback
// result, stall) and its own data-cache request port are ports of this
// module, and so is the single L1 data-cache port behind the arbiter.
// Arbiter port 0 is the core, port 1 the vector unit; the cache's
// response bus is delivered unchanged to both, and each side keeps the
// responses whose tag ends in its port number.
//
// Timing: no registers of its own; see vpu and dcache_arbiter.
module rocket_vpu_top
  import vpu_pkg::*;
#(
  parameter int unsigned VLEN = 128,
  localparam int unsigned VL_W = $clog2(VLEN / 8) + 1
) (
  input  logic            clk,
  input  logic            reset,
  // core <-> vector unit
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
  output logic            set_vconfig_valid,
  output logic [VL_W-1:0] set_vconfig_vl,
  output vtype_t          set_vconfig_vtype,
  output logic            set_vs_dirty,
  // core's own data-cache request port
  input  logic            core_req_valid,
  output logic            core_req_ready,
  input  dc_req_t         core_req,
  // shared data-cache response (to core and vector unit)
  output logic            core_resp_valid,
  output dc_resp_t        core_resp,
  // L1 data cache
  output logic            dc_req_valid,
  input  logic            dc_req_ready,
  output dc_req_t         dc_req,
  input  logic            dc_resp_valid,
  input  dc_resp_t        dc_resp
);

  localparam int unsigned NPORT = 2;

  logic [NPORT-1:0] arb_valid, arb_ready;
  dc_req_t          arb_req [NPORT];

  assign arb_valid[0] = core_req_valid;
  assign arb_req[0]   = core_req;
  assign core_req_ready = arb_ready[0];

  assign core_resp_valid = dc_resp_valid;
  assign core_resp       = dc_resp;

  vpu #(.VLEN(VLEN), .PORT_BITS(1), .PORT_ID(1'b1)) u_vpu (
    .clk, .reset,
    .inst_valid, .inst, .op1_data, .op2_data, .killd, .killx, .killm,
    .wb_valid, .wb_data, .stall_pipeline, .inst_illegal,
    .set_vconfig_valid, .set_vconfig_vl, .set_vconfig_vtype, .set_vs_dirty,
    .mem_req_valid (arb_valid[1]),
    .mem_req_ready (arb_ready[1]),
    .mem_req       (arb_req[1]),
    .mem_resp_valid(dc_resp_valid),
    .mem_resp      (dc_resp)
  );

  dcache_arbiter #(.N(NPORT)) u_arb (
    .clk, .reset,
    .in_valid(arb_valid), .in_ready(arb_ready), .in_req(arb_req),
    .out_valid(dc_req_valid), .out_ready(dc_req_ready), .out_req(dc_req)
  );

endmodule
