// workload_runner: one rocket_vpu_top of a given VLEN with a behavioural
// cache, and tasks that run the two strip-mined kernels the unit was built
// for, playing the scalar core: the testbench executes the scalar
// instructions of each loop itself (one cycle each) and hands the vector
// instructions, with their scalar operands, to the unit.
//
//   vvadd:  loop { t0 = vsetvli(a0, eW); vle v0,(a1); a0 -= t0; t0 <<= log2(W/8);
//                  a1 += t0; vle v1,(a2); a2 += t0; vadd.vv v2,v0,v1;
//                  vse v2,(a3); a3 += t0; bnez a0 }             11 per pass
//   dotprod: loop { t0 = vsetvli(a0, eW); vle v0,(a1); a0 -= t0; t0 <<= ...;
//                  a1 += t0; vle v1,(a2); a2 += t0; vmul.vv v2,v0,v1;
//                  vredsum.vs v3,v2,v3; bnez a0 }  vse v3,(a3)   10 per pass + 1
//
// Each task returns the number of instructions executed and the cycles
// from the first instruction to the last.
module workload_runner
  import vpu_pkg::*;
  import tb_rvv_pkg::*;
#(
  parameter int unsigned VLEN = 128
) (
  input logic clk
);
  localparam int unsigned VL_W = $clog2(VLEN / 8) + 1;

  logic reset = 1;
  logic inst_valid = 0, killd = 0, killx = 0, killm = 0;
  logic [31:0] inst = '0;
  logic [XLEN-1:0] op1_data = '0, op2_data = '0, wb_data;
  logic wb_valid, stall_pipeline, inst_illegal, set_vconfig_valid, set_vs_dirty;
  logic [VL_W-1:0] set_vconfig_vl;
  vtype_t set_vconfig_vtype;
  logic core_req_valid = 0, core_req_ready, core_resp_valid;
  dc_req_t core_req = '0;
  dc_resp_t core_resp;
  logic dc_req_valid, dc_req_ready, dc_resp_valid;
  dc_req_t dc_req;
  dc_resp_t dc_resp;

  rocket_vpu_top #(.VLEN(VLEN)) dut (.*);

  l1_dcache_model #(.LAT_MIN(2), .LAT_MAX(2), .READY_PCT(100)) u_mem (
    .clk, .reset, .req_valid(dc_req_valid), .req_ready(dc_req_ready), .req(dc_req),
    .resp_valid(dc_resp_valid), .resp(dc_resp)
  );

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic restart();
    reset = 1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
  endtask

  // vector instruction: present, wait for the unit, return wb data
  task automatic vinst(input logic [31:0] w, input logic [63:0] a1, output logic [63:0] wbd);
    inst_valid = 1; inst = w; op1_data = a1;
    @(posedge clk); #1;
    inst_valid = 0;
    wbd = '0;
    while (stall_pipeline) begin
      if (wb_valid) wbd = wb_data;
      @(posedge clk); #1;
    end
  endtask

  task automatic scalar(inout int count);
    @(posedge clk); #1;
    count++;
  endtask

  task automatic vvadd(input int n, input int w, input longint a, input longint b,
                       input longint c, output int count, output longint cycles);
    logic [63:0] t0, d;
    longint a0, a1, a2, a3, c0;
    a0 = n; a1 = a; a2 = b; a3 = c; count = 0; c0 = cycle;
    do begin
      vinst(enc_vsetvli(5, 10, w), a0, t0); count++;
      vinst(enc_vle(w, 0, 11), a1, d);      count++;
      a0 -= t0;      scalar(count);
      t0 <<= w;      scalar(count);
      a1 += t0;      scalar(count);
      vinst(enc_vle(w, 1, 12), a2, d);      count++;
      a2 += t0;      scalar(count);
      vinst(enc_vadd_vv(2, 0, 1), '0, d);   count++;
      vinst(enc_vse(w, 2, 13), a3, d);      count++;
      a3 += t0;      scalar(count);
      scalar(count); // bnez
    end while (a0 != 0);
    cycles = cycle - c0;
  endtask

  task automatic dotprod(input int n, input int w, input longint a, input longint b,
                         input longint c, output int count, output longint cycles);
    logic [63:0] t0, d;
    longint a0, a1, a2, c0;
    a0 = n; a1 = a; a2 = b; count = 0; c0 = cycle;
    do begin
      vinst(enc_vsetvli(5, 10, w), a0, t0); count++;
      vinst(enc_vle(w, 0, 11), a1, d);      count++;
      a0 -= t0;      scalar(count);
      t0 <<= w;      scalar(count);
      a1 += t0;      scalar(count);
      vinst(enc_vle(w, 1, 12), a2, d);      count++;
      a2 += t0;      scalar(count);
      vinst(enc_vmul_vv(2, 0, 1), '0, d);   count++;
      vinst(enc_vredsum_vs(3, 2, 3), '0, d); count++;
      scalar(count); // bnez
    end while (a0 != 0);
    vinst(enc_vse(w, 3, 13), c, d);         count++;
    cycles = cycle - c0;
  endtask

endmodule
