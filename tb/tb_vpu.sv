// tb_vpu: the vector unit on its own, connected straight to a behavioural
// cache that refuses requests at random and answers out of order (the
// testbench puts the unit's port number into the request tag, which the
// arbiter does in the full design). The testbench plays the scalar core:
// a random stream of vector instructions with their scalar operands,
// waiting while stall_pipeline is high, with kills in the decode, execute
// and memory stages. An architectural reference model (vl, vtype, 32
// registers, memory) predicts vsetvli's returned vl, every store, the
// illegal-instruction flag and the stall length of the fixed-latency
// instructions; at the end all 32 registers are stored and compared.
module tb_vpu;
  import vpu_pkg::*;
  import tb_rvv_pkg::*;

  localparam int unsigned VLEN = 128;           // default of rocket_vpu_top
  localparam int unsigned VB   = VLEN / 8;
  localparam int unsigned VL_W = $clog2(VLEN / 8) + 1;
  localparam int NINST = 800;
  localparam longint VBASE = 'h1000, VSPAN = 'h200, DUMP = 'h4000;

  logic clk = 0, reset = 1;
  logic inst_valid = 0, killd = 0, killx = 0, killm = 0;
  logic [31:0] inst = '0;
  logic [XLEN-1:0] op1_data = '0, op2_data = '0, wb_data;
  logic wb_valid, stall_pipeline, inst_illegal;
  logic set_vconfig_valid, set_vs_dirty;
  logic [VL_W-1:0] set_vconfig_vl;
  vtype_t set_vconfig_vtype;
  logic dc_req_valid, dc_req_ready, dc_resp_valid;
  dc_req_t dc_req;
  dc_resp_t dc_resp;

  dc_req_t mem_req, tagged_req;

  vpu dut (
    .clk, .reset, .inst_valid, .inst, .op1_data, .op2_data, .killd, .killx, .killm,
    .wb_valid, .wb_data, .stall_pipeline, .inst_illegal,
    .set_vconfig_valid, .set_vconfig_vl, .set_vconfig_vtype, .set_vs_dirty,
    .mem_req_valid(dc_req_valid), .mem_req_ready(dc_req_ready), .mem_req(mem_req),
    .mem_resp_valid(dc_resp_valid), .mem_resp(dc_resp)
  );

  always_comb begin
    tagged_req = mem_req;
    tagged_req.tag[0] = 1'b1;
  end
  assign dc_req = tagged_req;

  l1_dcache_model #(.LAT_MIN(1), .LAT_MAX(5), .READY_PCT(75)) u_mem (
    .clk, .reset, .req_valid(dc_req_valid), .req_ready(dc_req_ready), .req(tagged_req),
    .resp_valid(dc_resp_valid), .resp(dc_resp)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL [%0d] %s: got %h expected %h", cycle, what, got, exp);
    end
  endtask

  // ---------------------------------------------------- reference model
  logic [VLEN-1:0] rv [32];
  int              rvl;
  int              rsew;
  bit              rvill;
  logic [7:0]      rmem [longint];

  function automatic logic [7:0] mem_byte(longint a);
    logic [63:0] d;
    d = u_mem.peek(ADDR_W'(a));
    return d[(a % 8) * 8 +: 8];
  endfunction

  function automatic logic [63:0] elem(logic [VLEN-1:0] v, int e, int w);
    return 64'(v >> (e * (8 << w))) & mask_of(w);
  endfunction

  function automatic logic [VLEN-1:0] set_elem(logic [VLEN-1:0] v, int e, int w, logic [63:0] x);
    logic [VLEN-1:0] m;
    m = VLEN'(mask_of(w)) << (e * (8 << w));
    return (v & ~m) | ((VLEN'(x & mask_of(w)) << (e * (8 << w))) & m);
  endfunction

  // ----------------------------------------------------- counters
  int n_stall = 0, n_killd = 0, n_killx = 0, n_killm = 0, n_illegal = 0, n_vill = 0;
  int n_refused = 0, n_tail = 0, n_unaligned = 0;
  int n_op [vop_e];
  int n_ignored = 0, n_wb = 0, n_dirty = 0, n_ooo = 0;

  always @(posedge clk) if (!reset) begin
    if (stall_pipeline) n_stall++;
    if (in_vmem && dc_req_valid && !dc_req_ready) n_refused++;
    if (set_vs_dirty) n_dirty++;
  end

  // a VPU response that overtakes an older one of the same instruction
  int last_beat = -1;
  bit in_vmem = 0;     // a vector load/store is in flight
  always @(posedge clk) if (!reset) begin
    if (dc_resp_valid && dc_resp.tag[0]) begin
      if (int'(dc_resp.tag >> 1) < last_beat) n_ooo++;
      last_beat = int'(dc_resp.tag >> 1);
    end
  end

  // ---------------------------------------------------- the core driver
  task automatic issue(input logic [31:0] w, input logic [63:0] a1, input int kill,
                       output int scyc, output bit got_wb, output logic [63:0] wbd,
                       output bit ill);
    while (stall_pipeline) begin @(posedge clk); #1; end
    inst_valid = 1; inst = w; op1_data = a1; op2_data = {$urandom, $urandom};
    killd = (kill == 1);
    #1 ill = inst_illegal;
    @(posedge clk); #1;
    inst_valid = 0; killd = 0; inst = {$urandom};
    killx = (kill == 2);
    scyc = 0; got_wb = 0; wbd = '0;
    while (stall_pipeline) begin
      if (wb_valid) begin got_wb = 1; wbd = wb_data; end
      @(posedge clk); #1;
      scyc++;
      killx = 0;
      killm = (kill == 3) && (scyc == 1);
    end
    killm = 0;
  endtask

  // ------------------------------------------------ one reference step
  task automatic step(input int kind, input int kill);
    logic [31:0] w;
    logic [63:0] a1, wbd;
    int scyc, exp_scyc, vd, vs1, vs2, eew, sew_n;
    bit got_wb, ill, exp_ill, will_run;
    vop_e op;
    vd = $urandom_range(7); vs1 = $urandom_range(7); vs2 = $urandom_range(7);
    a1 = '0; exp_ill = 0; exp_scyc = -1; op = VOP_NONE; eew = 0; sew_n = 0;
    unique case (kind)
      0: begin  // vsetvli
        sew_n = $urandom_range(3);
        vs1 = ($urandom_range(7) == 0) ? 0 : 10;
        vd  = ($urandom_range(7) == 0) ? 0 : 5;
        a1 = $urandom_range(20);
        w = enc_vsetvli(vd, vs1, sew_n);
        if ($urandom_range(30) == 0) w[22:20] = 3'b001;   // LMUL = 2: unsupported
        op = VOP_VSETVLI; exp_scyc = 3;
      end
      1, 2: begin  // vle / vse
        eew = $urandom_range(rsew);
        if ($urandom_range(15) == 0) eew = 3;              // may exceed SEW
        a1 = VBASE + ($urandom_range(VSPAN - VB - 1) & ~((1 << eew) - 1));
        w = (kind == 1) ? enc_vle(eew, vd, 11) : enc_vse(eew, vd, 11);
        op = (kind == 1) ? VOP_LOAD : VOP_STORE;
        if (eew > rsew) exp_ill = 1;
      end
      3: begin w = enc_vadd_vv(vd, vs2, vs1);    op = VOP_ADD;    exp_scyc = 3; end
      4: begin w = enc_vmul_vv(vd, vs2, vs1);    op = VOP_MUL;    exp_scyc = VLEN / 64 + 4; end
      5: begin w = enc_vredsum_vs(vd, vs2, vs1); op = VOP_REDSUM; exp_scyc = rvl + 5; end
      6: begin w = ENC_VSUBVV; exp_ill = 1; end
      default: begin w = ENC_FLD; end                       // not a vector instruction
    endcase
    if (op != VOP_NONE && op != VOP_VSETVLI && rvill) exp_ill = 1;
    will_run = (op != VOP_NONE) && !exp_ill;
    if (!will_run) kill = 0;
    last_beat = -1;
    in_vmem = will_run && (op == VOP_LOAD || op == VOP_STORE);
    issue(w, a1, kill, scyc, got_wb, wbd, ill);
    in_vmem = 0;
    check("illegal flag", ill, exp_ill);
    if (exp_ill) n_illegal++;
    if (exp_ill && rvill && op != VOP_NONE) n_vill++;
    if (!will_run) begin
      if (op == VOP_NONE && !exp_ill) n_ignored++;
      check("no stall for a refused instruction", scyc, 0);
      return;
    end
    if (kill != 0) begin
      check("stall cycles of a killed instruction", scyc, kill - 1);
      check("no writeback of a killed instruction", got_wb, 0);
      if (kill == 1) n_killd++; else if (kill == 2) n_killx++; else n_killm++;
      return;
    end
    if (exp_scyc >= 0) check($sformatf("stall cycles of op %0d", op), scyc, exp_scyc);
    n_op[op]++;
    unique case (op)
      VOP_VSETVLI: begin
        int vlmax, avl;
        bit bad;
        bad = (w[22:20] != 3'b000);
        vlmax = VLEN / (8 << sew_n);
        if (vs1 != 0) avl = int'(a1); else if (vd != 0) avl = 1 << 30; else avl = rvl;
        rvill = bad;
        rvl = bad ? 0 : ((avl < vlmax) ? avl : vlmax);
        rsew = bad ? 0 : sew_n;
        check("vsetvli writeback valid", got_wb, 1);
        check("vsetvli returned vl", wbd, rvl);
        n_wb++;
      end
      VOP_LOAD: begin
        for (int i = 0; i < (rvl << eew); i++) rv[vd][i*8 +: 8] = rmem[a1 + i];
        if (a1 % 8 != 0 && rvl > 0) n_unaligned++;
      end
      VOP_STORE: begin
        for (int i = 0; i < (rvl << eew); i++) rmem[a1 + i] = rv[vd][i*8 +: 8];
        for (longint a = a1 - 8; a < a1 + (rvl << eew) + 8; a++)
          check($sformatf("memory byte %h after vse", a), mem_byte(a), rmem.exists(a) ? rmem[a] : 8'h00);
        if (a1 % 8 != 0 && rvl > 0) n_unaligned++;
      end
      VOP_ADD, VOP_MUL: begin
        logic [VLEN-1:0] r;
        r = rv[vd];
        for (int e = 0; e < rvl; e++)
          r = set_elem(r, e, rsew, (op == VOP_ADD) ? elem(rv[vs2], e, rsew) + elem(rv[vs1], e, rsew)
                                                   : elem(rv[vs2], e, rsew) * elem(rv[vs1], e, rsew));
        rv[vd] = r;
        if (rvl < VLEN / (8 << rsew)) n_tail++;
      end
      VOP_REDSUM: begin
        logic [63:0] acc;
        acc = elem(rv[vs1], 0, rsew);
        for (int e = 0; e < rvl; e++) acc += elem(rv[vs2], e, rsew);
        if (rvl > 0) rv[vd] = set_elem(rv[vd], 0, rsew, acc);
      end
      default: ;
    endcase
  endtask

  initial begin
    #(20 * NINST * 60);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int scyc;
    bit gw, il;
    logic [63:0] wd;
    for (int r = 0; r < 32; r++) rv[r] = '0;
    rvl = 0; rsew = 0; rvill = 1;
    for (longint a = VBASE; a < VBASE + VSPAN; a += 8) begin
      logic [63:0] d;
      d = {$urandom, $urandom};
      u_mem.poke(ADDR_W'(a), d);
      for (int i = 0; i < 8; i++) rmem[a + i] = d[i*8 +: 8];
    end
    repeat (4) @(posedge clk);
    #1 reset = 0;
    step(3, 0);                       // vadd before any vsetvli: vill
    for (int n = 0; n < NINST; n++) begin
      int k, r, kill;
      r = $urandom_range(99);
      k = (r < 15) ? 0 : (r < 35) ? 1 : (r < 50) ? 2 : (r < 65) ? 3 : (r < 80) ? 4 :
          (r < 92) ? 5 : (r < 96) ? 6 : 7;
      r = $urandom_range(99);
      kill = (r < 4) ? 1 : (r < 8) ? 2 : (r < 12) ? 3 : 0;
      step(k, kill);
    end
    // dump all registers with vse8 at vl = VLEN/8
    issue(enc_vsetvli(5, 0, 0), '0, 0, scyc, gw, wd, il);
    check("vl for the dump", wd, VB);
    for (int r = 0; r < 32; r++) begin
      issue(enc_vse(0, r, 11), DUMP + r * VB, 0, scyc, gw, wd, il);
      for (int i = 0; i < VB; i++)
        check($sformatf("final v%0d byte %0d", r, i), mem_byte(DUMP + r * VB + i), rv[r][i*8 +: 8]);
    end
    repeat (20) @(posedge clk);
    for (longint a = VBASE; a < VBASE + VSPAN; a++) check("final memory", mem_byte(a), rmem[a]);
    $display("vsetvli %0d, vle %0d, vse %0d, vadd %0d, vmul %0d, vredsum %0d",
             n_op[VOP_VSETVLI], n_op[VOP_LOAD], n_op[VOP_STORE], n_op[VOP_ADD], n_op[VOP_MUL],
             n_op[VOP_REDSUM]);
    $display("stall cycles %0d, killed in D/X/M %0d/%0d/%0d, illegal %0d (under vill %0d), ignored %0d",
             n_stall, n_killd, n_killx, n_killm, n_illegal, n_vill, n_ignored);
    $display("refused requests %0d, out-of-order responses %0d", n_refused, n_ooo);
    $display("tail kept %0d, unaligned accesses %0d, vl writebacks %0d, vs-dirty %0d",
             n_tail, n_unaligned, n_wb, n_dirty);
    for (int o = 1; o <= 6; o++) check($sformatf("op %0d executed", o), n_op.exists(vop_e'(o)), 1);
    check("stall happened", n_stall > 0, 1);
    check("killd happened", n_killd > 0, 1);
    check("killx happened", n_killx > 0, 1);
    check("killm happened", n_killm > 0, 1);
    check("illegal happened", n_illegal > 0, 1);
    check("vill refusal happened", n_vill > 0, 1);
    check("non-vector ignored", n_ignored > 0, 1);
    check("cache refusal happened", n_refused > 0, 1);
    check("out-of-order responses happened", n_ooo > 0, 1);
    check("tail preserved case happened", n_tail > 0, 1);
    check("unaligned access happened", n_unaligned > 0, 1);
    check("vs-dirty reported", n_dirty > 0, 1);
    $display("cycles %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
