// tb_vpu_vconfig: checks vl = min(AVL, VLEN/SEW) for every SEW, the three
// AVL cases of vsetvli (rs1 given, rs1 = x0 with rd != x0, both x0), the
// vill result of unsupported vtypes and the reset state.
module tb_vpu_vconfig;
  import vpu_pkg::*;

  localparam int unsigned VLEN = 128;
  localparam int unsigned VL_W = $clog2(VLEN / 8) + 1;

  logic clk = 0, reset = 1, we = 0, rs1_is_x0 = 0, rd_is_x0 = 0;
  logic [10:0] zimm = '0;
  logic [XLEN-1:0] avl = '0;
  logic [VL_W-1:0] new_vl, vl;
  vtype_t new_vtype, vtype;
  int checks = 0, failures = 0;

  vpu_vconfig dut (.*, .avl_in(avl));

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic setvl(int sew, longint a, bit x0s1, bit x0d, logic [10:0] z = 11'h7ff);
    zimm = (z == 11'h7ff) ? {3'b000, 1'b1, 1'b1, 1'b0, 2'(sew), 3'b000} : z;
    avl = a; rs1_is_x0 = x0s1; rd_is_x0 = x0d; we = 1;
    @(posedge clk); #1; we = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 reset = 0;
    check("reset vill", vtype.vill, 1);
    check("reset vl", vl, 0);
    for (int sew = 0; sew < 4; sew++) begin
      automatic int vlmax = VLEN / (8 << sew);
      for (int t = 0; t < 12; t++) begin
        automatic longint a = (t < 10) ? t * 3 : ((t == 10) ? 64'hffff_ffff_ffff : vlmax);
        automatic longint e = (a < vlmax) ? a : vlmax;
        setvl(sew, a, 0, 0);
        check($sformatf("vl sew=%0d avl=%0d", sew, a), vl, e);
        check("vsew", vtype.vsew, sew);
        check("vill", vtype.vill, 0);
        check("vta/vma", {vtype.vta, vtype.vma}, 2'b11);
      end
      setvl(sew, 1, 1, 0);
      check("rs1=x0 rd!=x0 -> VLMAX", vl, vlmax);
    end
    setvl(2, 3, 0, 0);               // vl = 3 at SEW=32
    setvl(3, 99, 1, 1);              // keep vl, change SEW to 64 (VLMAX 2)
    check("rs1=x0 rd=x0 keeps vl (clamped)", vl, 2);
    setvl(0, 5, 0, 0, {3'b000, 1'b0, 1'b0, 1'b0, 2'd0, 3'b001});  // LMUL = 2
    check("LMUL=2 vill", vtype.vill, 1);
    check("LMUL=2 vl", vl, 0);
    setvl(0, 5, 0, 0, {3'b000, 1'b0, 1'b0, 1'b1, 2'd0, 3'b000});  // SEW = 128
    check("SEW=128 vill", vtype.vill, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
