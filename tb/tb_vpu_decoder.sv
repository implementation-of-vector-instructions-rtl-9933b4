// tb_vpu_decoder: checks the decoder on every supported instruction with
// random register fields, on unsupported vector encodings (illegal) and on
// scalar words (ignored).
module tb_vpu_decoder;
  import vpu_pkg::*;
  import tb_rvv_pkg::*;

  logic [31:0] inst;
  vdec_t       dec;
  int          checks = 0, failures = 0;

  vpu_decoder dut (.inst(inst), .dec(dec));

  task automatic expect_op(string what, logic [31:0] w, vop_e op, int vd, int vs1, int vs2,
                           int eew = -1);
    inst = w;
    #1;
    checks++;
    if (!dec.valid || dec.illegal || dec.op != op || dec.vd != 5'(vd) || dec.vs1 != 5'(vs1) ||
        (vs2 >= 0 && dec.vs2 != 5'(vs2)) || (eew >= 0 && dec.eew != sew_e'(eew))) begin
      failures++;
      $display("FAIL %s: inst=%h got valid=%0d ill=%0d op=%0d vd=%0d vs1=%0d vs2=%0d eew=%0d",
               what, w, dec.valid, dec.illegal, dec.op, dec.vd, dec.vs1, dec.vs2, dec.eew);
    end
  endtask

  task automatic expect_class(string what, logic [31:0] w, bit ill);
    inst = w;
    #1;
    checks++;
    if (dec.valid || dec.illegal != ill) begin
      failures++;
      $display("FAIL %s: inst=%h valid=%0d illegal=%0d", what, w, dec.valid, dec.illegal);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++) begin
      int a, b, c, w;
      a = $urandom_range(31); b = $urandom_range(31); c = $urandom_range(31);
      w = $urandom_range(3);
      expect_op("vsetvli", enc_vsetvli(a, b, w), VOP_VSETVLI, a, b, -1);
      checks++;
      if (dec.zimm[4:3] != 2'(w) || dec.zimm[6] != 1'b1 || dec.zimm[7] != 1'b1) begin
        failures++; $display("FAIL vsetvli zimm %h", dec.zimm);
      end
      expect_op("vle",     enc_vle(w, a, b),        VOP_LOAD,   a, b, -1, w);
      expect_op("vse",     enc_vse(w, a, b),        VOP_STORE,  a, b, -1, w);
      expect_op("vadd",    enc_vadd_vv(a, b, c),    VOP_ADD,    a, c, b);
      expect_op("vmul",    enc_vmul_vv(a, b, c),    VOP_MUL,    a, c, b);
      expect_op("vredsum", enc_vredsum_vs(a, b, c), VOP_REDSUM, a, c, b);
    end
    expect_class("vsub.vv",         ENC_VSUBVV, 1);
    expect_class("masked vadd",     enc_opv(6'b000000, 3'b000, 1, 2, 3, 0), 1);
    expect_class("strided vle",     enc_vle(2, 1, 2) | 32'h0800_0000, 1);
    expect_class("segment vle",     enc_vle(2, 1, 2) | 32'h2000_0000, 1);
    expect_class("vsetvl",          enc_vsetvli(1, 2, 0) | 32'h8000_0000, 1);
    expect_class("vadd.vx",         enc_opv(6'b000000, 3'b100, 1, 2, 3), 1);
    expect_class("addi",            ENC_ADDI, 0);
    expect_class("fld",             ENC_FLD, 0);
    expect_class("flw",             32'h0005a007, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
