// tb_rvv_pkg: instruction encoders for the testbenches.
//
// Builds the 32-bit words of the RVV instructions the vector unit runs,
// field by field from the RVV 1.0 instruction formats, independently of
// the RTL decoder. Also holds a few scalar-side helpers.
package tb_rvv_pkg;

  function automatic logic [31:0] enc_vsetvli(int rd, int rs1, int sew_log2b,
                                              bit ta = 1, bit ma = 1);
    logic [10:0] zimm;
    zimm = {3'b000, ma, ta, 1'b0, 2'(sew_log2b), 3'b000};
    return {1'b0, zimm, 5'(rs1), 3'b111, 5'(rd), 7'b1010111};
  endfunction

  // width code of vle/vse from log2 of the element bytes
  function automatic logic [2:0] wcode(int eew_log2b);
    case (eew_log2b)
      0: return 3'b000;
      1: return 3'b101;
      2: return 3'b110;
      default: return 3'b111;
    endcase
  endfunction

  function automatic logic [31:0] enc_vle(int eew_log2b, int vd, int rs1);
    return {3'b000, 1'b0, 2'b00, 1'b1, 5'b00000, 5'(rs1), wcode(eew_log2b), 5'(vd), 7'b0000111};
  endfunction

  function automatic logic [31:0] enc_vse(int eew_log2b, int vs3, int rs1);
    return {3'b000, 1'b0, 2'b00, 1'b1, 5'b00000, 5'(rs1), wcode(eew_log2b), 5'(vs3), 7'b0100111};
  endfunction

  function automatic logic [31:0] enc_opv(logic [5:0] f6, logic [2:0] f3, int vd, int vs2, int vs1,
                                          bit vm = 1);
    return {f6, vm, 5'(vs2), 5'(vs1), f3, 5'(vd), 7'b1010111};
  endfunction

  function automatic logic [31:0] enc_vadd_vv(int vd, int vs2, int vs1);
    return enc_opv(6'b000000, 3'b000, vd, vs2, vs1);
  endfunction

  function automatic logic [31:0] enc_vmul_vv(int vd, int vs2, int vs1);
    return enc_opv(6'b100101, 3'b010, vd, vs2, vs1);
  endfunction

  function automatic logic [31:0] enc_vredsum_vs(int vd, int vs2, int vs1);
    return enc_opv(6'b000000, 3'b010, vd, vs2, vs1);
  endfunction

  // a few words that are not executed by the vector unit
  localparam logic [31:0] ENC_ADDI   = 32'h00150513;  // addi a0, a0, 1 (scalar)
  localparam logic [31:0] ENC_FLD    = 32'h0005b007;  // fld f0, 0(a1) (scalar FP)
  localparam logic [31:0] ENC_VSUBVV = 32'h0a208057;  // vsub.vv v0, v2, v1 (not supported)

  function automatic logic [63:0] mask_of(int sew_log2b);
    return (sew_log2b == 3) ? '1 : ((64'd1 << (8 << sew_log2b)) - 1);
  endfunction

endpackage
