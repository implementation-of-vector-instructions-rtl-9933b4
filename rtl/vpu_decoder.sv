// vpu_decoder: recognises the vector instructions the VPU executes.
//
// Purely combinational. From a 32-bit instruction word it produces a
// vdec_t: `valid` for one of the supported instructions, `illegal` for an
// encoding that lies in the vector space (OP-V, or LOAD-FP/STORE-FP with a
// vector width code) but that this unit does not implement, and the
// register fields, memory element width and vsetvli immediate.
//
// Supported, as the design description lists them: vsetvli, unit-stride
// vle8/16/32/64.v and vse8/16/32/64.v, vadd.vv, vmul.vv, vredsum.vs.
// Field positions and codes are those of RVV 1.0. Only unmasked forms
// (vm = 1) are supported, since masking is not part of the unit; a masked
// form, a strided/indexed/segment access or any other OP-V instruction is
// reported as illegal. LOAD-FP/STORE-FP with a scalar FP width code
// (001..100) is neither: it belongs to the scalar FPU.
module vpu_decoder
  import vpu_pkg::*;
(
  input  logic [31:0] inst,
  output vdec_t       dec
);

  logic [6:0] opcode;
  logic [2:0] funct3;
  logic [5:0] funct6;
  logic       vm;
  logic       vwidth;     // width field is one of the vector codes
  sew_e       mem_eew;
  logic       unit_stride;

  assign opcode = inst[6:0];
  assign funct3 = inst[14:12];
  assign funct6 = inst[31:26];
  assign vm     = inst[25];

  always_comb begin
    vwidth  = 1'b1;
    mem_eew = SEW8;
    unique case (funct3)
      3'b000:  mem_eew = SEW8;
      3'b101:  mem_eew = SEW16;
      3'b110:  mem_eew = SEW32;
      3'b111:  mem_eew = SEW64;
      default: vwidth  = 1'b0;
    endcase
  end

  // nf = 0, mew = 0, mop = unit-stride, lumop/sumop = 0, unmasked
  assign unit_stride = (inst[31:29] == 3'b000) && !inst[28] &&
                       (inst[27:26] == 2'b00) && vm && (inst[24:20] == 5'b00000);

  always_comb begin
    dec         = '0;
    dec.op      = VOP_NONE;
    dec.vd      = inst[11:7];
    dec.vs1     = inst[19:15];
    dec.vs2     = inst[24:20];
    dec.eew     = mem_eew;
    dec.zimm    = inst[30:20];
    unique case (opcode)
      OPC_OP_V: begin
        if (funct3 == F3_OPCFG) begin
          if (!inst[31]) dec.op = VOP_VSETVLI;
        end else if (vm) begin
          if (funct3 == F3_OPIVV && funct6 == F6_VADD)    dec.op = VOP_ADD;
          if (funct3 == F3_OPMVV && funct6 == F6_VMUL)    dec.op = VOP_MUL;
          if (funct3 == F3_OPMVV && funct6 == F6_VREDSUM) dec.op = VOP_REDSUM;
        end
        dec.valid   = (dec.op != VOP_NONE);
        dec.illegal = !dec.valid;
      end
      OPC_LOAD_FP: if (vwidth) begin
        if (unit_stride) dec.op = VOP_LOAD;
        dec.valid   = unit_stride;
        dec.illegal = !unit_stride;
      end
      OPC_STORE_FP: if (vwidth) begin
        if (unit_stride) dec.op = VOP_STORE;
        dec.valid   = unit_stride;
        dec.illegal = !unit_stride;
      end
      default: ;
    endcase
  end

endmodule
