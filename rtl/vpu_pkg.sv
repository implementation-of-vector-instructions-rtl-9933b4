// vpu_pkg: types and constants shared by the vector unit (VPU) of a
// five-stage RV64 in-order core.
//
// It holds the scalar data width (64 bits, RV64), the RVV instruction
// encodings of the few instructions the unit supports (vsetvli,
// unit-stride vle/vse of 8/16/32/64-bit elements, vadd.vv, vmul.vv,
// vredsum.vs), the element-width encoding shared by vtype.vsew and the
// memory instructions, and the request/response structs of the L1
// data-cache port (modelled on the core's HellaCache interface: tag,
// addr, cmd, size, signed, data and byte mask on the request; the same
// addr, tag, cmd and size plus data and has_data on the response).
//
// The set of instructions, the 32 vector registers and the shape of the
// cache port follow the design description; the bit encodings are the
// ones of the ratified RVV 1.0 specification and the HellaCache command
// codes are those of Rocket (M_XRD = 0, M_XWR = 1).
package vpu_pkg;

  localparam int unsigned XLEN       = 64;  // scalar register width (RV64)
  localparam int unsigned NVREG      = 32;  // architectural vector registers
  localparam int unsigned CORE_DBITS = 64;  // data-cache data width
  localparam int unsigned CORE_DBYTES = CORE_DBITS / 8;
  localparam int unsigned ADDR_W     = 40;  // core physical/virtual address bits
  localparam int unsigned TAG_W      = 8;   // data-cache request tag width
  localparam int unsigned M_SZ       = 5;   // width of the memory command

  // Memory commands (subset of Rocket's MemoryOpConstants)
  localparam logic [M_SZ-1:0] M_XRD = 5'b00000;
  localparam logic [M_SZ-1:0] M_XWR = 5'b00001;

  // Major opcodes
  localparam logic [6:0] OPC_OP_V     = 7'b1010111;
  localparam logic [6:0] OPC_LOAD_FP  = 7'b0000111;
  localparam logic [6:0] OPC_STORE_FP = 7'b0100111;

  // OP-V funct3 categories
  localparam logic [2:0] F3_OPIVV = 3'b000;
  localparam logic [2:0] F3_OPMVV = 3'b010;
  localparam logic [2:0] F3_OPCFG = 3'b111;

  // funct6 values
  localparam logic [5:0] F6_VADD    = 6'b000000; // OPIVV
  localparam logic [5:0] F6_VREDSUM = 6'b000000; // OPMVV
  localparam logic [5:0] F6_VMUL    = 6'b100101; // OPMVV

  // Element width, log2(bytes): same code as vtype.vsew
  typedef enum logic [1:0] {
    SEW8  = 2'd0,
    SEW16 = 2'd1,
    SEW32 = 2'd2,
    SEW64 = 2'd3
  } sew_e;

  // Operation classes the unit executes
  typedef enum logic [2:0] {
    VOP_NONE   = 3'd0,
    VOP_VSETVLI = 3'd1,
    VOP_LOAD   = 3'd2,
    VOP_STORE  = 3'd3,
    VOP_ADD    = 3'd4,
    VOP_MUL    = 3'd5,
    VOP_REDSUM = 3'd6
  } vop_e;

  // Decoded instruction
  typedef struct packed {
    logic        valid;    // a supported vector instruction
    logic        illegal;  // a vector-space encoding the unit does not support
    vop_e        op;
    logic [4:0]  vd;       // also rd for vsetvli
    logic [4:0]  vs1;      // also rs1 for vsetvli
    logic [4:0]  vs2;
    sew_e        eew;      // memory element width (vle/vse)
    logic [10:0] zimm;     // vtype immediate of vsetvli
  } vdec_t;

  // vtype CSR (only the fields the unit uses)
  typedef struct packed {
    logic       vill;
    logic       vma;
    logic       vta;
    sew_e       vsew;
    logic [2:0] vlmul;
  } vtype_t;

  // Data-cache request (HasCoreMemOp + HasCoreData)
  typedef struct packed {
    logic [ADDR_W-1:0]      addr;
    logic [TAG_W-1:0]       tag;
    logic [M_SZ-1:0]        cmd;
    logic [1:0]             size;   // log2 of the access size in bytes
    logic                   signed_; // sign-extend a load
    logic [CORE_DBITS-1:0]  data;   // store data
    logic [CORE_DBYTES-1:0] mask;   // store byte enables
  } dc_req_t;

  // Data-cache response (shared by every requester): the request's
  // memory-operation fields plus the data
  typedef struct packed {
    logic [ADDR_W-1:0]     addr;
    logic [TAG_W-1:0]      tag;
    logic [M_SZ-1:0]       cmd;
    logic [1:0]            size;
    logic                  has_data;
    logic [CORE_DBITS-1:0] data;
  } dc_resp_t;

endpackage
