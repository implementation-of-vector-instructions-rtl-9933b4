// vpu_vregfile: the 32 architectural vector registers, VLEN bits each.
//
// Three asynchronous read ports (vs1, vs2 and vd/vs3: the store data or
// the old destination value) and one synchronous write port with a byte
// enable per register byte, so that loads and arithmetic write only the
// body elements [0, vl) and leave the tail untouched. Leaving the tail
// undisturbed is one of the legal behaviours for the tail-agnostic
// policy the programs use.
//
// Timing: a write on a rising edge is visible on the read ports in the
// next cycle (no write-to-read bypass; the VPU runs one instruction at a
// time, so none is needed). Register contents are reset to zero.
module vpu_vregfile
  import vpu_pkg::*;
#(
  parameter int unsigned VLEN = 128,
  localparam int unsigned VB  = VLEN / 8
) (
  input  logic            clk,
  input  logic            reset,
  input  logic [4:0]      raddr1,
  output logic [VLEN-1:0] rdata1,
  input  logic [4:0]      raddr2,
  output logic [VLEN-1:0] rdata2,
  input  logic [4:0]      raddr3,
  output logic [VLEN-1:0] rdata3,
  input  logic            we,
  input  logic [4:0]      waddr,
  input  logic [VB-1:0]   wbe,
  input  logic [VLEN-1:0] wdata
);

  logic [VLEN-1:0] regs [NVREG];

  assign rdata1 = regs[raddr1];
  assign rdata2 = regs[raddr2];
  assign rdata3 = regs[raddr3];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int r = 0; r < NVREG; r++) regs[r] <= '0;
    end else if (we) begin
      for (int b = 0; b < VB; b++)
        if (wbe[b]) regs[waddr][b*8 +: 8] <= wdata[b*8 +: 8];
    end
  end

endmodule
