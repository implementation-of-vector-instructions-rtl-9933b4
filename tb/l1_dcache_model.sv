// l1_dcache_model: behavioural model of the L1 data cache for simulation.
//
// Not synthesizable. A sparse doubleword memory behind the request/
// response port of the vector unit and core (valid/ready requests with
// tag, addr, cmd, size, data, byte mask; one shared response bus). Every
// accepted request is answered once, LAT_MIN..LAT_MAX cycles later, so
// with LAT_MAX > LAT_MIN responses can come back out of order; a store is
// answered with has_data = 0. With READY_PCT < 100 the cache refuses a
// request on a random share of cycles. Tasks poke/peek give the testbench
// backdoor access. Requests must be naturally aligned (checked).
module l1_dcache_model
  import vpu_pkg::*;
#(
  parameter int unsigned LAT_MIN   = 2,
  parameter int unsigned LAT_MAX   = 2,
  parameter int unsigned READY_PCT = 100
) (
  input  logic     clk,
  input  logic     reset,
  input  logic     req_valid,
  output logic     req_ready,
  input  dc_req_t  req,
  output logic     resp_valid,
  output dc_resp_t resp
);

  logic [63:0] mem [logic [ADDR_W-4:0]];

  typedef struct {
    dc_resp_t    r;
    longint      due;
  } pend_t;
  pend_t  pend [$];
  longint now;
  int unsigned n_req, n_refused;

  task automatic poke(input logic [ADDR_W-1:0] a, input logic [63:0] d);
    mem[a[ADDR_W-1:3]] = d;
  endtask

  function automatic logic [63:0] peek(input logic [ADDR_W-1:0] a);
    if (mem.exists(a[ADDR_W-1:3])) return mem[a[ADDR_W-1:3]];
    return '0;
  endfunction

  function automatic logic [63:0] byte_mask(input logic [7:0] m);
    logic [63:0] r;
    for (int i = 0; i < 8; i++) r[i*8 +: 8] = {8{m[i]}};
    return r;
  endfunction

  initial begin
    req_ready  = 1'b0;
    resp_valid = 1'b0;
    resp       = '0;
    now        = 0;
    n_req      = 0;
    n_refused  = 0;
  end

  always @(posedge clk) begin
    now <= now + 1;
    if (reset) begin
      pend.delete();
      resp_valid <= 1'b0;
      req_ready  <= 1'b0;
    end else begin
      // accept
      if (req_valid && req_ready) begin
        pend_t p;
        logic [63:0] old;
        n_req++;
        if ((req.addr & ((ADDR_W'(1) << req.size) - 1)) != 0)
          $error("l1_dcache_model: misaligned access %h size %0d", req.addr, req.size);
        old = peek(req.addr);
        p.r = '0;
        p.r.addr = req.addr;
        p.r.tag  = req.tag;
        p.r.cmd  = req.cmd;
        p.r.size = req.size;
        if (req.cmd == M_XWR) begin
          poke(req.addr, (old & ~byte_mask(req.mask)) | (req.data & byte_mask(req.mask)));
          p.r.has_data = 1'b0;
        end else begin
          p.r.data     = old;
          p.r.has_data = 1'b1;
        end
        p.due = now + LAT_MIN + ((LAT_MAX > LAT_MIN) ? $urandom_range(LAT_MAX - LAT_MIN) : 0);
        pend.push_back(p);
      end else if (req_valid) n_refused++;
      // respond: first pending entry that is due (may overtake older ones)
      resp_valid <= 1'b0;
      for (int i = 0; i < pend.size(); i++)
        if (pend[i].due <= now) begin
          resp_valid <= 1'b1;
          resp       <= pend[i].r;
          pend.delete(i);
          break;
        end
      req_ready <= ($urandom_range(99) < READY_PCT);
    end
  end

endmodule
