// dcache_arbiter: shares one L1 data-cache request port among N clients.
//
// The scalar core and the vector unit each have a request port; the
// arbiter passes one request per cycle to the cache when the cache is
// ready (fixed priority, port 0 first, as in the host core's cache
// arbiter) and writes the number of the granted port into the low
// PORT_BITS bits of the tag. Responses are not routed: the response bus
// is shared, and each client recognises its own responses by those tag
// bits. Clients leave the low PORT_BITS bits of their tags zero.
//
// Timing: combinational, no added latency. in_ready[i] is high in the
// cycle port i is granted and the cache is ready. A client must hold its
// request, unchanged, until it is accepted; assertions check this.
//
// The arbiter, its place and the shared response follow the design
// description; priority order and tag layout are this design's choices.
module dcache_arbiter
  import vpu_pkg::*;
#(
  parameter int unsigned N         = 2,
  localparam int unsigned PORT_BITS = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           reset,
  input  logic [N-1:0]   in_valid,
  output logic [N-1:0]   in_ready,
  input  dc_req_t        in_req [N],
  output logic           out_valid,
  input  logic           out_ready,
  output dc_req_t        out_req
);

  logic [N-1:0] grant;

  always_comb begin
    grant   = '0;
    out_req = in_req[0];
    for (int i = N - 1; i >= 0; i--)
      if (in_valid[i]) begin
        grant   = '0;
        grant[i] = 1'b1;
        out_req = in_req[i];
        out_req.tag[PORT_BITS-1:0] = PORT_BITS'(i);
      end
  end

  assign out_valid = |in_valid;
  assign in_ready  = grant & {N{out_ready}};

  // valid/ready rules of every request port
  for (genvar i = 0; i < N; i++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (reset)
      in_valid[i] && !in_ready[i] |=> in_valid[i] && $stable(in_req[i]))
      else $error("dcache_arbiter: port %0d dropped or changed a pending request", i);
  end
  a_onehot: assert property (@(posedge clk) disable iff (reset) $onehot0(grant))
    else $error("dcache_arbiter: more than one grant");

endmodule
