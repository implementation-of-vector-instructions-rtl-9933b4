// vpu_lsu: unit-stride vector load/store through the L1 data-cache port.
//
// The vector of vl elements of EEW bits occupies len = vl * EEW/8
// contiguous bytes from the base address rs1. The unit walks the aligned
// 64-bit doublewords that cover [base, base + len) and issues one cache
// request per doubleword ("beat"), so one request carries up to eight
// elements of 8 bits, four of 16 and so on, as the description points
// out for small elements. Every request uses size 3 (8 bytes); a store
// carries a byte mask that enables only the bytes inside the vector.
// Byte k*8+j of beat k maps to vector byte k*8+j-(base mod 8).
//
// Requests follow a valid/ready handshake and may be issued back to back;
// responses arrive on a response bus shared with the other cache clients,
// so the unit accepts only responses whose tag carries its own port
// number in the low PORT_BITS bits (the unit leaves them zero and the
// arbiter fills them in). The tag bits above carry the beat number, so responses may return in any order.
// Stores are complete when their (data-less) acknowledgement returns.
//
// Interface: pulse `start` with the operands valid; they are captured.
// `done` pulses in the cycle after the last response arrives (in the
// cycle after start when len = 0); for a load,
// `ld_data` then holds the loaded bytes at vector byte positions
// [0, len) (other bytes are zero). `busy` is high in between.
//
// The request/response protocol is modelled on the host core's HellaCache
// port (tag, addr, cmd, size, data, mask). The doubleword walk, the
// always-8-byte requests and the tag layout are this design's choices;
// the cache is assumed never to refuse (nack) a request it has accepted.
module vpu_lsu
  import vpu_pkg::*;
#(
  parameter int unsigned VLEN      = 128,
  parameter int unsigned PORT_BITS = 1,
  parameter logic [PORT_BITS-1:0] PORT_ID = '0,
  localparam int unsigned VB   = VLEN / 8,
  localparam int unsigned VL_W = $clog2(VLEN / 8) + 1,
  localparam int unsigned NB_W = $clog2(VB / 8 + 2)
) (
  input  logic            clk,
  input  logic            reset,
  // command
  input  logic            start,
  input  logic            is_store,
  input  logic [XLEN-1:0] base,
  input  sew_e            eew,
  input  logic [VL_W-1:0] vl,
  input  logic [VLEN-1:0] st_data,
  output logic            busy,
  output logic            done,
  output logic [VLEN-1:0] ld_data,
  // data-cache port
  output logic            req_valid,
  input  logic            req_ready,
  output dc_req_t         req,
  input  logic            resp_valid,
  input  dc_resp_t        resp
);

  logic [XLEN-1:0] base_q;
  logic            store_q;
  logic [VLEN-1:0] st_q;
  logic [VL_W+3:0] len_q;     // bytes
  logic [NB_W-1:0] nbeats_q, issued, received;
  logic            resp_mine;
  logic [NB_W-1:0] resp_beat;

  logic [VL_W+3:0] len_c;
  logic [XLEN-1:0] last_c;
  logic [NB_W-1:0] nbeats_c;

  // number of doublewords touched by [base, base + len)
  always_comb begin
    len_c  = (VL_W + 4)'(vl) << eew;
    last_c = base + XLEN'(len_c) - 1'b1;
    nbeats_c = (len_c == 0) ? '0 : NB_W'((last_c >> 3) - (base >> 3) + 1'b1);
  end

  // byte of beat k, lane j lies inside the vector?
  function automatic logic in_vec(int unsigned k, int unsigned j,
                                  logic [2:0] off, logic [VL_W+3:0] len);
    int unsigned p;
    p = k * 8 + j;
    return (p >= 32'(off)) && (p < 32'(off) + 32'(len));
  endfunction

  // request of the current beat
  always_comb begin
    int unsigned k, vb;
    k = 32'(issued);
    req         = '0;
    req.addr    = ADDR_W'(((base_q >> 3) + XLEN'(issued)) << 3);
    req.tag     = TAG_W'({issued, PORT_BITS'(0)});
    req.cmd     = store_q ? M_XWR : M_XRD;
    req.size    = 2'd3;
    req.signed_ = 1'b0;
    for (int unsigned j = 0; j < 8; j++) begin
      vb = k * 8 + j - 32'(base_q[2:0]);
      if (store_q && in_vec(k, j, base_q[2:0], len_q)) begin
        req.mask[j]       = 1'b1;
        req.data[j*8 +: 8] = st_q[(vb % VB)*8 +: 8];
      end
    end
  end

  assign req_valid = busy && (issued != nbeats_q);
  assign resp_mine = resp_valid && (resp.tag[PORT_BITS-1:0] == PORT_ID);
  assign resp_beat = NB_W'(resp.tag >> PORT_BITS);

  logic [NB_W-1:0] recv_next, issue_next;
  assign recv_next  = received + NB_W'(resp_mine);
  assign issue_next = issued + NB_W'(req_valid && req_ready);

  always_ff @(posedge clk) begin
    if (reset) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      base_q   <= '0;
      store_q  <= 1'b0;
      st_q     <= '0;
      len_q    <= '0;
      nbeats_q <= '0;
      issued   <= '0;
      received <= '0;
      ld_data  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        base_q   <= base;
        store_q  <= is_store;
        st_q     <= st_data;
        len_q    <= len_c;
        nbeats_q <= nbeats_c;
        issued   <= '0;
        received <= '0;
        ld_data  <= '0;
      end else if (busy) begin
        if (req_valid && req_ready) issued <= issued + 1'b1;
        if (resp_mine) begin
          received <= received + 1'b1;
          if (!store_q && resp.has_data)
            for (int unsigned j = 0; j < 8; j++)
              if (in_vec(32'(resp_beat), j, base_q[2:0], len_q))
                ld_data[((32'(resp_beat) * 8 + j - 32'(base_q[2:0])) % VB)*8 +: 8]
                  <= resp.data[j*8 +: 8];
        end
        if (recv_next == nbeats_q && issue_next == nbeats_q) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
