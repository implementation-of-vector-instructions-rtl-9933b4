// tb_vpu_lsu: random unit-stride loads and stores of every element width,
// vl and element-aligned base, against a behavioural cache that answers
// out of order and refuses requests at random. Responses meant for another
// port are injected on the shared bus and must be ignored. Checks the
// loaded bytes, the bytes written (and those next to them, untouched),
// and that one request is made per doubleword touched.
module tb_vpu_lsu;
  import vpu_pkg::*;
  localparam int unsigned VLEN = 128, VB = VLEN / 8, VL_W = $clog2(VLEN / 8) + 1;

  logic clk = 0, reset = 1;
  logic start = 0, is_store = 0, busy, done;
  logic [XLEN-1:0] base = '0;
  sew_e eew = SEW8;
  logic [VL_W-1:0] vl = '0;
  logic [VLEN-1:0] st_data = '0, ld_data;
  logic req_valid, req_ready, resp_valid, m_resp_valid;
  dc_req_t req, m_req;
  dc_resp_t resp, m_resp;
  int checks = 0, failures = 0, foreign = 0;
  logic [7:0] shadow [int];

  vpu_lsu #(.PORT_ID(1'b1)) dut (.*);

  // the arbiter's part: port number into the low tag bit
  always_comb begin
    m_req = req;
    m_req.tag[0] = 1'b1;
  end

  l1_dcache_model #(.LAT_MIN(1), .LAT_MAX(6), .READY_PCT(70)) u_mem (
    .clk, .reset, .req_valid(req_valid), .req_ready(req_ready), .req(m_req),
    .resp_valid(m_resp_valid), .resp(m_resp)
  );

  // shared response bus: other port's responses in idle cycles
  logic inj;
  dc_resp_t junk;
  always_ff @(posedge clk) begin
    inj  <= ($urandom_range(4) == 0);
    junk <= '{addr: ADDR_W'($urandom), tag: TAG_W'($urandom) & ~TAG_W'(1), cmd: M_XRD,
              size: 2'd3, has_data: 1'b1, data: {$urandom, $urandom}};
  end
  assign resp_valid = m_resp_valid | inj;
  assign resp       = m_resp_valid ? m_resp : junk;
  always @(posedge clk) if (!m_resp_valid && inj) foreign++;

  always #5 clk = ~clk;

  function automatic logic [7:0] mem_byte(longint a);
    automatic logic [63:0] d = u_mem.peek(ADDR_W'(a));
    return d[(a % 8) * 8 +: 8];
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 'h1000; a < 'h1200; a += 8) begin
      automatic logic [63:0] d = {$urandom, $urandom};
      u_mem.poke(ADDR_W'(a), d);
    end
    repeat (3) @(posedge clk);
    #1 reset = 0;
    for (int n = 0; n < 300; n++) begin
      automatic int w = $urandom_range(3), nvl, len, nreq0, expect_beats;
      longint b;
      logic [VLEN-1:0] sd;
      logic [7:0] prev [int];
      nvl = $urandom_range(VB >> w);
      len = nvl << w;
      b = 'h1000 + ($urandom_range(300) & ~((1 << w) - 1));
      expect_beats = (len == 0) ? 0 : ((b + len - 1) / 8 - b / 8 + 1);
      for (int i = 0; i < VLEN / 32; i++) sd[i*32 +: 32] = $urandom;
      for (longint a = b - 8; a < b + len + 8; a++) prev[int'(a)] = mem_byte(a);
      nreq0 = u_mem.n_req;
      is_store = n[0]; base = b; eew = sew_e'(w); vl = VL_W'(nvl); st_data = sd; start = 1;
      @(posedge clk); #1 start = 0;
      while (!done) @(posedge clk);
      #1;
      checks++;
      if (u_mem.n_req - nreq0 != expect_beats) begin
        failures++;
        $display("FAIL requests: %0d, expected %0d", u_mem.n_req - nreq0, expect_beats);
      end
      if (!n[0]) begin
        for (int i = 0; i < VB; i++) begin
          automatic logic [7:0] e = (i < len) ? prev[int'(b + i)] : 8'h00;
          checks++;
          if (ld_data[i*8 +: 8] != e) begin
            failures++;
            $display("FAIL load base=%h eew=%0d vl=%0d byte %0d got %h exp %h",
                     b, 8 << w, nvl, i, ld_data[i*8 +: 8], e);
          end
        end
      end else begin
        for (longint a = b - 8; a < b + len + 8; a++) begin
          automatic logic [7:0] e = (a >= b && a < b + len) ? sd[(a - b) * 8 +: 8] : prev[int'(a)];
          checks++;
          if (mem_byte(a) != e) begin
            failures++;
            $display("FAIL store base=%h eew=%0d vl=%0d addr %h got %h exp %h",
                     b, 8 << w, nvl, a, mem_byte(a), e);
          end
        end
      end
    end
    checks++;
    if (foreign == 0 || u_mem.n_refused == 0) begin
      failures++; $display("FAIL foreign responses %0d, refusals %0d", foreign, u_mem.n_refused);
    end
    $display("foreign responses ignored: %0d, refused requests: %0d", foreign, u_mem.n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
