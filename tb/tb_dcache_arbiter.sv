// tb_dcache_arbiter: three clients issue random requests (holding each
// until accepted) to a cache whose ready toggles at random. Checks the
// fixed priority, the port number written into the tag, that nothing is
// lost or duplicated, and that a refused cycle grants nobody.
module tb_dcache_arbiter;
  import vpu_pkg::*;
  localparam int unsigned N = 3, PB = 2;

  logic clk = 0, reset = 1;
  logic [N-1:0] in_valid = '0, in_ready;
  dc_req_t in_req [N];
  logic out_valid, out_ready = 0;
  dc_req_t out_req;
  int checks = 0, failures = 0;
  int sent [N], got [N];

  dcache_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      in_req[i] = '0; sent[i] = 0; got[i] = 0;
    end
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int n = 0; n < 2000; n++) begin
      int hi;
      // new requests on idle ports
      for (int i = 0; i < N; i++)
        if (!in_valid[i] && $urandom_range(2) == 0) begin
          in_valid[i] = 1;
          in_req[i] = '0;
          in_req[i].addr = ADDR_W'({i, 16'(sent[i])}) << 3;
          in_req[i].tag  = TAG_W'(sent[i] << PB);
          in_req[i].data = {$urandom, $urandom};
        end
      out_ready = ($urandom_range(3) != 0);
      #1;
      hi = -1;
      for (int i = N - 1; i >= 0; i--) if (in_valid[i]) hi = i;
      checks++;
      if (out_valid != (hi >= 0) || (hi >= 0 && out_ready && in_ready != N'(1 << hi)) ||
          (!out_ready && in_ready != 0)) begin
        failures++; $display("FAIL grant valid=%b ready=%b", in_valid, in_ready);
      end
      if (hi >= 0) begin
        checks++;
        if (out_req.addr != in_req[hi].addr || out_req.tag[PB-1:0] != PB'(hi) ||
            out_req.tag[TAG_W-1:PB] != in_req[hi].tag[TAG_W-1:PB] || out_req.data != in_req[hi].data) begin
          failures++; $display("FAIL forwarded request of port %0d", hi);
        end
      end
      @(posedge clk);
      if (out_valid && out_ready) got[out_req.tag[PB-1:0]]++;
      for (int i = 0; i < N; i++) if (in_valid[i] && in_ready[i]) begin
        in_valid[i] = 0; sent[i]++;
      end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] != sent[i] || sent[i] == 0) begin
        failures++; $display("FAIL port %0d: sent %0d, arrived %0d", i, sent[i], got[i]);
      end
      $display("port %0d: %0d requests", i, sent[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
