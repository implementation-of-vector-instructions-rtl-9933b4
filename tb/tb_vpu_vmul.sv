// tb_vpu_vmul: random products at every SEW against a testbench multiply,
// and the latency: done comes VLEN/64 + 1 cycles after start.
module tb_vpu_vmul;
  import vpu_pkg::*;
  localparam int unsigned VLEN = 128;

  logic clk = 0, reset = 1, start = 0, busy, done;
  sew_e sew = SEW8;
  logic [VLEN-1:0] a = '0, b = '0, prod;
  int checks = 0, failures = 0;

  vpu_vmul dut (.*);
  always #5 clk = ~clk;

  function automatic logic [VLEN-1:0] rnd();
    logic [VLEN-1:0] v;
    for (int i = 0; i < VLEN / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int n = 0; n < 200; n++) begin
      automatic int w = n % 4, ew = 8 << w, cyc = 0;
      logic [VLEN-1:0] ra, rb;
      ra = rnd(); rb = rnd();
      if (n % 17 == 0) begin ra = '1; rb = '1; end
      sew = sew_e'(w); a = ra; b = rb; start = 1;
      @(posedge clk); #1 start = 0;
      a = rnd(); b = rnd();   // operands must have been captured
      while (!done) begin @(posedge clk); #1 cyc++; end
      checks++;
      if (cyc != VLEN / 64) begin
        failures++; $display("FAIL latency %0d cycles after the start edge", cyc);
      end
      for (int e = 0; e < VLEN / ew; e++) begin
        longint unsigned ea, eb, ep, mk;
        mk = (ew == 64) ? '1 : ((64'd1 << ew) - 1);
        ea = 64'(ra >> (e * ew)) & mk;
        eb = 64'(rb >> (e * ew)) & mk;
        ep = 64'(prod >> (e * ew)) & mk;
        checks++;
        if (ep != ((ea * eb) & mk)) begin
          failures++; $display("FAIL sew=%0d e=%0d %h*%h got %h", ew, e, ea, eb, ep);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
