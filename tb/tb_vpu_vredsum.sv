// tb_vpu_vredsum: random sums over vl = 0..VLMAX at every SEW against a
// testbench loop, including wrap-around, and the vl + 2 cycle latency.
module tb_vpu_vredsum;
  import vpu_pkg::*;
  localparam int unsigned VLEN = 128, VL_W = $clog2(VLEN / 8) + 1;

  logic clk = 0, reset = 1, start = 0, busy, done;
  sew_e sew = SEW8;
  logic [VL_W-1:0] vl = '0;
  logic [63:0] vs1_e0 = '0, result;
  logic [VLEN-1:0] vs2 = '0;
  int checks = 0, failures = 0;

  vpu_vredsum dut (.*);
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
      automatic int w = n % 4, ew = 8 << w, vmax = VLEN / ew, cyc = 0, nvl;
      longint unsigned mk, acc;
      logic [VLEN-1:0] v;
      nvl = $urandom_range(vmax);
      v = (n % 13 == 0) ? '1 : rnd();
      mk = (ew == 64) ? '1 : ((64'd1 << ew) - 1);
      sew = sew_e'(w); vl = VL_W'(nvl); vs2 = v;
      vs1_e0 = {$urandom, $urandom};
      acc = vs1_e0 & mk;
      for (int e = 0; e < nvl; e++) acc = (acc + (64'(v >> (e * ew)) & mk)) & mk;
      start = 1;
      @(posedge clk); #1 start = 0;
      vs2 = rnd();
      while (!done) begin @(posedge clk); #1 cyc++; end
      checks += 2;
      if (cyc != nvl + 1) begin
        failures++; $display("FAIL latency vl=%0d: %0d", nvl, cyc);
      end
      if (result != acc) begin
        failures++; $display("FAIL sum sew=%0d vl=%0d got %h expected %h", ew, nvl, result, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
