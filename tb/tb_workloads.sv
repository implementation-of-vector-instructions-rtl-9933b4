// tb_workloads: runs the vector-add and dot-product kernels on the unit
// at VLEN = 128, 256 and 512 with 32-bit elements for input sizes 8 to
// 128, and at VLEN = 128 with 64-bit elements for sizes 8 and 16.
// Checks every result element against a sum / dot product computed here,
// and the number of instructions each kernel executes against the
// strip-mining count: vvadd 11 per pass, dot product 10 per pass plus
// the final store, with ceil(n / (VLEN/SEW)) passes. Checks the cycles
// of each kernel against the unit's timing with this testbench's cache
// (2-cycle latency, always ready) and one cycle per scalar instruction:
//   vsetvli, vadd.vv: 4      vmul.vv: VLEN/64 + 5      vredsum.vs: vl + 6
//   vle/vse: 8 + number of doublewords touched

module tb_workloads;
  import vpu_pkg::*;
  import tb_rvv_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  workload_runner #(.VLEN(128)) r128 (.clk);
  workload_runner #(.VLEN(256)) r256 (.clk);
  workload_runner #(.VLEN(512)) r512 (.clk);

  int checks = 0, failures = 0;

  // doublewords touched by [base, base + bytes)
  function automatic int nbeats(longint base, int bytes);
    return (bytes == 0) ? 0 : int'((base + bytes - 1) / 8 - base / 8 + 1);
  endfunction
  localparam longint A = 'h10000, B = 'h20000, C = 'h30000;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write n random elements of 2^w bytes at base into all three memories
  task automatic fill(longint base, int n, int w, ref logic [63:0] v [256]);
    for (int i = 0; i < n; i++) v[i] = {$urandom, $urandom} & mask_of(w);
    for (int i = 0; i < ((n << w) + 7) / 8; i++) begin
      logic [63:0] d;
      d = '0;
      for (int j = 0; j < 8; j++) begin
        int bi, e;
        bi = i * 8 + j; e = bi >> w;
        if (e < n) d[j*8 +: 8] = 8'(v[e] >> ((bi % (1 << w)) * 8));
      end
      r128.u_mem.poke(ADDR_W'(base + i * 8), d);
      r256.u_mem.poke(ADDR_W'(base + i * 8), d);
      r512.u_mem.poke(ADDR_W'(base + i * 8), d);
    end
  endtask

  function automatic logic [63:0] rd_elem(int which, longint base, int i, int w);
    logic [63:0] d, r;
    longint ad;
    r = '0;
    for (int j = 0; j < (1 << w); j++) begin
      ad = base + (i << w) + j;
      case (which)
        0: d = r128.u_mem.peek(ADDR_W'(ad));
        1: d = r256.u_mem.peek(ADDR_W'(ad));
        default: d = r512.u_mem.peek(ADDR_W'(ad));
      endcase
      r[j*8 +: 8] = d[(ad % 8) * 8 +: 8];
    end
    return r;
  endfunction

  task automatic run(int kern, int n, int w, int which);
    logic [63:0] va [256], vb [256];
    int cnt, vlen, passes, exp_cnt;
    longint cyc;
    logic [63:0] acc;
    vlen = 128 << which;
    fill(A, n, w, va);
    fill(B, n, w, vb);
    case (which)
      0: begin
        r128.restart();
        if (kern == 0) r128.vvadd(n, w, A, B, C, cnt, cyc); else r128.dotprod(n, w, A, B, C, cnt, cyc);
      end
      1: begin
        r256.restart();
        if (kern == 0) r256.vvadd(n, w, A, B, C, cnt, cyc); else r256.dotprod(n, w, A, B, C, cnt, cyc);
      end
      default: begin
        r512.restart();
        if (kern == 0) r512.vvadd(n, w, A, B, C, cnt, cyc); else r512.dotprod(n, w, A, B, C, cnt, cyc);
      end
    endcase
    passes = (n + (vlen / (8 << w)) - 1) / (vlen / (8 << w));
    exp_cnt = (kern == 0) ? 11 * passes : 10 * passes + 1;
    check($sformatf("%s n=%0d e%0d VLEN=%0d instructions", kern ? "dotprod" : "vvadd", n, 8 << w, vlen),
          cnt, exp_cnt);
    begin
      int left, vmax, vl, ecyc;
      longint off;
      left = n; vmax = vlen / (8 << w); ecyc = 0; off = 0; vl = 0;
      while (left > 0) begin
        vl = (left < vmax) ? left : vmax;
        if (kern == 0)
          ecyc += 4 + (8 + nbeats(A + off, vl << w)) + (8 + nbeats(B + off, vl << w)) + 4 +
                  (8 + nbeats(C + off, vl << w)) + 6;
        else
          ecyc += 4 + (8 + nbeats(A + off, vl << w)) + (8 + nbeats(B + off, vl << w)) +
                  (vlen / 64 + 5) + (vl + 6) + 5;
        off += vl << w;
        left -= vl;
      end
      if (kern == 1) ecyc += 8 + nbeats(C, vl << w);
      check($sformatf("%s n=%0d e%0d VLEN=%0d cycles", kern ? "dotprod" : "vvadd", n, 8 << w, vlen),
            cyc, ecyc);
    end
    if (kern == 0) begin
      for (int i = 0; i < n; i++)
        check($sformatf("vvadd c[%0d]", i), rd_elem(which, C, i, w), (va[i] + vb[i]) & mask_of(w));
    end else begin
      acc = '0;
      for (int i = 0; i < n; i++) acc = (acc + va[i] * vb[i]) & mask_of(w);
      check("dot product", rd_elem(which, C, 0, w), acc);
    end
    $display("%-7s n=%3d e%0d VLEN=%0d: %0d instructions, %0d cycles",
             kern ? "dotprod" : "vvadd", n, 8 << w, vlen, cnt, cyc);
  endtask

  initial begin
    for (int kern = 0; kern < 2; kern++)
      for (int which = 0; which < 3; which++)
        for (int n = 8; n <= 128; n *= 2) run(kern, n, 2, which);
    for (int kern = 0; kern < 2; kern++)
      for (int n = 8; n <= 16; n *= 2) run(kern, n, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
