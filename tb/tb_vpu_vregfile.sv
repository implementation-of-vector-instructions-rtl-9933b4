// tb_vpu_vregfile: random byte-enabled writes to the 32 registers against
// a reference array, reading all three ports every cycle; also the reset
// value and one-cycle write-to-read timing.
module tb_vpu_vregfile;
  import vpu_pkg::*;
  localparam int unsigned VLEN = 128, VB = VLEN / 8;

  logic clk = 0, reset = 1, we = 0;
  logic [4:0] raddr1 = 0, raddr2 = 0, raddr3 = 0, waddr = 0;
  logic [VLEN-1:0] rdata1, rdata2, rdata3, wdata = '0;
  logic [VB-1:0] wbe = '0;
  logic [VLEN-1:0] ref_r [32];
  int checks = 0, failures = 0;

  vpu_vregfile dut (.*);
  always #5 clk = ~clk;

  function automatic logic [VLEN-1:0] rnd();
    logic [VLEN-1:0] v;
    for (int i = 0; i < VLEN / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic chk(logic [4:0] a, logic [VLEN-1:0] got);
    checks++;
    if (got !== ref_r[a]) begin
      failures++;
      $display("FAIL v%0d got %h expected %h", a, got, ref_r[a]);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) ref_r[r] = '0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int r = 0; r < 32; r++) begin
      raddr1 = 5'(r); #1 chk(5'(r), rdata1);
    end
    for (int n = 0; n < 600; n++) begin
      we = ($urandom_range(3) != 0);
      waddr = 5'($urandom_range(31));
      wdata = rnd();
      wbe = VB'(rnd());
      raddr1 = 5'($urandom_range(31));
      raddr2 = 5'($urandom_range(31));
      raddr3 = waddr;
      #1;
      chk(raddr1, rdata1); chk(raddr2, rdata2); chk(raddr3, rdata3);
      @(posedge clk);
      if (we) for (int b = 0; b < VB; b++) if (wbe[b]) ref_r[waddr][b*8 +: 8] = wdata[b*8 +: 8];
      #1;
      chk(raddr3, rdata3);   // write visible in the next cycle
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
