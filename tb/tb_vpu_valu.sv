// tb_vpu_valu: random and corner-case (all-ones, carry across element
// boundaries) operands at every SEW, compared element by element with an
// addition done in the testbench.
module tb_vpu_valu;
  import vpu_pkg::*;
  localparam int unsigned VLEN = 128;

  sew_e sew;
  logic [VLEN-1:0] a, b, sum;
  int checks = 0, failures = 0;

  vpu_valu dut (.*);

  function automatic logic [VLEN-1:0] rnd();
    logic [VLEN-1:0] v;
    for (int i = 0; i < VLEN / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      automatic int w = n % 4;
      automatic int ew = 8 << w;
      sew = sew_e'(w);
      case (n / 4 % 4)
        0: begin a = '1; b = {{(VLEN-1){1'b0}}, 1'b1} | (rnd() & {VLEN/8{8'h01}}); end
        1: begin a = '1; b = '1; end
        default: begin a = rnd(); b = rnd(); end
      endcase
      #1;
      for (int e = 0; e < VLEN / ew; e++) begin
        longint unsigned ea, eb, es, mk;
        mk = (ew == 64) ? '1 : ((64'd1 << ew) - 1);
        ea = 64'(a >> (e * ew)) & mk;
        eb = 64'(b >> (e * ew)) & mk;
        es = 64'(sum >> (e * ew)) & mk;
        checks++;
        if (es != ((ea + eb) & mk)) begin
          failures++;
          $display("FAIL sew=%0d e=%0d %h+%h got %h", ew, e, ea, eb, es);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
