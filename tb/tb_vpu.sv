// tb_vpu: random operands for the three op-codes; the expected results are
// computed in floating point from the defining equations.
module tb_vpu;
  import sart_pkg::*;
  vpu_op_e op;
  cplx_t ab, cd, cs, xy;
  int checks = 0, failures = 0;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  real one = 2.0 ** UF;

  vpu dut (.*);

  function automatic sdata_t rnd(input int bits);
    return sdata_t'(longint'($signed($urandom)) >>> (32 - bits));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, b, c, d, co, si, ex, ey;
    for (int n = 0; n < 3000; n++) begin
      op = vpu_op_e'(n % 3);
      ab.re = rnd(30); ab.im = rnd(30); cd.re = rnd(30); cd.im = rnd(30);
      cs.re = rnd(32) <<< 1; cs.im = rnd(32) <<< 1;
      #1;
      a = ab.re; b = ab.im; c = cd.re; d = cd.im; co = cs.re / one; si = cs.im / one;
      case (op)
        VPU_ROT: begin ex = a * co - b * si; ey = b * co + a * si; end
        VPU_OUT: begin ex = co * a + si * c; ey = co * b + si * d; end
        default: begin ex = co * c - si * a; ey = co * d - si * b; end
      endcase
      checks++;
      if (fabs(real'(xy.re) - ex) > 2.0 || fabs(real'(xy.im) - ey) > 2.0) begin
        failures++;
        $display("FAIL op=%0d got %0d %0d exp %f %f", op, xy.re, xy.im, ex, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
