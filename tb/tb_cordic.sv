// tb_cordic: drives vectors in all four quadrants and on the axes; checks the
// magnitude, that the unit vector has length one and is the conjugate phase
// of the input, and the ITER+2 clock latency.
module tb_cordic;
  import sart_pkg::*;
  localparam int ITER = 32;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  cplx_t vin, uvec;
  sdata_t mag;
  int checks = 0, failures = 0;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  real one = 2.0 ** UF;

  cordic #(.ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input real cond_err, input real tol, input string what);
    checks++;
    if (!(cond_err <= tol)) begin
      failures++;
      $display("FAIL %s err=%g tol=%g", what, cond_err, tol);
    end
  endtask

  task automatic run(input longint re, input longint im);
    real r, ur, ui, er, ei;
    int lat;
    @(negedge clk);
    vin.re = sdata_t'(re); vin.im = sdata_t'(im); start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    r  = $sqrt(real'(re) * real'(re) + real'(im) * real'(im));
    ur = real'(uvec.re) / one; ui = real'(uvec.im) / one;
    check(fabs(real'(mag) - r), 4.0 + r * 1e-8, "magnitude");
    check(fabs(ur * ur + ui * ui - 1.0), 1e-8, "unit length");
    if (r > 0) begin
      er = real'(re) / r; ei = -real'(im) / r;
      check(fabs(ur - er) + fabs(ui - ei), 1e-7 + 8.0 / r, "angle");
    end
    check(real'(lat == ITER + 2 ? 0 : 1), 0.0, "latency");
  endtask

  initial begin
    start = 0; vin = CPLX_ZERO;
    repeat (3) @(posedge clk); rst_n = 1;
    run(1000000, 0); run(0, 1000000); run(-1000000, 0); run(0, -1000000);
    run(-123456789, 987654321); run(123456789, -987654321); run(-5, -7);
    for (int n = 0; n < 200; n++)
      run(longint'($signed($urandom)) >>> ($urandom_range(0, 8)),
          longint'($signed($urandom)) >>> ($urandom_range(0, 8)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
