// tb_qr_measure: for random target elements A and feedback elements F it
// checks the phase vector e^{-j angle(A)}, the magnitude |A| and the Givens
// vector (F - j|A|)/sqrt(F^2+|A|^2); applying that vector as the output half
// of a Givens rotation to (|A|, F) must give zero, and as the feedback half
// sqrt(F^2+|A|^2).  It also starts the next phase measurement while the
// compare is running, as the processing element does.
module tb_qr_measure;
  import sart_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rx_latch, fb_latch, ph_done, g_done;
  cplx_t rx_elem, u_ph, u_g;
  sdata_t fb_elem, mag_a;
  int checks = 0, failures = 0;
  real one = 2.0 ** UF;

  sdata_t a_mag;
  assign a_mag = mag_a;
  qr_measure dut (.*);
  always #5 clk = ~clk;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ar, ai, f, m, r, gr, gi, outv, fbv;
    rx_latch = 0; fb_latch = 0; rx_elem = CPLX_ZERO; fb_elem = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      rx_elem.re = sdata_t'($signed($urandom) >>> 2);
      rx_elem.im = sdata_t'($signed($urandom) >>> 2);
      ar = rx_elem.re; ai = rx_elem.im;
      rx_latch = 1; @(negedge clk); rx_latch = 0;
      while (!ph_done) @(negedge clk);
      @(negedge clk);
      m = $sqrt(ar * ar + ai * ai);
      check(fabs(mag_a - m) < 4.0, $sformatf("magnitude %0d vs %f", mag_a, m));
      check(fabs(u_ph.re / one - ar / m) + fabs(u_ph.im / one + ai / m) < 1e-7, "phase vector");
      // compare against a feedback element, next phase measurement in parallel
      fb_elem = (n % 10 == 0) ? '0 : sdata_t'($urandom >> 2);
      f = fb_elem;
      fb_latch = 1; rx_latch = 1; rx_elem.re = 35'sd1000; rx_elem.im = 35'sd0;
      @(negedge clk); fb_latch = 0; rx_latch = 0;
      while (!g_done) @(negedge clk);
      r = $sqrt(f * f + m * m);
      gr = u_g.re / one; gi = u_g.im / one;
      check(fabs(gr - f / r) + fabs(gi + m / r) < 1e-7, "givens vector");
      outv = gr * m + gi * f;       // output half on the target elements
      fbv  = gr * f - gi * m;       // feedback half
      check(fabs(outv) < 1e-6 * r + 2.0 && fabs(fbv - r) < 1e-6 * r + 2.0, "rotation cancels target");
      while (!ph_done) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
