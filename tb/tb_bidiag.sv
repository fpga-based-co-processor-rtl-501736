// tb_bidiag: loads random upper-triangular complex matrices (followed by the
// zero rows the QR array delivers) into one bidiagonalization module and
// reads back the diagonal and super-diagonal.  Checks, against values
// computed here in floating point from the input: every element off the two
// diagonals is reduced to (numerically) zero; the sum of squared magnitudes
// (the sum of squared singular values) is kept; the product of the diagonal
// magnitudes (the product of singular values) is kept; the largest singular
// value, found by power iteration on B^H B and R^H R, agrees.  Also checks
// that the module refuses input while it holds results, and its run time.
module tb_bidiag;
  import sart_pkg::*;
  localparam int ROWS = 7, COLS = 5, NMAT = 2, ITER = 32;
  localparam int NRES = 2 * COLS - 1;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, res_valid, release_i, busy;
  logic [$clog2(NRES+1)-1:0] res_idx;
  cplx_t in_data, res_data;
  int checks = 0, failures = 0;
  cplx_t rin [COLS][COLS];
  real br [COLS][COLS], bi [COLS][COLS];

  bidiag #(.ROWS(ROWS), .COLS(COLS), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // largest eigenvalue of A^H A for A given by real and imaginary parts
  function automatic real sigma1_sq(input real ar [COLS][COLS], input real ai [COLS][COLS]);
    real gr [COLS][COLS], gi [COLS][COLS], vr [COLS], vi [COLS], wr [COLS], wi [COLS];
    real nrm, lam;
    for (int p = 0; p < COLS; p++)
      for (int q = 0; q < COLS; q++) begin
        gr[p][q] = 0; gi[p][q] = 0;
        for (int r = 0; r < COLS; r++) begin
          gr[p][q] += ar[r][p] * ar[r][q] + ai[r][p] * ai[r][q];
          gi[p][q] += ar[r][p] * ai[r][q] - ai[r][p] * ar[r][q];
        end
      end
    for (int p = 0; p < COLS; p++) begin vr[p] = 1.0 + 0.1 * p; vi[p] = 0.05 * p; end
    lam = 0;
    for (int it = 0; it < 400; it++) begin
      nrm = 0;
      for (int p = 0; p < COLS; p++) begin
        wr[p] = 0; wi[p] = 0;
        for (int q = 0; q < COLS; q++) begin
          wr[p] += gr[p][q] * vr[q] - gi[p][q] * vi[q];
          wi[p] += gr[p][q] * vi[q] + gi[p][q] * vr[q];
        end
        nrm += wr[p] * wr[p] + wi[p] * wi[p];
      end
      nrm = $sqrt(nrm);
      lam = nrm;
      for (int p = 0; p < COLS; p++) begin vr[p] = wr[p] / nrm; vi[p] = wi[p] / nrm; end
    end
    return lam;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real fr, fb, pr, pb, s1r, s1b, rr [COLS][COLS], ri [COLS][COLS], mx;
    longint t0;
    in_valid = 0; in_data = CPLX_ZERO; release_i = 0; res_idx = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int m = 0; m < NMAT; m++) begin
      for (int r = 0; r < COLS; r++)
        for (int c = 0; c < COLS; c++) begin
          rin[r][c] = CPLX_ZERO;
          if (c >= r) begin
            rin[r][c].re = sdata_t'($signed($urandom_range(0, 1 << 28)) - (1 << 27));
            rin[r][c].im = sdata_t'($signed($urandom_range(0, 1 << 28)) - (1 << 27));
          end
        end
      // stream in, bottom row first
      @(negedge clk);
      t0 = $time;
      for (int r = ROWS - 1; r >= 0; r--)
        for (int c = 0; c < COLS; c++) begin
          in_valid = 1;
          in_data  = (r < COLS) ? rin[r][c] : CPLX_ZERO;
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          @(negedge clk);
        end
      in_valid = 0;
      while (!res_valid) @(negedge clk);
      check(($time - t0) / 10 <= ROWS * COLS + (COLS - 1) * (COLS - 2) * (3 * (ITER + 3) + 4 * COLS + 2) + 4,
            $sformatf("run time %0d clocks", ($time - t0) / 10));
      // refuse a new matrix while results are held
      in_valid = 1; in_data = CPLX_ZERO; #1;
      check(!in_ready, "no input while holding results");
      in_valid = 0;
      // read the result buffer
      for (int r = 0; r < COLS; r++)
        for (int c = 0; c < COLS; c++) begin br[r][c] = 0; bi[r][c] = 0; end
      for (int x = 0; x < NRES; x++) begin
        res_idx = x[$bits(res_idx)-1:0]; #1;
        br[x / 2][x / 2 + x % 2] = res_data.re;
        bi[x / 2][x / 2 + x % 2] = res_data.im;
      end
      fr = 0; fb = 0; pr = 1; pb = 1;
      for (int r = 0; r < COLS; r++) begin
        for (int c = 0; c < COLS; c++) begin
          rr[r][c] = rin[r][c].re; ri[r][c] = rin[r][c].im;
          fr += rr[r][c] ** 2 + ri[r][c] ** 2;
          fb += br[r][c] ** 2 + bi[r][c] ** 2;
        end
        pr *= $sqrt(rr[r][r] ** 2 + ri[r][r] ** 2) / 1.0e8;
        pb *= $sqrt(br[r][r] ** 2 + bi[r][r] ** 2) / 1.0e8;
      end
      mx = $sqrt(fr);
      for (int r = 0; r < COLS; r++)
        for (int c = 0; c < COLS; c++)
          if (c != r && c != r + 1)
            check(fabs(real'(dut.mem[r][c].re)) + fabs(real'(dut.mem[r][c].im)) < 1e-6 * mx,
                  $sformatf("off-bidiagonal (%0d,%0d) = %0d %0d", r, c, dut.mem[r][c].re, dut.mem[r][c].im));
      check(fabs(fr - fb) < 1e-6 * fr, $sformatf("sum of squares %g %g", fr, fb));
      check(fabs(pr - pb) < 1e-5 * fabs(pr), $sformatf("product of singular values %g %g", pr, pb));
      s1r = sigma1_sq(rr, ri); s1b = sigma1_sq(br, bi);
      check(fabs(s1r - s1b) < 1e-6 * s1r, $sformatf("largest singular value %g %g", s1r, s1b));
      @(negedge clk); release_i = 1; @(negedge clk); release_i = 0;
      check(in_ready, "free after release");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
