// tb_qr_array: streams random complex matrices through the whole array with
// random input gaps and output back-pressure, several matrices in flight at
// once.  For every matrix it checks that the result is upper triangular with
// a real, non-negative diagonal, and that the Gram matrix A^H A (so every
// singular value) is preserved.  Also checks the time of one matrix through
// an otherwise empty array.
module tb_qr_array;
  import sart_pkg::*;
  localparam int ROWS = 7, COLS = 4, NMAT = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;
  cplx_t a_in [NMAT][ROWS][COLS];
  cplx_t a_out [NMAT][ROWS][COLS];
  int n_out = 0;
  bit bp = 1;
  longint t_first, t_last;

  qr_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Gram matrices of input and output must agree
  task automatic check_gram(input int m);
    real gi_r, gi_i, go_r, go_i, mx;
    mx = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        mx += real'(a_in[m][r][c].re) ** 2 + real'(a_in[m][r][c].im) ** 2;
    for (int p = 0; p < COLS; p++)
      for (int q = 0; q < COLS; q++) begin
        gi_r = 0; gi_i = 0; go_r = 0; go_i = 0;
        for (int r = 0; r < ROWS; r++) begin
          gi_r += real'(a_in[m][r][p].re) * a_in[m][r][q].re + real'(a_in[m][r][p].im) * a_in[m][r][q].im;
          gi_i += real'(a_in[m][r][p].re) * a_in[m][r][q].im - real'(a_in[m][r][p].im) * a_in[m][r][q].re;
          go_r += real'(a_out[m][r][p].re) * a_out[m][r][q].re + real'(a_out[m][r][p].im) * a_out[m][r][q].im;
          go_i += real'(a_out[m][r][p].re) * a_out[m][r][q].im - real'(a_out[m][r][p].im) * a_out[m][r][q].re;
        end
        check(fabs(gi_r - go_r) + fabs(gi_i - go_i) < 1e-6 * mx, $sformatf("gram m=%0d (%0d,%0d) err %g mx %g g %g %g", m, p, q, fabs(gi_r - go_r) + fabs(gi_i - go_i), mx, gi_r, go_r));
      end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output collector, rows arrive bottom row first
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int m, idx, r, c;
    m = n_out / (ROWS * COLS); idx = n_out % (ROWS * COLS);
    r = ROWS - 1 - idx / COLS; c = idx % COLS;
    if (m < NMAT) a_out[m][r][c] = out_data;
    t_last = $time;
    n_out++;
  end
  always @(negedge clk) out_ready = bp ? ($urandom_range(0, 3) != 0) : 1'b1;

  initial begin
    real tol;
    in_valid = 0; in_data = CPLX_ZERO;
    for (int m = 0; m < NMAT; m++)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          a_in[m][r][c].re = sdata_t'($signed($urandom_range(0, 1 << 21)) - (1 << 20));
          a_in[m][r][c].im = sdata_t'($signed($urandom_range(0, 1 << 21)) - (1 << 20));
        end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int m = 0; m < NMAT; m++) begin
      if (m == NMAT - 1) begin
        // last matrix alone and without back-pressure: timing check
        wait (n_out == m * ROWS * COLS);
        bp = 0;
        t_first = $time;
      end
      for (int r = ROWS - 1; r >= 0; r--)
        for (int c = 0; c < COLS; c++) begin
          @(negedge clk);
          while (bp && $urandom_range(0, 4) == 0) @(negedge clk);
          in_valid = 1; in_data = a_in[m][r][c];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          #1 in_valid = 0;
        end
    end
    wait (n_out == NMAT * ROWS * COLS);
    repeat (20) @(posedge clk);
    check(n_out == NMAT * ROWS * COLS, "element count");
    for (int m = 0; m < NMAT; m++) begin
      tol = 256.0;
      for (int c = 0; c < COLS; c++) begin
        for (int r = c + 1; r < ROWS; r++)
          check(fabs(a_out[m][r][c].re) + fabs(a_out[m][r][c].im) < tol, $sformatf("zero below diag m=%0d r=%0d c=%0d", m, r, c));
        check(fabs(a_out[m][c][c].im) < tol && a_out[m][c][c].re > 0, "diagonal real");
      end
      check_gram(m);
    end
    // (ROWS-K) rows each need at most 4*COLS + ITER + 2 clocks plus the flush
    // elements work on the matrix one after another, each about one row behind
    check((t_last - t_first) / 10 <= (ROWS + 2 * COLS) * (4 * COLS + 40), $sformatf("latency %0d", (t_last - t_first) / 10));
    $display("matrix time %0d clocks", (t_last - t_first) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
