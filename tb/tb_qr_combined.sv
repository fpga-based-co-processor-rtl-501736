// tb_qr_combined: streams matrices through both elements of a combined
// element at once (COLS = 4, element A on column 1, element B on column 3,
// whose loads of 3 and 1 columns add up to one row), so that both compete
// for the shared VPU.  Each input matrix has zeros where earlier elements of
// an array would have annihilated (columns left of K in the rows K and
// below).  For every matrix it checks the element count, zeros below the
// diagonal of column K, a real non-negative diagonal, unchanged rows above
// the diagonal and the preserved Gram matrix A^H A.  It also checks that the
// VPU served both elements, that a conflict occurred and was resolved, and
// that sharing kept each element within the per-row time of an element with
// its own VPU.
module tb_qr_combined;
  import sart_pkg::*;
  localparam int ROWS = 6, COLS = 4, KA = 1, KB = 3, NMAT = 3;
  localparam int KS [2] = '{KA, KB};
  logic clk = 0, rst_n = 0;
  logic  in_valid [2], in_ready [2], out_valid [2], out_ready [2];
  cplx_t in_data [2], out_data [2];
  int checks = 0, failures = 0;
  cplx_t a_in  [2][NMAT][ROWS][COLS];
  cplx_t a_out [2][NMAT][ROWS][COLS];
  int n_out [2] = '{0, 0};
  longint t_first [2], t_last [2];
  int n_gnt_a = 0, n_gnt_b = 0, n_wait = 0;

  qr_combined #(.ROWS(ROWS), .COLS(COLS), .KA(KA), .KB(KB)) dut (
    .clk, .rst_n,
    .a_in_valid(in_valid[0]), .a_in_ready(in_ready[0]), .a_in_data(in_data[0]),
    .a_out_valid(out_valid[0]), .a_out_ready(out_ready[0]), .a_out_data(out_data[0]),
    .b_in_valid(in_valid[1]), .b_in_ready(in_ready[1]), .b_in_data(in_data[1]),
    .b_out_valid(out_valid[1]), .b_out_ready(out_ready[1]), .b_out_data(out_data[1]));
  always #5 clk = ~clk;
  assign out_ready[0] = 1'b1;
  assign out_ready[1] = 1'b1;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_gram(input int s, input int m);
    real gi_r, gi_i, go_r, go_i, mx;
    mx = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        mx += real'(a_in[s][m][r][c].re) ** 2 + real'(a_in[s][m][r][c].im) ** 2;
    for (int p = 0; p < COLS; p++)
      for (int q = 0; q < COLS; q++) begin
        gi_r = 0; gi_i = 0; go_r = 0; go_i = 0;
        for (int r = 0; r < ROWS; r++) begin
          gi_r += real'(a_in[s][m][r][p].re) * a_in[s][m][r][q].re + real'(a_in[s][m][r][p].im) * a_in[s][m][r][q].im;
          gi_i += real'(a_in[s][m][r][p].re) * a_in[s][m][r][q].im - real'(a_in[s][m][r][p].im) * a_in[s][m][r][q].re;
          go_r += real'(a_out[s][m][r][p].re) * a_out[s][m][r][q].re + real'(a_out[s][m][r][p].im) * a_out[s][m][r][q].im;
          go_i += real'(a_out[s][m][r][p].re) * a_out[s][m][r][q].im - real'(a_out[s][m][r][p].im) * a_out[s][m][r][q].re;
        end
        check(fabs(gi_r - go_r) + fabs(gi_i - go_i) < 1e-6 * mx, $sformatf("gram s=%0d m=%0d (%0d,%0d)", s, m, p, q));
      end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < 2; s++)
      if (out_valid[s] && out_ready[s]) begin
        int m, idx;
        m = n_out[s] / (ROWS * COLS); idx = n_out[s] % (ROWS * COLS);
        if (m < NMAT) a_out[s][m][ROWS - 1 - idx / COLS][idx % COLS] = out_data[s];
        t_last[s] = $time;
        n_out[s]++;
      end
    if (dut.gnt_a) n_gnt_a++;
    if (dut.gnt_b) n_gnt_b++;
    if (dut.a_waited || dut.b_waited) n_wait++;
  end

  task automatic drive(input int s);
    for (int m = 0; m < NMAT; m++) begin
      if (m == NMAT - 1) begin
        wait (n_out[s] == m * ROWS * COLS);
        t_first[s] = $time;
      end
      for (int r = ROWS - 1; r >= 0; r--)
        for (int c = 0; c < COLS; c++) begin
          @(negedge clk);
          in_valid[s] = 1; in_data[s] = a_in[s][m][r][c];
          @(posedge clk);
          while (!in_ready[s]) @(posedge clk);
          #1 in_valid[s] = 0;
        end
    end
  endtask

  initial begin
    int k, bound;
    for (int s = 0; s < 2; s++) begin
      in_valid[s] = 0; in_data[s] = CPLX_ZERO;
      for (int m = 0; m < NMAT; m++)
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++)
            if (r >= KS[s] && c < KS[s]) a_in[s][m][r][c] = CPLX_ZERO;
            else begin
              a_in[s][m][r][c].re = sdata_t'($signed($urandom_range(0, 1 << 21)) - (1 << 20));
              a_in[s][m][r][c].im = sdata_t'($signed($urandom_range(0, 1 << 21)) - (1 << 20));
            end
    end
    repeat (3) @(posedge clk); rst_n = 1;
    fork
      drive(0);
      drive(1);
    join
    wait (n_out[0] == NMAT * ROWS * COLS && n_out[1] == NMAT * ROWS * COLS);
    repeat (20) @(posedge clk);
    for (int s = 0; s < 2; s++) begin
      k = KS[s];
      check(n_out[s] == NMAT * ROWS * COLS, "element count");
      for (int m = 0; m < NMAT; m++) begin
        for (int r = k + 1; r < ROWS; r++)
          check(fabs(a_out[s][m][r][k].re) + fabs(a_out[s][m][r][k].im) < 64.0, $sformatf("zero below diag s=%0d m=%0d r=%0d", s, m, r));
        check(fabs(a_out[s][m][k][k].im) < 64.0 && a_out[s][m][k][k].re > 0, "diagonal real");
        for (int r = 0; r < k; r++)
          for (int c = 0; c < COLS; c++)
            check(a_out[s][m][r][c] == a_in[s][m][r][c], "bypass row unchanged");
        check_gram(s, m);
      end
      bound = (ROWS - k + 1) * (4 * COLS + 40) + 2 * COLS;
      check((t_last[s] - t_first[s]) / 10 <= bound, $sformatf("matrix time s=%0d %0d > %0d", s, (t_last[s] - t_first[s]) / 10, bound));
      $display("element %0d: matrix time %0d clocks", k, (t_last[s] - t_first[s]) / 10);
    end
    check(n_gnt_a > 0 && n_gnt_b > 0, "VPU granted to both elements");
    check(n_wait > 0, "VPU conflict occurred");
    $display("VPU grants A=%0d B=%0d, conflicts %0d", n_gnt_a, n_gnt_b, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
