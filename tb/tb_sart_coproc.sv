// tb_sart_coproc: end-to-end test of the co-processor at its default size
// (128 x 16 signal matrix, 16 QR elements, 4 bidiagonalization modules).
//
// Acting as the host over the local bus it writes a random signal matrix and
// the phase steps of NPTS scan-grid points into the (behavioural) SRAM,
// starts a run, collects each module's diagonal and super-diagonal as it
// becomes available and releases the module.  For every grid point it
// rephases the matrix itself in floating point (sub-carrier k, counted from
// the bottom row, turned by k times the column's phase step) and checks the
// returned bidiagonal matrix against it: the largest singular value (the
// SART metric, by power iteration), the sum of squared singular values, and
// that every grid point is reported exactly once.
//
// The behavioural SRAM model has a read latency of two clocks.  The test
// also counts how often each mechanism of the design was exercised and fails
// if one never was: host SRAM write held off during a run, phase-step
// recirculation, back-pressure into the rephasing stage, the discarded first
// rotation, bypassed rows, deposits of the diagonal row, the distributor
// waiting for a free bidiagonalization module, the shared VPU of a combined
// element serving its second element and resolving a conflict between the
// two, and use of every module.
module tb_sart_coproc;
  import sart_pkg::*;
  localparam int ROWS = 128, COLS = 16, NBD = 4, NPTS = 6;
  localparam int SAW  = $clog2(16384 * COLS);
  localparam int NRES = 2 * COLS - 1;

  logic clk = 0, rst_n = 0;
  logic [23:0] lb_addr;
  logic lb_wr, lb_rd, lb_ack;
  logic [63:0] lb_wdata, lb_rdata;
  logic sram_we, sram_rd, sram_rvalid;
  logic [SAW-1:0] sram_addr;
  logic [63:0] sram_wdata, sram_rdata;

  int checks = 0, failures = 0;

  sart_coproc dut (.*);
  always #5 clk = ~clk;

  // ---------------- behavioural phase-step SRAM ----------------
  // only the first 1024 words are modelled (the test uses fewer)
  logic [63:0] sram_mem [1024];
  logic [1:0]  rv_pipe;
  logic [63:0] rd_pipe [2];
  always_ff @(posedge clk) begin
    if (sram_we) sram_mem[sram_addr[9:0]] <= sram_wdata;
    rv_pipe    <= {rv_pipe[0], sram_rd};
    rd_pipe[0] <= sram_mem[sram_addr[9:0]];
    rd_pipe[1] <= rd_pipe[0];
  end
  assign sram_rvalid = rv_pipe[1];
  assign sram_rdata  = rd_pipe[1];

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- local bus host ----------------
  task automatic lb_write(input logic [23:0] a, input logic [63:0] d);
    @(negedge clk); lb_addr = a; lb_wdata = d; lb_wr = 1;
    do @(posedge clk); while (!lb_ack);
    @(negedge clk); lb_wr = 0;
  endtask
  task automatic lb_read(input logic [23:0] a, output logic [63:0] d);
    @(negedge clk); lb_addr = a; lb_rd = 1;
    do @(posedge clk); while (!lb_ack);
    d = lb_rdata;
    @(negedge clk); lb_rd = 0;
  endtask

  // largest eigenvalue of A^H A (A given as ROWS x COLS real/imag parts)
  function automatic real sigma1_sq(input real ar [ROWS][COLS], input real ai [ROWS][COLS], input int nr);
    real gr [COLS][COLS], gi [COLS][COLS], vr [COLS], vi [COLS], wr [COLS], wi [COLS];
    real nrm, lam;
    for (int p = 0; p < COLS; p++)
      for (int q = 0; q < COLS; q++) begin
        gr[p][q] = 0; gi[p][q] = 0;
        for (int r = 0; r < nr; r++) begin
          gr[p][q] += ar[r][p] * ar[r][q] + ai[r][p] * ai[r][q];
          gi[p][q] += ar[r][p] * ai[r][q] - ai[r][p] * ar[r][q];
        end
      end
    for (int p = 0; p < COLS; p++) begin vr[p] = 1.0 + 0.1 * p; vi[p] = 0.03 * p; end
    lam = 0;
    for (int it = 0; it < 600; it++) begin
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

  // ---------------- mechanism counters ----------------
  int n_sram_hold = 0, n_recirc = 0, n_rep_bp = 0, n_discard = 0;
  int qr_elems = 0;
  longint t_qr = 0;
  int n_bypass = 0, n_deposit = 0, n_dist_wait = 0, n_share = 0, n_share_wait = 0;
  always @(posedge clk) if (rst_n) begin
    if (lb_wr && lb_addr[23:20] == 4'd2 && dut.rep_sram_busy) n_sram_hold++;
    if (dut.u_rephase.state == 2'd2 && dut.u_rephase.st_in_v) n_recirc++;
    if (dut.u_rephase.state == 2'd2 && !dut.u_rephase.of_in_r) n_rep_bp++;
    if (dut.u_qr.g_pe[3].g_pair.u_ce.u_pe_a.pstate == 3'd2 && dut.u_qr.g_pe[3].g_pair.u_ce.u_pe_a.prev_first) n_discard++;
    if (dut.u_qr.g_pe[1].g_pair.u_ce.u_pe_b.out_sel_byp && dut.u_qr.g_pe[1].g_pair.u_ce.u_pe_b.by_out_v) n_bypass++;
    if (dut.u_qr.g_pe[0].g_single.u_pe.pstate == 3'd4) n_deposit++;
    if (dut.qr_v && !dut.qr_r) n_dist_wait++;
    if (dut.qr_v && dut.qr_r) begin
      qr_elems++;
      if (qr_elems % (ROWS * COLS) == 0) begin
        if (qr_elems > ROWS * COLS)
          $display("QR array: matrix interval %0d clocks", ($time - t_qr) / 10);
        t_qr = $time;
      end
    end
    // shared VPU of the combined element holding elements 1 and COLS-1
    if (dut.u_qr.g_pe[1].g_pair.u_ce.gnt_b) n_share++;
    if (dut.u_qr.g_pe[1].g_pair.u_ce.a_waited || dut.u_qr.g_pe[1].g_pair.u_ce.b_waited) n_share_wait++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real sre [ROWS][COLS], sim [ROWS][COLS], th [NPTS][COLS];
  real ar [ROWS][COLS], ai [ROWS][COLS], br [ROWS][COLS], bi [ROWS][COLS];
  int  seen [NPTS];
  int  used [NBD];

  initial begin
    logic [63:0] d, mask;
    int got, tag;
    real s_ref, s_dut, f_ref, f_dut, ang, c0, s0;
    lb_addr = '0; lb_wr = 0; lb_rd = 0; lb_wdata = '0;
    for (int w = 0; w < 1024; w++) sram_mem[w] = '0;
    repeat (4) @(posedge clk); rst_n = 1;
    // signal matrix
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int xr, xi;
        xr = $signed($urandom_range(0, 1 << 25)) - (1 << 24);
        xi = $signed($urandom_range(0, 1 << 25)) - (1 << 24);
        sre[r][c] = xr; sim[r][c] = xi;
        lb_write({4'd1, 20'(r * COLS + c)}, {32'(xr), 32'(xi)});
      end
    // phase steps, 30 fraction bits
    for (int p = 0; p < NPTS; p++)
      for (int c = 0; c < COLS; c++) begin
        int qc, qs;
        th[p][c] = ($urandom_range(0, 1 << 20) / real'(1 << 20) - 0.5) * 0.6;
        qc = int'($cos(th[p][c]) * (2.0 ** 30));
        qs = int'($sin(th[p][c]) * (2.0 ** 30));
        lb_write({4'd2, 20'(p * COLS + c)}, {32'(qc), 32'(qs)});
      end
    lb_write(24'd1, 64'(NPTS));
    lb_read(24'd1, d);
    check(d == 64'(NPTS), "NPOINTS read back");
    lb_write(24'd0, 64'd1);
    // a phase-step write during a fetch waits until the SRAM is free again
    wait (dut.u_rephase.state == 2'd1);
    lb_write({4'd2, 20'(NPTS * COLS)}, 64'h1234);
    check(dut.u_rephase.state != 2'd1 && sram_mem[NPTS * COLS] == 64'h1234, "SRAM write completed after the fetch");
    got = 0;
    while (got < NPTS) begin
      lb_read(24'd2, mask);
      for (int b = 0; b < NBD; b++) if (mask[b]) begin
        lb_read(24'(4 + b), d);
        tag = int'(d);
        used[b]++;
        for (int r = 0; r < COLS; r++) for (int c = 0; c < COLS; c++) begin br[r][c] = 0; bi[r][c] = 0; end
        for (int x = 0; x < NRES; x++) begin
          lb_read({4'd3, 4'(b), 15'(x), 1'b0}, d); br[x / 2][x / 2 + x % 2] = real'($signed(d));
          lb_read({4'd3, 4'(b), 15'(x), 1'b1}, d); bi[x / 2][x / 2 + x % 2] = real'($signed(d));
        end
        // slow host: let the array back up before releasing
        repeat (2000) @(posedge clk);
        lb_write(24'd2, 64'(1 << b));
        check(tag >= 0 && tag < NPTS, "grid point number in range");
        if (tag >= 0 && tag < NPTS) begin
          seen[tag]++;
          // reference: rephase in floating point
          for (int r = 0; r < ROWS; r++)
            for (int c = 0; c < COLS; c++) begin
              ang = th[tag][c] * (ROWS - 1 - r);
              c0 = $cos(ang); s0 = $sin(ang);
              ar[r][c] = sre[r][c] * c0 - sim[r][c] * s0;
              ai[r][c] = sre[r][c] * s0 + sim[r][c] * c0;
            end
          s_ref = sigma1_sq(ar, ai, ROWS);
          s_dut = sigma1_sq(br, bi, COLS);
          f_ref = 0; f_dut = 0;
          for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
            f_ref += ar[r][c] ** 2 + ai[r][c] ** 2;
            if (r < COLS) f_dut += br[r][c] ** 2 + bi[r][c] ** 2;
          end
          check(fabs(s_ref - s_dut) < 2e-6 * s_ref, $sformatf("point %0d metric %g vs %g", tag, s_dut, s_ref));
          check(fabs(f_ref - f_dut) < 2e-6 * f_ref, $sformatf("point %0d energy %g vs %g", tag, f_dut, f_ref));
          $display("point %0d: sigma1^2 = %g (reference %g, rel. error %g)", tag, s_dut, s_ref, (s_dut - s_ref) / s_ref);
        end
        got++;
        $display("[%0t] results of point %0d from module %0d", $time, tag, b);
      end
    end
    for (int p = 0; p < NPTS; p++) check(seen[p] == 1, $sformatf("point %0d reported once", p));
    repeat (10) @(posedge clk);
    lb_read(24'd0, d);
    check(d[0] == 1'b0, "run finished");
    $display("mechanisms: sram_hold=%0d recirculate=%0d rephase_backpressure=%0d discarded_first=%0d bypass=%0d deposit=%0d distributor_wait=%0d vpu_shared=%0d vpu_conflict=%0d",
             n_sram_hold, n_recirc, n_rep_bp, n_discard, n_bypass, n_deposit, n_dist_wait, n_share, n_share_wait);
    check(n_sram_hold > 0, "host SRAM write held off");
    check(n_recirc > 0, "phase-step recirculation");
    check(n_rep_bp > 0, "back-pressure into rephasing");
    check(n_discard > 0, "first rotation discarded");
    check(n_bypass > 0, "bypass rows");
    check(n_share > 0, "shared VPU used by the second element of a pair");
    check(n_share_wait > 0, "shared VPU conflict resolved");
    check(n_deposit > 0, "diagonal deposit");
    check(n_dist_wait > 0, "distributor waited for a module");
    for (int b = 0; b < NBD; b++) check(used[b] > 0, $sformatf("module %0d used", b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
