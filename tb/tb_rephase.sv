// tb_rephase: writes a random signal matrix and the phase steps of three
// grid points, runs the rephasing stage and compares every output element
// with the matrix element multiplied, in floating point, by e^{j k theta_c}
// (k counted from the bottom row, theta_c the column's phase step).  The
// first point runs without back-pressure and must deliver ROWS*COLS elements
// in ROWS*COLS consecutive clocks; the later points see random back-pressure.
// The phase-step SRAM is a behavioural model with two clocks of read latency.
module tb_rephase;
  import sart_pkg::*;
  localparam int ROWS = 6, COLS = 4, MAXP = 8, NPTS = 3;
  localparam int SAW = $clog2(MAXP * COLS), MAW = $clog2(ROWS * COLS), PW = $clog2(MAXP + 1);
  logic clk = 0, rst_n = 0;
  logic mat_we, start, busy, sram_busy, sram_rd, sram_rvalid, out_valid, out_ready;
  logic [MAW-1:0] mat_waddr;
  cplx_t mat_wdata, out_data;
  logic [PW-1:0] npoints;
  logic [SAW-1:0] sram_addr;
  logic [63:0] sram_rdata;
  int checks = 0, failures = 0;

  rephase #(.ROWS(ROWS), .COLS(COLS), .MAX_POINTS(MAXP)) dut (.*);
  always #5 clk = ~clk;

  logic [63:0] sram [MAXP * COLS];
  logic [1:0]  rv;
  logic [63:0] rd0, rd1;
  always_ff @(posedge clk) begin
    rv <= {rv[0], sram_rd};
    rd0 <= sram[sram_addr];
    rd1 <= rd0;
  end
  assign sram_rvalid = rv[1];
  assign sram_rdata  = rd1;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real sr [ROWS][COLS], si [ROWS][COLS], th [NPTS][COLS];
  int n_out = 0;
  longint t_first, t_last;
  bit bp = 0;

  always @(negedge clk) out_ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int p, idx, r, c;
    real ang, er, ei;
    p = n_out / (ROWS * COLS); idx = n_out % (ROWS * COLS);
    r = ROWS - 1 - idx / COLS; c = idx % COLS;
    ang = th[p][c] * (ROWS - 1 - r);
    er = sr[r][c] * $cos(ang) - si[r][c] * $sin(ang);
    ei = sr[r][c] * $sin(ang) + si[r][c] * $cos(ang);
    checks++;
    if (fabs(out_data.re - er) + fabs(out_data.im - ei) > 16.0) begin
      failures++;
      $display("FAIL p=%0d r=%0d c=%0d got %0d %0d exp %f %f", p, r, c, out_data.re, out_data.im, er, ei);
    end
    if (n_out == 0) t_first = $time;
    if (n_out == ROWS * COLS - 1) t_last = $time;
    n_out++;
    if (n_out == ROWS * COLS) bp = 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mat_we = 0; start = 0; npoints = '0; mat_waddr = '0; mat_wdata = CPLX_ZERO;
    for (int p = 0; p < NPTS; p++)
      for (int c = 0; c < COLS; c++) begin
        int qc, qs;
        th[p][c] = ($urandom_range(0, 1 << 20) / real'(1 << 20) - 0.5) * 6.0;
        qc = int'($cos(th[p][c]) * (2.0 ** 30));
        qs = int'($sin(th[p][c]) * (2.0 ** 30));
        sram[p * COLS + c] = {32'(qc), 32'(qs)};
      end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        mat_we = 1; mat_waddr = MAW'(r * COLS + c);
        mat_wdata.re = sdata_t'($signed($urandom_range(0, 1 << 29)) - (1 << 28));
        mat_wdata.im = sdata_t'($signed($urandom_range(0, 1 << 29)) - (1 << 28));
        sr[r][c] = mat_wdata.re; si[r][c] = mat_wdata.im;
      end
    @(negedge clk); mat_we = 0; start = 1; npoints = PW'(NPTS);
    @(negedge clk); start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy after start"); end
    wait (n_out == NPTS * ROWS * COLS);
    repeat (5) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    // one element per clock once the phase steps are loaded
    checks++;
    if ((t_last - t_first) / 10 != ROWS * COLS - 1) begin
      failures++; $display("FAIL first point took %0d clocks", (t_last - t_first) / 10 + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
