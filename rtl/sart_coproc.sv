// sart_coproc: top level of the SART co-processor.  For every point of a
// scan grid it rephases the stored ROWS x COLS signal matrix (rows are
// sub-carriers, columns are receive antennas) with that point's phase
// references, reduces the rephased matrix to upper-triangular form in the
// linear QR array, reduces that to bidiagonal form in one of NBD
// bidiagonalization modules, and keeps the diagonal and super-diagonal for
// the host, whose final diagonalization yields the singular values; the
// largest one is the SART metric of the grid point.
//
// Data path:  host_if -> signal matrix memory (inside rephase)
//             host_if -> phase-step SRAM (external) -> rephase
//             rephase -> qr_array (NPE elements) -> distributor
//             distributor -> bidiag[0..NBD-1] -> result multiplexer -> host_if
// The distributor sends whole matrices to the bidiagonalization modules in
// turn (0, 1, ..., NBD-1, 0, ...), waiting while the next one still holds
// results the host has not released; the wait back-pressures the QR array
// and the rephasing stage.  Each module's grid-point number is recorded so
// the host can tell which point a result belongs to.
//
// External ports: the local bus of the PCI bridge (see host_if) and the
// phase-step SRAM (write strobe, read request, shared address, 64-bit data;
// read data returns with sram_rvalid, any fixed latency).  The SRAM belongs
// to the rephasing stage while it fetches the phase steps of a grid point and
// to the host otherwise; a host write that arrives during a fetch is held.
module sart_coproc
  import sart_pkg::*;
#(
  parameter int ROWS       = 128,
  parameter int COLS       = 16,
  parameter int NPE        = COLS,
  parameter int NBD        = 4,
  parameter int ITER       = 32,
  parameter int MAX_POINTS = 16384,
  localparam int SRAM_AW   = $clog2(MAX_POINTS * COLS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // local bus of the PCI bridge
  input  logic [23:0]        lb_addr,
  input  logic               lb_wr,
  input  logic               lb_rd,
  input  logic [63:0]        lb_wdata,
  output logic [63:0]        lb_rdata,
  output logic               lb_ack,
  // phase-step SRAM
  output logic               sram_we,
  output logic               sram_rd,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [63:0]        sram_wdata,
  input  logic               sram_rvalid,
  input  logic [63:0]        sram_rdata
);
  localparam int MAT_AW = $clog2(ROWS * COLS);
  localparam int PT_W   = $clog2(MAX_POINTS + 1);
  localparam int XW     = $clog2(2 * COLS);
  localparam int BDW    = (NBD > 1) ? $clog2(NBD) : 1;
  localparam int EW     = $clog2(ROWS * COLS + 1);

  logic              start, rep_busy, rep_sram_busy, run_busy;
  logic [PT_W-1:0]   npoints;
  logic              mat_we;
  logic [MAT_AW-1:0] mat_waddr;
  cplx_t             mat_wdata;
  logic              h_sram_we;
  logic [SRAM_AW-1:0] h_sram_addr, r_sram_addr;
  logic              r_sram_rd;

  logic              rp_v, rp_r, qr_v, qr_r;
  cplx_t             rp_d, qr_d;

  logic [BDW-1:0]    res_mod;
  logic [XW-1:0]     res_idx;
  cplx_t             res_data;
  logic [NBD-1:0]    res_valid, res_release, bd_busy, bd_ready;
  cplx_t             bd_res [NBD];
  logic [PT_W-1:0]   res_tag [NBD];

  host_if #(.ROWS(ROWS), .COLS(COLS), .NBD(NBD), .MAX_POINTS(MAX_POINTS)) u_host (
    .clk, .rst_n, .lb_addr, .lb_wr, .lb_rd, .lb_wdata, .lb_rdata, .lb_ack,
    .start, .npoints, .run_busy,
    .mat_we, .mat_waddr, .mat_wdata,
    .sram_we(h_sram_we), .sram_waddr(h_sram_addr), .sram_wdata, .sram_busy(rep_sram_busy),
    .res_mod, .res_idx, .res_data, .res_valid, .res_tag, .res_release);

  // SRAM ownership
  assign sram_we   = h_sram_we && !rep_sram_busy;
  assign sram_rd   = r_sram_rd;
  assign sram_addr = rep_sram_busy ? r_sram_addr : h_sram_addr;

  rephase #(.ROWS(ROWS), .COLS(COLS), .MAX_POINTS(MAX_POINTS)) u_rephase (
    .clk, .rst_n, .mat_we, .mat_waddr, .mat_wdata,
    .start, .npoints, .busy(rep_busy), .sram_busy(rep_sram_busy),
    .sram_rd(r_sram_rd), .sram_addr(r_sram_addr), .sram_rvalid, .sram_rdata,
    .out_valid(rp_v), .out_ready(rp_r), .out_data(rp_d));

  qr_array #(.ROWS(ROWS), .COLS(COLS), .NPE(NPE), .ITER(ITER)) u_qr (
    .clk, .rst_n, .in_valid(rp_v), .in_ready(rp_r), .in_data(rp_d),
    .out_valid(qr_v), .out_ready(qr_r), .out_data(qr_d));

  // ---------------- distributor ----------------
  logic [BDW-1:0]  dsel;
  logic [EW-1:0]   dcnt;
  logic [PT_W-1:0] mat_no;
  logic            dfire;

  assign qr_r  = bd_ready[dsel];
  assign dfire = qr_v && qr_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsel <= '0; dcnt <= '0; mat_no <= '0;
      for (int b = 0; b < NBD; b++) res_tag[b] <= '0;
    end else begin
      if (start && !run_busy) mat_no <= '0;
      if (dfire) begin
        if (dcnt == '0) res_tag[dsel] <= mat_no;
        if (dcnt == EW'(ROWS * COLS - 1)) begin
          dcnt   <= '0;
          mat_no <= mat_no + 1'b1;
          dsel   <= (dsel == BDW'(NBD - 1)) ? '0 : dsel + 1'b1;
        end else dcnt <= dcnt + 1'b1;
      end
    end
  end

  for (genvar b = 0; b < NBD; b++) begin : g_bd
    bidiag #(.ROWS(ROWS), .COLS(COLS), .ITER(ITER)) u_bd (
      .clk, .rst_n,
      .in_valid(qr_v && dsel == BDW'(b)), .in_ready(bd_ready[b]), .in_data(qr_d),
      .res_valid(res_valid[b]), .res_idx(res_idx), .res_data(bd_res[b]),
      .release_i(res_release[b]), .busy(bd_busy[b]));
  end

  // result multiplexer towards the host
  assign res_data = bd_res[res_mod];

  // a run is busy until every matrix has left the QR array and been reduced
  logic qr_active;
  logic [PT_W-1:0] mat_target;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mat_target <= '0;
    else if (start && !run_busy) mat_target <= npoints;
  end
  assign qr_active = (mat_no != mat_target);
  assign run_busy  = rep_busy || qr_active || ((bd_busy & ~res_valid) != '0);
endmodule
