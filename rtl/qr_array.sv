// qr_array: linear systolic array of NPE QR processing elements.  Element k
// annihilates the sub-diagonal part of column k, so a ROWS x COLS matrix that
// enters row by row (bottom row first) leaves as the upper-triangular factor R
// of its QR decomposition (R has the matrix's singular values), again bottom
// row first, ROWS rows of COLS elements with rows COLS..ROWS-1 numerically
// zero.  Elements are chained by valid/ready element streams; each element's
// receive buffer absorbs timing differences between neighbours, so several
// matrices can be in the array at once, one per element.
//
// NPE defaults to COLS, one element per column.  With FOLD set (the default,
// used when NPE = COLS) the array is folded into a U: elements k and COLS-k,
// whose loads of COLS-k and k non-zero columns add up to one full row, are
// built as one qr_combined sharing a VPU, for k = 1 .. (COLS-1)/2.  Element
// 0 (full load) and, for even COLS, element COLS/2 keep a VPU of their own.
// With FOLD clear, or NPE < COLS, every element has its own VPU.
module qr_array
  import sart_pkg::*;
#(
  parameter int ROWS = 128,
  parameter int COLS = 16,
  parameter int NPE  = COLS,
  parameter int ITER = 32,
  parameter bit FOLD = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data
);
  logic  v [NPE+1];
  logic  r [NPE+1];
  cplx_t d [NPE+1];

  assign v[0]      = in_valid;
  assign in_ready  = r[0];
  assign d[0]      = in_data;
  assign out_valid = v[NPE];
  assign r[NPE]    = out_ready;
  assign out_data  = d[NPE];

  localparam bit DO_FOLD = FOLD && (NPE == COLS) && (COLS >= 3);

  for (genvar k = 0; k < NPE; k++) begin : g_pe
    if (!DO_FOLD || k == 0 || 2 * k == COLS) begin : g_single
      qr_pe #(.ROWS(ROWS), .COLS(COLS), .K(k), .ITER(ITER)) u_pe (
        .clk, .rst_n,
        .in_valid(v[k]), .in_ready(r[k]), .in_data(d[k]),
        .out_valid(v[k+1]), .out_ready(r[k+1]), .out_data(d[k+1]),
        .vpu_req(), .vpu_gnt(1'b1), .vpu_op(), .vpu_ab(), .vpu_cd(), .vpu_cs(),
        .vpu_xy(CPLX_ZERO));
    end else if (2 * k < COLS) begin : g_pair
      // element k (slot A) with its partner COLS-k (slot B)
      qr_combined #(.ROWS(ROWS), .COLS(COLS), .KA(k), .KB(COLS - k), .ITER(ITER)) u_ce (
        .clk, .rst_n,
        .a_in_valid(v[k]), .a_in_ready(r[k]), .a_in_data(d[k]),
        .a_out_valid(v[k+1]), .a_out_ready(r[k+1]), .a_out_data(d[k+1]),
        .b_in_valid(v[COLS-k]), .b_in_ready(r[COLS-k]), .b_in_data(d[COLS-k]),
        .b_out_valid(v[COLS-k+1]), .b_out_ready(r[COLS-k+1]), .b_out_data(d[COLS-k+1]));
    end
  end
endmodule
