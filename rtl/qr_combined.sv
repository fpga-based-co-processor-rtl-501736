// qr_combined: two QR processing elements with complementary loads sharing
// one vector processing unit.  Element A annihilates column KA and element B
// column KB.  Rows reach element K with their first K columns already zero,
// so element K has COLS-K useful columns per row; with KB = COLS-KA the two
// loads add up to one full row, and a single VPU can serve both without
// slowing either much.  Each element keeps its own receive stage, measure
// stage (two CORDIC units), buffers and bypass, and its own input and output
// streams, which belong to different places in the array (A to element KA-1
// and KA+1, B to KB-1 and KB+1).
//
// Sharing: an element requests the VPU on every clock of a processing state
// that handles a non-zero column and can advance; its counter advances only
// when granted.  Clocks on the known-zero columns produce zero without the
// VPU.  When both request in the same clock the grant alternates
// (round-robin), so a waiting element is served on the next clock.
//
// Interfaces: two independent valid/ready element streams per direction
// (a_* and b_*), as in qr_pe.  The reference architecture divides every
// processing state into fixed time slots A and B; the request/grant
// arbitration that replaces the fixed schedule here is this design's own
// choice, as is the CORDIC arrangement (two units per element instead of one
// shared four-slot pipeline per pair).
module qr_combined
  import sart_pkg::*;
#(
  parameter int ROWS = 128,
  parameter int COLS = 16,
  parameter int KA   = 1,
  parameter int KB   = COLS - KA,
  parameter int ITER = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  a_in_valid,
  output logic  a_in_ready,
  input  cplx_t a_in_data,
  output logic  a_out_valid,
  input  logic  a_out_ready,
  output cplx_t a_out_data,
  input  logic  b_in_valid,
  output logic  b_in_ready,
  input  cplx_t b_in_data,
  output logic  b_out_valid,
  input  logic  b_out_ready,
  output cplx_t b_out_data
);
  logic    req_a, req_b, gnt_a, gnt_b, last_b;
  logic    a_waited, b_waited;  // a request that lost a conflict
  vpu_op_e op_a, op_b, op;
  cplx_t   ab_a, cd_a, cs_a, ab_b, cd_b, cs_b, ab, cd, cs, xy;

  qr_pe #(.ROWS(ROWS), .COLS(COLS), .K(KA), .ITER(ITER), .SHARED(1'b1)) u_pe_a (
    .clk, .rst_n,
    .in_valid(a_in_valid), .in_ready(a_in_ready), .in_data(a_in_data),
    .out_valid(a_out_valid), .out_ready(a_out_ready), .out_data(a_out_data),
    .vpu_req(req_a), .vpu_gnt(gnt_a), .vpu_op(op_a), .vpu_ab(ab_a),
    .vpu_cd(cd_a), .vpu_cs(cs_a), .vpu_xy(xy));

  qr_pe #(.ROWS(ROWS), .COLS(COLS), .K(KB), .ITER(ITER), .SHARED(1'b1)) u_pe_b (
    .clk, .rst_n,
    .in_valid(b_in_valid), .in_ready(b_in_ready), .in_data(b_in_data),
    .out_valid(b_out_valid), .out_ready(b_out_ready), .out_data(b_out_data),
    .vpu_req(req_b), .vpu_gnt(gnt_b), .vpu_op(op_b), .vpu_ab(ab_b),
    .vpu_cd(cd_b), .vpu_cs(cs_b), .vpu_xy(xy));

  // round-robin arbiter: on a conflict the element not served last wins
  assign gnt_a    = req_a && (!req_b || last_b);
  assign gnt_b    = req_b && !gnt_a;
  assign a_waited = req_a && !gnt_a;
  assign b_waited = req_b && !gnt_b;

  always_ff @(posedge clk) begin
    if (!rst_n)     last_b <= 1'b1;
    else if (gnt_a) last_b <= 1'b0;
    else if (gnt_b) last_b <= 1'b1;
  end

  assign op = gnt_b ? op_b : op_a;
  assign ab = gnt_b ? ab_b : ab_a;
  assign cd = gnt_b ? cd_b : cd_a;
  assign cs = gnt_b ? cs_b : cs_a;

  vpu u_vpu (.op, .ab, .cd, .cs, .xy);

  a_gnt_valid: assert property (@(posedge clk) disable iff (!rst_n) !(gnt_a && gnt_b));
endmodule
