// qr_pe: one processing element of the linear QR-decomposition array.  It
// annihilates every sub-diagonal element of one column K (0-based) of a
// ROWS x COLS complex matrix that streams through it row by row, bottom row
// first, COLS elements per row, and passes on a matrix with the same singular
// values in which column K is zero below the diagonal.
//
// Per matrix it performs, for rows m = ROWS-1 down to K:
//   rephase row m so that its column-K element becomes real (phase rotation);
//   Givens-rotate it against the feedback row F, which keeps the energy and
//   becomes the new F; the other result row (with a zero in column K) is
//   output as row m+1;
// and finally deposits F as row K.  The bottom row only initialises F (the
// feedback buffer starts at zero and the output of that first rotation is
// discarded).  Rows above the diagonal (m < K) go through a bypass FIFO and
// leave after row K, so rows leave in the order they arrived.
//
// Inside, following the element structure of the source architecture:
//  * receive stage: a FIFO of RX_DEPTH elements that decouples the
//    neighbour's timing, and a row counter that classifies each row as
//    sub-diagonal (m > K), diagonal (m = K) or super-diagonal (m < K);
//  * measure-and-compare stage (qr_measure): the target element is latched
//    while the row is unloaded into the primary buffer, and its phase and
//    magnitude measured; the Givens vector is computed from the magnitude and
//    the feedback row's target element;
//  * processing stage: a state machine idle -> feedback -> output -> rotate
//    -> idle, COLS clocks per state, driving one VPU.  "feedback" applies the
//    feedback half of the previous row's Givens rotation (into the second
//    bank of the feedback row buffer), "output" applies the output half and
//    streams the result row out, "rotate" rephases the new row from the
//    primary buffer into the rotated-row buffer.  The primary buffer has two
//    banks: the next row loads, and its phase and magnitude are measured,
//    while the current one is processed; the Givens vector of the current
//    row is measured from the start of the output pass, as soon as the new
//    feedback row is known, and is taken over when the next feedback pass
//    begins.  So both CORDIC latencies are hidden behind the VPU passes.  After
//    the diagonal row one more feedback/output pass runs, followed by an
//    output pass with the unit vector e^{j pi/2}, which outputs F itself and
//    clears it (the zero input of the feedback buffer);
//  * bypass buffer: a FIFO holding the super-diagonal rows until F is out.
//
// A newrow event needs the row in the primary buffer, its phase vector and,
// if a previous row waits, that row's Givens vector.  A row takes 3*COLS
// clocks plus a few clocks of hand-over (the Givens measurement, started at
// the output pass, ends ITER+2 clocks later), as long as 2*COLS >= ITER;
// waits for a shared VPU and for neighbours add to that.  Only the state
// names and their order come from the source; the two feedback banks, the direct
// idle -> rotate step for the first row of a matrix and the separate deposit
// pass, the two-bank primary buffer and the start of the Givens measurement
// in the output pass are this design's.  Streams use valid/ready handshakes.
//
// With SHARED = 1 the element has no VPU of its own: it drives the operands
// out, raises vpu_req on every clock that needs the VPU and can advance, and
// advances only when vpu_gnt is high (see qr_combined).  Columns left of K
// are then known to be zero and are produced as zero without the VPU.  With
// SHARED = 0 vpu_gnt and vpu_xy are not used.
module qr_pe
  import sart_pkg::*;
#(
  parameter int ROWS      = 128,
  parameter int COLS      = 16,
  parameter int K         = 0,
  parameter int ITER      = 32,
  parameter int RX_DEPTH  = 2 * COLS,
  parameter bit SHARED    = 1'b0,
  localparam int BYP_DEPTH = ((K > 0) ? K : 1) * COLS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data,
  // shared VPU (SHARED = 1): operands out, request/grant, result in.
  // With SHARED = 0 the element has its own VPU; the operands are still
  // driven, vpu_req stays low and vpu_gnt / vpu_xy are not used.
  output logic    vpu_req,
  input  logic    vpu_gnt,
  output vpu_op_e vpu_op,
  output cplx_t   vpu_ab,
  output cplx_t   vpu_cd,
  output cplx_t   vpu_cs,
  input  cplx_t   vpu_xy
);
  localparam int RW = $clog2(ROWS + 1);
  localparam int CW = $clog2(COLS + 1);
  localparam int BW = $clog2(BYP_DEPTH + 1);

  typedef enum logic [2:0] {
    P_IDLE, P_FEEDBACK, P_OUTPUT, P_ROTATE, P_DEPOSIT
  } pstate_e;

  // ---------------- receive stage ----------------
  logic  rx_v, rx_r;
  cplx_t rx_d;
  logic [RW-1:0] un_row;      // index of the row at the head of the buffer
  logic [CW-1:0] un_col;
  row_type_e     un_type;

  sync_fifo #(.WIDTH($bits(cplx_t)), .DEPTH(RX_DEPTH)) u_rx (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(rx_v), .out_ready(rx_r), .out_data(rx_d), .count());

  always_comb begin
    if (un_row > RW'(K))       un_type = ROW_SUB;
    else if (un_row == RW'(K)) un_type = ROW_DIAG;
    else                       un_type = ROW_SUPER;
  end

  // ---------------- bypass buffer ----------------
  logic  by_in_v, by_in_r, by_out_v, by_out_r;
  cplx_t by_out_d;

  sync_fifo #(.WIDTH($bits(cplx_t)), .DEPTH(BYP_DEPTH)) u_bypass (
    .clk, .rst_n, .in_valid(by_in_v), .in_ready(by_in_r), .in_data(rx_d),
    .out_valid(by_out_v), .out_ready(by_out_r), .out_data(by_out_d), .count());

  // ---------------- primary buffer (two banks) ----------------
  // Bank pw is loaded from the receive stage while bank pr is processed.
  cplx_t prim [2][COLS];
  logic  prim_full [2], prim_first [2], prim_diag [2];
  logic  pw, pr, prim_load, ph_pend, ph_bank;
  sdata_t mag_b [2];           // |A| of each buffered row
  cplx_t  uph_b [2];           // rephasing vector of each buffered row
  logic   ph_ok_b [2];

  // unloading: super-diagonal rows to the bypass, others to the primary
  // buffer; the target element waits while the phase unit is still busy
  assign prim_load = rx_v && (un_type != ROW_SUPER) && !prim_full[pw] &&
                     !(un_col == CW'(K) && ph_pend);
  assign by_in_v   = rx_v && (un_type == ROW_SUPER);
  assign rx_r      = prim_load || (by_in_v && by_in_r);

  // ---------------- measure and compare ----------------
  cplx_t  u_ph, u_g;
  sdata_t mag_a;
  logic   ph_done, g_done, g_start;
  logic   ph_ok, ug_ok, g_issued;
  sdata_t fb_target;

  qr_measure #(.ITER(ITER)) u_measure (
    .clk, .rst_n,
    .rx_latch(prim_load && un_col == CW'(K)), .rx_elem(rx_d),
    .fb_latch(g_start), .fb_elem(fb_target), .a_mag(mag_b[pr]),
    .u_ph, .mag_a, .ph_done, .u_g, .g_done);

  // ---------------- processing stage ----------------
  pstate_e pstate;
  logic [CW-1:0] cnt;
  cplx_t rot [COLS];
  cplx_t fbk [2][COLS];
  logic  fsel;                 // bank holding the current feedback row
  logic  has_prev, prev_first, flush;
  cplx_t ug_reg, uph_reg;
  logic  enter_fb;
  logic  last_cnt, emit, step;
  logic  out_sel_byp;
  logic [BW-1:0] byp_left;

  vpu_op_e vop;
  cplx_t   vab, vcd, vcs, vxy, own_xy;
  logic    zero_col, out_ok, need_vpu, vpu_ok;

  if (SHARED) begin : g_shared
    assign own_xy = vpu_xy;
  end else begin : g_own
    vpu u_vpu (.op(vop), .ab(vab), .cd(vcd), .cs(vcs), .xy(own_xy));
  end
  assign vpu_op = vop;
  assign vpu_ab = vab;
  assign vpu_cd = vcd;
  assign vpu_cs = vcs;

  // In a shared element the columns left of K are known to be zero in every
  // row that is processed (earlier elements annihilated them), so those
  // clocks need no VPU and produce zero.
  assign zero_col = SHARED && (cnt < CW'(K));
  assign vxy      = zero_col ? CPLX_ZERO : own_xy;

  // the Givens vector of the row in bank pr is measured as soon as the
  // feedback row it meets is known: at the start of the output pass (the new
  // F is in bank !fsel), or after the rotate pass for the first row of a
  // matrix (F is still empty)
  assign fb_target = (pstate == P_OUTPUT) ? fbk[!fsel][K].re : fbk[fsel][K].re;
  assign last_cnt  = (cnt == CW'(COLS - 1));

  // operand selection (Fig. "processing stage")
  always_comb begin
    vab = rot[cnt];
    vcd = fbk[fsel][cnt];
    vcs = ug_reg;
    vop = VPU_OUT;
    unique case (pstate)
      P_FEEDBACK: vop = VPU_FB;
      P_ROTATE:   begin vop = VPU_ROT; vab = prim[pr][cnt]; vcs = uph_reg; end
      P_DEPOSIT:  vcs = CPLX_J;
      default:    ;
    endcase
  end

  assign emit = (pstate == P_OUTPUT && !prev_first) || (pstate == P_DEPOSIT);
  // the counter advances every clock of a state, except while an emitted
  // element waits for the next element or the bypass owns the output
  assign out_ok   = !emit || (out_ready && !out_sel_byp);
  assign need_vpu = SHARED && (pstate != P_IDLE) && !zero_col;
  assign vpu_req  = need_vpu && out_ok;
  assign vpu_ok   = !need_vpu || vpu_gnt;
  assign enter_fb = (pstate == P_IDLE) && has_prev && ug_ok &&
                    (flush || (prim_full[pr] && ph_ok));
  assign step     = (pstate != P_IDLE) && out_ok && vpu_ok;

  assign out_valid = out_sel_byp ? by_out_v : (emit && vpu_ok);
  assign out_data  = out_sel_byp ? by_out_d : vxy;
  assign by_out_r  = out_sel_byp && out_ready;
  assign g_start   = step && !g_issued &&
                     ((pstate == P_OUTPUT && cnt == '0 && !flush) ||
                      (pstate == P_ROTATE && last_cnt));
  assign uph_reg   = uph_b[pr];
  assign ph_ok     = ph_ok_b[pr];

  always_ff @(posedge clk) begin
    if (prim_load) prim[pw][un_col[CW-1:0]] <= rx_d;
    if (step) begin
      unique case (pstate)
        P_FEEDBACK: fbk[!fsel][cnt] <= vxy;
        P_ROTATE:   rot[cnt]        <= vxy;
        P_DEPOSIT:  fbk[fsel][cnt]  <= CPLX_ZERO;
        default:    ;
      endcase
    end
    if (!rst_n) begin
      for (int i = 0; i < COLS; i++) begin
        fbk[0][i] <= CPLX_ZERO;
        fbk[1][i] <= CPLX_ZERO;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      un_row <= RW'(ROWS - 1); un_col <= '0;
      for (int b = 0; b < 2; b++) begin
        prim_full[b] <= 1'b0; prim_first[b] <= 1'b0; prim_diag[b] <= 1'b0;
        ph_ok_b[b] <= 1'b0; mag_b[b] <= '0; uph_b[b] <= CPLX_ZERO;
      end
      pw <= 1'b0; pr <= 1'b0; ph_pend <= 1'b0; ph_bank <= 1'b0;
      ug_ok <= 1'b0; g_issued <= 1'b0;
      pstate <= P_IDLE; cnt <= '0; fsel <= 1'b0;
      has_prev <= 1'b0; prev_first <= 1'b0; flush <= 1'b0;
      ug_reg <= CPLX_ZERO;
      out_sel_byp <= 1'b0; byp_left <= '0;
    end else begin
      // receive-side row and column counters
      if (rx_v && rx_r) begin
        if (un_col == CW'(COLS - 1)) begin
          un_col <= '0;
          un_row <= (un_row == '0) ? RW'(ROWS - 1) : un_row - 1'b1;
          if (prim_load) begin
            prim_full[pw]  <= 1'b1;
            prim_first[pw] <= (un_row == RW'(ROWS - 1));
            prim_diag[pw]  <= (un_type == ROW_DIAG);
            pw             <= !pw;
          end
        end else un_col <= un_col + 1'b1;
      end
      if (prim_load && un_col == CW'(K)) begin ph_pend <= 1'b1; ph_bank <= pw; end
      if (ph_done) begin
        ph_pend          <= 1'b0;
        ph_ok_b[ph_bank] <= 1'b1;
        uph_b[ph_bank]   <= u_ph;
        mag_b[ph_bank]   <= mag_a;
      end
      if (g_done)  ug_ok <= 1'b1;
      if (g_start) g_issued <= 1'b1;
      // the Givens vector is taken over when its feedback pass begins, so a
      // new measurement may run while the old vector is still in use
      if (enter_fb) ug_reg <= u_g;

      // bypass rows leave after the deposited diagonal row
      if (out_sel_byp && by_out_v && out_ready) begin
        byp_left <= byp_left - 1'b1;
        if (byp_left == BW'(1)) out_sel_byp <= 1'b0;
      end

      unique case (pstate)
        P_IDLE: begin
          cnt <= '0;
          if (flush && ug_ok) begin
            pstate <= P_FEEDBACK;
            ug_ok  <= 1'b0;
          end else if (!flush && prim_full[pr] && ph_ok && (!has_prev || ug_ok)) begin
            pstate <= has_prev ? P_FEEDBACK : P_ROTATE;
            if (has_prev) ug_ok <= 1'b0;
          end
        end
        P_FEEDBACK: if (step) begin
          cnt <= last_cnt ? '0 : cnt + 1'b1;
          if (last_cnt) pstate <= P_OUTPUT;
        end
        P_OUTPUT: if (step) begin
          cnt <= last_cnt ? '0 : cnt + 1'b1;
          if (last_cnt) begin
            fsel       <= !fsel;
            prev_first <= 1'b0;
            pstate     <= flush ? P_DEPOSIT : P_ROTATE;
          end
        end
        P_ROTATE: if (step) begin
          cnt <= last_cnt ? '0 : cnt + 1'b1;
          if (last_cnt) begin
            prim_full[pr] <= 1'b0;
            ph_ok_b[pr]   <= 1'b0;
            pr            <= !pr;
            g_issued      <= 1'b0;
            has_prev      <= 1'b1;
            prev_first    <= prim_first[pr];
            flush         <= prim_diag[pr];
            pstate        <= P_IDLE;
          end
        end
        P_DEPOSIT: if (step) begin
          cnt <= last_cnt ? '0 : cnt + 1'b1;
          if (last_cnt) begin
            has_prev <= 1'b0;
            flush    <= 1'b0;
            pstate   <= P_IDLE;
            if (K > 0) begin
              out_sel_byp <= 1'b1;
              byp_left    <= BW'(K * COLS);
            end
          end
        end
        default: pstate <= P_IDLE;
      endcase
    end
  end

  // an offered output element must stay offered until taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid)
    else $error("qr_pe: output withdrawn before it was accepted");
endmodule
