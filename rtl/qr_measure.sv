// qr_measure: measure-and-compare stage of a QR processing element.
//
// It holds two CORDIC units.  The phase unit measures the target element of
// a newly arrived row as it is unloaded from the receive buffer (rx_latch):
// it returns the row's rephasing vector u_ph = e^{-j angle(A)} and |A|.  The
// compare unit is started (fb_latch) once the feedback row's target element
// F is available; it measures the vector F + j|A| and so returns the Givens
// rotation vector u_g = (F - j|A|)/sqrt(F^2 + |A|^2) whose use in the
// output half of the rotation cancels the row's target element and whose use
// in the feedback half moves its energy into the feedback row.  Only the real
// part of F is used: after its own rephasing and rotation it is real and
// non-negative.  |A| comes in on a_mag and is sampled when the compare unit
// starts: the caller keeps the magnitude of each buffered row (mag_a as it
// was when that row's phase measurement ended), so the phase unit may
// already be measuring a later row.
//
// Both results are registered and held until the next measurement; ph_done
// and g_done pulse for one clock when they change.  Latency is that of the
// CORDIC (ITER + 2 clocks).
module qr_measure
  import sart_pkg::*;
#(
  parameter int ITER = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   rx_latch,
  input  cplx_t  rx_elem,     // target element of the arriving row
  input  logic   fb_latch,
  input  sdata_t fb_elem,     // real part of the feedback row's target element
  input  sdata_t a_mag,       // |A| of the row to be rotated against F
  output cplx_t  u_ph,
  output sdata_t mag_a,
  output logic   ph_done,
  output cplx_t  u_g,
  output logic   g_done
);
  cplx_t g_vec;
  logic  ph_busy, g_busy;
  sdata_t g_mag_unused;

  assign g_vec.re = fb_elem;
  assign g_vec.im = a_mag;

  cordic #(.ITER(ITER)) u_phase (
    .clk, .rst_n, .start(rx_latch), .vin(rx_elem),
    .busy(ph_busy), .done(ph_done), .mag(mag_a), .uvec(u_ph));

  cordic #(.ITER(ITER)) u_compare (
    .clk, .rst_n, .start(fb_latch), .vin(g_vec),
    .busy(g_busy), .done(g_done), .mag(g_mag_unused), .uvec(u_g));

  // a new measurement must not be requested while one is in flight
  assert property (@(posedge clk) disable iff (!rst_n) rx_latch |-> !ph_busy)
    else $error("qr_measure: phase measurement requested while busy");
  assert property (@(posedge clk) disable iff (!rst_n) fb_latch |-> !g_busy)
    else $error("qr_measure: compare requested while busy");
endmodule
