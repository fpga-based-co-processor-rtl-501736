// vpu: vector processing unit of the QR and bidiagonalization processing
// elements.  It evaluates one of three sum-of-products operations on a
// complex element per clock, selected by an op-code:
//   VPU_ROT  x+jy = (a+jb)(cos+jsin)                        phase rotation
//   VPU_OUT  x = cos*a + sin*c,  y = cos*b + sin*d          Givens, output row
//   VPU_FB   x = cos*c - sin*a,  y = cos*d - sin*b          Givens, feedback row
// OUT and FB together form one Givens rotation of the row pair (a+jb, c+jd)
// by the unit vector cos+jsin.  Each output part is a sum of two 35x35-bit
// products formed at full width before the single right shift by the unit
// fraction width (the sum folded into the product, as the DSP-cascade
// structure does).  This version is combinational; the processing stage that
// uses it registers the result into its row buffers, so the VPU contributes
// one clock of latency there.  The deeper DSP-slice pipeline of an FPGA
// implementation is left to synthesis.
module vpu
  import sart_pkg::*;
(
  input  vpu_op_e op,
  input  cplx_t   ab,    // a + jb
  input  cplx_t   cd,    // c + jd
  input  cplx_t   cs,    // cos + j sin (unit vector)
  output cplx_t   xy     // x + jy
);
  always_comb begin
    unique case (op)
      VPU_ROT: xy = cmul_u(ab, cs);
      VPU_OUT: begin
        xy.re = sop_u(cs.re, ab.re, cs.im, cd.re, 1'b0);
        xy.im = sop_u(cs.re, ab.im, cs.im, cd.im, 1'b0);
      end
      VPU_FB: begin
        xy.re = sop_u(cs.re, cd.re, cs.im, ab.re, 1'b1);
        xy.im = sop_u(cs.re, cd.im, cs.im, ab.im, 1'b1);
      end
      default: xy = CPLX_ZERO;
    endcase
  end
endmodule
