// sart_pkg: types, fixed-point formats and arithmetic shared by the SART
// co-processor datapath.
//
// Every matrix element is a complex number held as two signed DATA_W-bit
// integers (35 bits, the operand width of the DSP-based shifters and
// multipliers).  Unit vectors (the rephasing references, phase steps and the
// CORDIC rotation vectors) use the same 35-bit container with UF = 33
// fractional bits, so +1.0 is 2**33.  A product of a data value and a unit
// vector is shifted right by UF, which keeps data values on their own scale.
// The format choice (35-bit container, 33 fractional bits) is this design's.
package sart_pkg;

  localparam int DATA_W = 35;             // real / imaginary part width
  localparam int UF     = 33;             // fraction bits of a unit vector
  localparam int PROD_W = 2 * DATA_W + 1; // one product plus the sum bit

  typedef logic signed [DATA_W-1:0] sdata_t;

  typedef struct packed {
    sdata_t re;
    sdata_t im;
  } cplx_t;

  // VPU operation codes (equations for rotation, output and feedback)
  typedef enum logic [1:0] {
    VPU_ROT = 2'd0,  // x+jy = (a+jb) * (cos+jsin)              complex product
    VPU_OUT = 2'd1,  // x+jy = cos*(a+jb) + sin*(c+jd)          Givens, output half
    VPU_FB  = 2'd2   // x+jy = cos*(c+jd) - sin*(a+jb)          Givens, feedback half
  } vpu_op_e;

  // Row classification made by the receive stage of a QR processing element
  typedef enum logic [1:0] {
    ROW_SUB   = 2'd0,
    ROW_DIAG  = 2'd1,
    ROW_SUPER = 2'd2
  } row_type_e;

  localparam sdata_t UNIT_ONE = sdata_t'(64'sd1 <<< UF);     // +1.0
  // 1/K, the inverse CORDIC gain, rounded to UF fraction bits
  localparam sdata_t CORDIC_KINV = sdata_t'(64'sd5216262993);

  localparam cplx_t CPLX_ONE  = '{re: UNIT_ONE, im: '0};  // 1 + 0j
  localparam cplx_t CPLX_J    = '{re: '0, im: UNIT_ONE};  // e^{j pi/2}
  localparam cplx_t CPLX_ZERO = '{re: '0, im: '0};

  // (p * q) >>> UF for one data value p and one unit value q
  function automatic sdata_t mul_u(input sdata_t p, input sdata_t q);
    logic signed [PROD_W-1:0] prod;
    prod = PROD_W'(p) * PROD_W'(q);
    return sdata_t'(prod >>> UF);
  endfunction

  // (p*q + r*s) >>> UF, the sum formed before the shift
  function automatic sdata_t sop_u(input sdata_t p, input sdata_t q,
                                   input sdata_t r, input sdata_t s,
                                   input logic subtract);
    logic signed [PROD_W-1:0] a, b, sum;
    a = PROD_W'(p) * PROD_W'(q);
    b = PROD_W'(r) * PROD_W'(s);
    sum = subtract ? a - b : a + b;
    return sdata_t'((sum + (PROD_W'(1) <<< (UF - 1))) >>> UF);   // rounded
  endfunction

  // complex product of a value with a unit vector
  function automatic cplx_t cmul_u(input cplx_t a, input cplx_t u);
    cplx_t r;
    r.re = sop_u(a.re, u.re, a.im, u.im, 1'b1);
    r.im = sop_u(a.im, u.re, a.re, u.im, 1'b0);
    return r;
  endfunction

endpackage
