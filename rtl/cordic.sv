// cordic: vectoring CORDIC that turns a complex value v = |v| e^{j phi} into
// its magnitude |v| and the unit vector e^{-j phi}.
//
// The input vector is rotated towards zero phase by a sequence of shift-add
// micro-rotations; the direction of each is taken from the sign of the
// current imaginary part.  A constant vector of length 1/K (K the CORDIC
// gain), starting at zero phase, is rotated in the same direction by the same
// amount at the same time, so it ends as a unit vector whose angle is equal
// and opposite to that of the input.  A coarse rotation by 180 degrees
// (negating both components of both vectors) first brings inputs with a
// negative real part into the right half plane.  The magnitude leaves the
// micro-rotations multiplied by K and is corrected by one multiplication by
// 1/K.
//
// Timing: start is accepted when busy is low; done pulses for one cycle
// ITER + 2 cycles later, with mag and uvec held until the next start.  The
// datapath works at DATA_W + 3 bits plus 6 guard fraction bits, so that the
// gain and a 45-degree input cannot overflow and rounding stays small.  One micro-rotation per clock is this design's choice;
// the four-slot interleaved DSP shifter pipeline of the FPGA implementation
// is not reproduced.
module cordic
  import sart_pkg::*;
#(
  parameter int ITER = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  cplx_t vin,
  output logic  busy,
  output logic  done,
  output sdata_t mag,     // |vin|
  output cplx_t uvec      // e^{-j angle(vin)}, UF fraction bits
);
  localparam int GB = 6;               // guard fraction bits
  localparam int IW = DATA_W + 3 + GB;
  typedef logic signed [IW-1:0] iw_t;

  iw_t x, y, cx, cy;
  logic [$clog2(ITER+1)-1:0] it;
  logic run, fin;

  assign busy = run || fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; cx <= '0; cy <= '0;
      it <= '0; run <= 1'b0; fin <= 1'b0; done <= 1'b0;
      mag <= '0; uvec <= CPLX_ZERO;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        // coarse rotation by 180 degrees for the left half plane
        if (vin.re < 0) begin
          x  <= -(IW'(vin.re) <<< GB);
          y  <= -(IW'(vin.im) <<< GB);
          cx <= -IW'(CORDIC_KINV);
        end else begin
          x  <= IW'(vin.re) <<< GB;
          y  <= IW'(vin.im) <<< GB;
          cx <= IW'(CORDIC_KINV);
        end
        cy  <= '0;
        it  <= '0;
        run <= 1'b1;
      end else if (run) begin
        if (y >= 0) begin
          x  <= x + (y >>> it);
          y  <= y - (x >>> it);
          cx <= cx + (cy >>> it);
          cy <= cy - (cx >>> it);
        end else begin
          x  <= x - (y >>> it);
          y  <= y + (x >>> it);
          cx <= cx - (cy >>> it);
          cy <= cy + (cx >>> it);
        end
        if (it == ($clog2(ITER+1))'(ITER - 1)) begin
          run <= 1'b0;
          fin <= 1'b1;
        end
        it <= it + 1'b1;
      end else if (fin) begin
        fin     <= 1'b0;
        done    <= 1'b1;
        mag     <= sdata_t'(((2*IW)'(x) * (2*IW)'(CORDIC_KINV)) >>> (UF + GB));
        uvec.re <= sdata_t'(cx);
        uvec.im <= sdata_t'(cy);
      end
    end
  end
endmodule
