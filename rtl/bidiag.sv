// bidiag: one bidiagonalization module.  It takes the upper-triangular
// factor R produced by the QR array (ROWS rows of COLS elements, bottom row
// first; only rows 0..COLS-1 are kept, the rows below are zero) into a local
// main memory and reduces it, by sequences of unitary row and column
// rotations, to an upper-bidiagonal matrix with the same singular values.
// The diagonal d_i and super-diagonal e_i are then written to a result
// buffer that the host reads; the final diagonalization is the host's task.
//
// Order of annihilation (this design's choice): for each row k = 0..COLS-3
// and j = COLS-1 down to k+2,
//   a column rotation of columns (j-1, j) moves the energy of R[k][j] into
//   R[k][j-1]; it creates a fill-in at R[j][j-1], which
//   a row rotation of rows (j-1, j) moves into R[j-1][j-1].
// Every rotation is done like a step of the QR element, with the same
// measure stage (two CORDIC units) and VPU: the pivot vector p (which keeps
// the energy) is rephased so its element e is real, into the feedback
// buffer; the target vector t is rephased likewise, into the rotate buffer;
// the Givens vector is measured from the two real elements; the feedback half
// of the rotation is written back to p in main memory and the output half,
// whose element e is zero, to t.  Each step walks COLS elements one per clock
// and the vectors are rows or columns of main memory.
//
// Interfaces: element stream in (valid/ready; ready only while the module is
// free); res_valid while results are held, res_data = result buffer entry
// res_idx (entry 2i = d_i, entry 2i+1 = e_i, 2*COLS-1 entries); a release
// pulse frees the module for the next matrix.  About
// (COLS-1)(COLS-2) * (3*(ITER+2) + 4*COLS) clocks per matrix.
module bidiag
  import sart_pkg::*;
#(
  parameter int ROWS = 128,
  parameter int COLS = 16,
  parameter int ITER = 32,
  localparam int NRES = 2 * COLS - 1,
  localparam int XW   = $clog2(NRES + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  cplx_t         in_data,
  output logic          res_valid,
  input  logic [XW-1:0] res_idx,
  output cplx_t         res_data,
  input  logic          release_i,
  output logic          busy
);
  localparam int RW = $clog2(ROWS + 1);
  localparam int CW = $clog2(COLS + 1);

  typedef enum logic [3:0] {
    B_LOAD, B_NEXT, B_MP, B_ROTP, B_MT, B_ROTT, B_MG, B_FB, B_OUT, B_RES, B_HOLD
  } bstate_e;

  bstate_e state;
  cplx_t mem [COLS][COLS];
  cplx_t fbuf [COLS];          // feedback buffer (rephased pivot)
  cplx_t rbuf [COLS];          // rotate buffer (rephased target)
  cplx_t resb [NRES];

  logic [RW-1:0] ld_row;
  logic [CW-1:0] ld_col;
  logic [CW-1:0] k, j, i;
  logic          col_op;       // 1: column rotation, 0: row rotation
  logic [CW-1:0] p_idx, t_idx, e_idx;
  logic          started;      // measurement of the current state started

  // selected vector elements
  function automatic cplx_t vec_rd(input logic colmode, input logic [CW-1:0] v,
                                   input logic [CW-1:0] n);
    return colmode ? mem[n][v] : mem[v][n];
  endfunction

  assign p_idx = j - 1'b1;
  assign t_idx = j;
  assign e_idx = col_op ? k : j - 1'b1;

  // measure stage and VPU shared by all rotations
  logic   ph_latch, fb_latch, ph_done, g_done;
  cplx_t  ph_elem, u_ph, u_g;
  sdata_t mag_a;

  assign ph_elem = vec_rd(col_op, (state == B_MP) ? p_idx : t_idx, e_idx);
  assign ph_latch = (state == B_MP || state == B_MT) && !started;
  assign fb_latch = (state == B_MG) && !started;

  qr_measure #(.ITER(ITER)) u_measure (
    .clk, .rst_n,
    .rx_latch(ph_latch), .rx_elem(ph_elem),
    .fb_latch, .fb_elem(fbuf[e_idx].re), .a_mag(mag_a),
    .u_ph, .mag_a, .ph_done, .u_g, .g_done);

  cplx_t   uph_reg, ug_reg;
  vpu_op_e vop;
  cplx_t   vab, vcd, vcs, vxy;

  vpu u_vpu (.op(vop), .ab(vab), .cd(vcd), .cs(vcs), .xy(vxy));

  always_comb begin
    vab = rbuf[i];
    vcd = fbuf[i];
    vcs = ug_reg;
    vop = VPU_OUT;
    unique case (state)
      B_ROTP: begin vop = VPU_ROT; vab = vec_rd(col_op, p_idx, i); vcs = uph_reg; end
      B_ROTT: begin vop = VPU_ROT; vab = vec_rd(col_op, t_idx, i); vcs = uph_reg; end
      B_FB:   vop = VPU_FB;
      default: ;
    endcase
  end

  assign in_ready  = (state == B_LOAD);
  assign res_valid = (state == B_HOLD);
  assign res_data  = resb[res_idx];
  assign busy      = (state != B_LOAD);

  logic last_i;
  assign last_i = (i == CW'(COLS - 1));

  always_ff @(posedge clk) begin
    unique case (state)
      B_LOAD: if (in_valid && ld_row < RW'(COLS))
        mem[ld_row[CW-1:0]][ld_col] <= in_data;
      B_ROTP: fbuf[i] <= vxy;
      B_ROTT: rbuf[i] <= vxy;
      B_FB:   if (col_op) mem[i][p_idx] <= vxy; else mem[p_idx][i] <= vxy;
      B_OUT:  if (col_op) mem[i][t_idx] <= vxy; else mem[t_idx][i] <= vxy;
      B_RES:  for (int n = 0; n < COLS; n++) begin
        resb[2*n] <= mem[n][n];
        if (n < COLS - 1) resb[2*n+1] <= mem[n][n+1];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= B_LOAD; ld_row <= RW'(ROWS - 1); ld_col <= '0;
      k <= '0; j <= '0; i <= '0; col_op <= 1'b1; started <= 1'b0;
      uph_reg <= CPLX_ZERO; ug_reg <= CPLX_ZERO;
    end else begin
      unique case (state)
        B_LOAD: if (in_valid) begin
          if (ld_col == CW'(COLS - 1)) begin
            ld_col <= '0;
            if (ld_row == '0) begin
              ld_row <= RW'(ROWS - 1);
              k      <= '0;
              j      <= CW'(COLS - 1);
              col_op <= 1'b1;
              state  <= (COLS >= 3) ? B_MP : B_RES;
            end else ld_row <= ld_row - 1'b1;
          end else ld_col <= ld_col + 1'b1;
        end
        // advance to the next rotation of the sequence
        B_NEXT: begin
          if (col_op) begin
            col_op <= 1'b0;                   // its row rotation follows
            state  <= B_MP;
          end else if (j != k + CW'(2)) begin
            col_op <= 1'b1;
            j      <= j - 1'b1;
            state  <= B_MP;
          end else if (k != CW'(COLS - 3)) begin
            col_op <= 1'b1;
            k      <= k + 1'b1;
            j      <= CW'(COLS - 1);
            state  <= B_MP;
          end else state <= B_RES;
        end
        B_MP, B_MT, B_MG: begin
          started <= 1'b1;
          if ((state != B_MG && ph_done) || (state == B_MG && g_done)) begin
            started <= 1'b0;
            i       <= '0;
            if (state == B_MG) ug_reg <= u_g; else uph_reg <= u_ph;
            state   <= (state == B_MP) ? B_ROTP : (state == B_MT) ? B_ROTT : B_FB;
          end
        end
        B_ROTP, B_ROTT, B_FB, B_OUT: begin
          i <= last_i ? '0 : i + 1'b1;
          if (last_i) begin
            unique case (state)
              B_ROTP:  state <= B_MT;
              B_ROTT:  state <= B_MG;
              B_FB:    state <= B_OUT;
              default: state <= B_NEXT;
            endcase
          end
        end
        B_RES:  state <= B_HOLD;
        B_HOLD: if (release_i) state <= B_LOAD;
        default: state <= B_LOAD;
      endcase
    end
  end
endmodule
