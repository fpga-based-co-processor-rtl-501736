// rephase: rephasing stage.  For each scan-grid point it multiplies the
// stored signal matrix element by element with that point's phase-reference
// matrix, and decompresses the phase-reference matrix on the fly.
//
// Only one phase-step unit vector e^{j dtheta_c} per column c is stored per
// grid point (in the external SRAM, at word point*COLS + c).  The reference
// of the first processed row is 1+0j in every column, and the reference of
// each following row is the previous one times the column's phase step
// (U_k = U_{k-1} e^{j dtheta}).  Two FIFOs (COLS entries used, one spare so
// that a push and a pop can meet in a full FIFO) hold the phase
// steps and the current references; both recirculate while a matrix is being
// processed: each cycle the heads are popped, the step is pushed back
// unchanged and the reference is pushed back multiplied by the step, while
// signal element times reference goes to the rephased-matrix FIFO.  The two
// input multiplexers select SRAM data / 1+0j while loading and the fed-back
// values while running.
//
// The matrix is visited from the bottom row upwards, columns left to right,
// one element per clock, so an ROWS x COLS matrix takes ROWS*COLS cycles
// after its COLS phase steps have arrived (fewer only if the output FIFO
// fills).  The sign convention of the phase steps (and so of the rephasing)
// is left to the host, which computes them.
//
// Interfaces: host write port into the signal matrix memory (address
// row*COLS + col); start with the number of grid points; an SRAM read port
// (request/address, data returned SRAM_LAT-independent with rvalid); an
// element stream (valid/ready) of rephased rows, bottom row first.
// SRAM words hold {re[31:0], im[31:0]} with 30 fraction bits.
module rephase
  import sart_pkg::*;
#(
  parameter int ROWS       = 128,
  parameter int COLS       = 16,
  parameter int MAX_POINTS = 16384,
  parameter int OUT_DEPTH  = 2 * COLS,
  localparam int SRAM_AW   = $clog2(MAX_POINTS * COLS),
  localparam int MAT_AW    = $clog2(ROWS * COLS),
  localparam int PT_W      = $clog2(MAX_POINTS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // signal matrix memory, written by the host
  input  logic               mat_we,
  input  logic [MAT_AW-1:0]  mat_waddr,
  input  cplx_t              mat_wdata,
  // control
  input  logic               start,
  input  logic [PT_W-1:0]    npoints,
  output logic               busy,
  output logic               sram_busy,   // phase steps are being read
  // phase-step SRAM read port
  output logic               sram_rd,
  output logic [SRAM_AW-1:0] sram_addr,
  input  logic               sram_rvalid,
  input  logic [63:0]        sram_rdata,
  // rephased matrix stream, bottom row first
  output logic               out_valid,
  input  logic               out_ready,
  output cplx_t              out_data
);
  localparam int RW = $clog2(ROWS);
  localparam int CW = $clog2(COLS + 1);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_RUN} state_e;
  state_e state;

  cplx_t mat [ROWS * COLS];

  logic [PT_W-1:0] point, npts;
  logic [CW-1:0]   req_cnt, ld_cnt;
  logic [RW-1:0]   row;
  logic [CW-1:0]   col;

  // FIFOs of Fig. "decompression and application circuit"
  logic  st_in_v, st_in_r, st_out_v, st_out_r;
  logic  rf_in_v, rf_in_r, rf_out_v, rf_out_r;
  logic  of_in_v, of_in_r;
  cplx_t st_in, st_out, rf_in, rf_out, of_in;
  cplx_t step_word;
  logic  step_fire, last_row;

  always_ff @(posedge clk) begin
    if (mat_we) mat[mat_waddr] <= mat_wdata;
  end

  assign step_word.re = sdata_t'($signed(sram_rdata[63:32])) <<< (UF - 30);
  assign step_word.im = sdata_t'($signed(sram_rdata[31:0]))  <<< (UF - 30);

  assign last_row  = (row == '0);
  // one element of the rephased matrix per clock while running
  assign step_fire = (state == S_RUN) && st_out_v && rf_out_v && of_in_r;

  // phase-step FIFO input: SRAM data while loading, recirculated step after
  assign st_in_v  = (state == S_FETCH) ? sram_rvalid : (step_fire && !last_row);
  assign st_in    = (state == S_FETCH) ? step_word   : st_out;
  assign st_out_r = step_fire;
  // phase-reference FIFO input: 1+0j while loading, reference*step after
  assign rf_in_v  = (state == S_FETCH) ? sram_rvalid : (step_fire && !last_row);
  assign rf_in    = (state == S_FETCH) ? CPLX_ONE    : cmul_u(rf_out, st_out);
  assign rf_out_r = step_fire;
  // rephased element
  assign of_in_v  = step_fire;
  assign of_in    = cmul_u(mat[MAT_AW'(row) * MAT_AW'(COLS) + MAT_AW'(col)], rf_out);

  sync_fifo #(.WIDTH($bits(cplx_t)), .DEPTH(COLS + 1)) u_step_fifo (
    .clk, .rst_n, .in_valid(st_in_v), .in_ready(st_in_r), .in_data(st_in),
    .out_valid(st_out_v), .out_ready(st_out_r), .out_data(st_out), .count());

  sync_fifo #(.WIDTH($bits(cplx_t)), .DEPTH(COLS + 1)) u_pref_fifo (
    .clk, .rst_n, .in_valid(rf_in_v), .in_ready(rf_in_r), .in_data(rf_in),
    .out_valid(rf_out_v), .out_ready(rf_out_r), .out_data(rf_out), .count());

  sync_fifo #(.WIDTH($bits(cplx_t)), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n, .in_valid(of_in_v), .in_ready(of_in_r), .in_data(of_in),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data), .count());

  assign busy      = (state != S_IDLE) || out_valid;
  assign sram_busy = (state == S_FETCH);
  assign sram_rd   = (state == S_FETCH) && (req_cnt != CW'(COLS));
  assign sram_addr = SRAM_AW'(point) * SRAM_AW'(COLS) + SRAM_AW'(req_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; point <= '0; npts <= '0;
      req_cnt <= '0; ld_cnt <= '0; row <= '0; col <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start && npoints != '0) begin
          npts    <= npoints;
          point   <= '0;
          req_cnt <= '0;
          ld_cnt  <= '0;
          state   <= S_FETCH;
        end
        S_FETCH: begin
          if (sram_rd) req_cnt <= req_cnt + 1'b1;
          if (sram_rvalid) begin
            ld_cnt <= ld_cnt + 1'b1;
            if (ld_cnt == CW'(COLS - 1)) begin
              state <= S_RUN;
              row   <= RW'(ROWS - 1);
              col   <= '0;
            end
          end
        end
        S_RUN: if (step_fire) begin
          if (col == CW'(COLS - 1)) begin
            col <= '0;
            if (last_row) begin
              if (point + 1'b1 == npts) state <= S_IDLE;
              else begin
                point   <= point + 1'b1;
                req_cnt <= '0;
                ld_cnt  <= '0;
                state   <= S_FETCH;
              end
            end else row <= row - 1'b1;
          end else col <= col + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
