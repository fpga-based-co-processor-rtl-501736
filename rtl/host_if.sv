// host_if: host interface of the co-processor.  The PCI bridge in front of
// it turns host PCI accesses into local-bus transactions; this block is the
// state machine and output logic that turns those into a plain address/data
// bus with read and write strobes and an acknowledge, and maps the
// co-processor's memories and control into the host's address space.
//
// Local-bus transaction: the host raises lb_wr or lb_rd with lb_addr (and
// lb_wdata) and holds them until lb_ack; lb_ack is a one-clock pulse, and for
// a read lb_rdata is valid with it.  A new transaction is accepted only after
// the strobe has been released.  A write into the phase-step SRAM is held
// back (no ack) while the rephasing stage is reading phase steps from it.
//
// Address map (word addresses, region = lb_addr[23:20]):
//   region 0, registers:  0 CONTROL  write bit0 = start a run;
//                                    read bit0 = run busy
//                         1 NPOINTS  grid points of the run (read/write)
//                         2 RESULTS  write: release mask (bit b frees
//                                    bidiagonalization module b);
//                                    read: mask of modules holding results
//                         4+b        read: grid point whose results module b
//                                    holds
//   region 1, signal matrix: offset row*COLS+col, data {re[31:0], im[31:0]}
//   region 2, phase-step SRAM: offset point*COLS+col, data as stored
//   region 3, results: offset[19:16] = module, offset[15:1] = entry
//             (2i = d_i, 2i+1 = e_i), offset[0] = 0 real / 1 imaginary part,
//             sign-extended to 64 bits
// The map, the 64-bit data bus and the handshake are this design's choices.
module host_if
  import sart_pkg::*;
#(
  parameter int ROWS       = 128,
  parameter int COLS       = 16,
  parameter int NBD        = 4,
  parameter int MAX_POINTS = 16384,
  localparam int SRAM_AW   = $clog2(MAX_POINTS * COLS),
  localparam int MAT_AW    = $clog2(ROWS * COLS),
  localparam int PT_W      = $clog2(MAX_POINTS + 1),
  localparam int XW        = $clog2(2 * COLS),
  localparam int BDW       = (NBD > 1) ? $clog2(NBD) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // local bus from the PCI bridge
  input  logic [23:0]        lb_addr,
  input  logic               lb_wr,
  input  logic               lb_rd,
  input  logic [63:0]        lb_wdata,
  output logic [63:0]        lb_rdata,
  output logic               lb_ack,
  // control
  output logic               start,
  output logic [PT_W-1:0]    npoints,
  input  logic               run_busy,
  // signal matrix memory
  output logic               mat_we,
  output logic [MAT_AW-1:0]  mat_waddr,
  output cplx_t              mat_wdata,
  // phase-step SRAM write
  output logic               sram_we,
  output logic [SRAM_AW-1:0] sram_waddr,
  output logic [63:0]        sram_wdata,
  input  logic               sram_busy,
  // bidiagonalization results
  output logic [BDW-1:0]     res_mod,
  output logic [XW-1:0]      res_idx,
  input  cplx_t              res_data,
  input  logic [NBD-1:0]     res_valid,
  input  logic [PT_W-1:0]    res_tag [NBD],
  output logic [NBD-1:0]     res_release
);
  typedef enum logic [1:0] {H_IDLE, H_ACK, H_WAIT} hstate_e;
  hstate_e state;

  logic [3:0]  region;
  logic [19:0] off;
  logic        req, can_do;
  logic [63:0] rd_mux;

  assign region = lb_addr[23:20];
  assign off    = lb_addr[19:0];
  assign req    = (lb_wr || lb_rd) && (state == H_IDLE);
  // SRAM writes wait while the rephasing stage reads the SRAM
  assign can_do = !(lb_wr && region == 4'd2 && sram_busy);

  assign res_mod = BDW'(off[19:16]);
  assign res_idx = XW'(off[15:1]);

  always_comb begin
    rd_mux = '0;
    unique case (region)
      4'd0: begin
        if (off == 20'd0)      rd_mux = 64'(run_busy);
        else if (off == 20'd1) rd_mux = 64'(npoints);
        else if (off == 20'd2) rd_mux = 64'(res_valid);
        else if (off >= 20'd4 && off < 20'(4 + NBD)) rd_mux = 64'(res_tag[BDW'(off - 20'd4)]);
      end
      4'd3: rd_mux = off[0] ? 64'(signed'(res_data.im)) : 64'(signed'(res_data.re));
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= H_IDLE; lb_ack <= 1'b0; lb_rdata <= '0; npoints <= '0;
      start <= 1'b0; mat_we <= 1'b0; sram_we <= 1'b0; res_release <= '0;
      mat_waddr <= '0; mat_wdata <= CPLX_ZERO; sram_waddr <= '0; sram_wdata <= '0;
    end else begin
      lb_ack <= 1'b0; start <= 1'b0; mat_we <= 1'b0; sram_we <= 1'b0;
      res_release <= '0;
      unique case (state)
        H_IDLE: if (req && can_do) begin
          state  <= H_ACK;
          lb_ack <= 1'b1;
          if (lb_rd) lb_rdata <= rd_mux;
          else begin
            unique case (region)
              4'd0: begin
                if (off == 20'd0)      start <= lb_wdata[0];
                else if (off == 20'd1) npoints <= PT_W'(lb_wdata);
                else if (off == 20'd2) res_release <= NBD'(lb_wdata);
              end
              4'd1: begin
                mat_we       <= 1'b1;
                mat_waddr    <= MAT_AW'(off);
                mat_wdata.re <= sdata_t'($signed(lb_wdata[63:32]));
                mat_wdata.im <= sdata_t'($signed(lb_wdata[31:0]));
              end
              4'd2: begin
                sram_we    <= 1'b1;
                sram_waddr <= SRAM_AW'(off);
                sram_wdata <= lb_wdata;
              end
              default: ;
            endcase
          end
        end
        H_ACK:  state <= H_WAIT;
        H_WAIT: if (!lb_wr && !lb_rd) state <= H_IDLE;
        default: state <= H_IDLE;
      endcase
    end
  end
endmodule
