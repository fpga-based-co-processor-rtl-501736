// sync_fifo: single-clock first-in first-out buffer with a valid/ready
// handshake on both sides.  Used for the phase-step and phase-reference
// FIFOs of the rephasing stage, the rephased-matrix FIFO, and the receive
// and bypass buffers of the QR processing elements.
//
// Storage is an array (block RAM on an FPGA) of DEPTH words addressed by
// wrapping read and write pointers; the head word is read combinationally
// so that out_data is valid in the same cycle as out_valid.  A word is
// written when in_valid && in_ready and removed when out_valid && out_ready.
// Reset empties the buffer.  The stored words themselves are not reset.
module sync_fifo #(
  parameter int WIDTH = 70,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             push, pop;

  assign in_ready  = (count < DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // a word offered while full must stay offered (no word may be dropped)
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && !in_ready |=> in_valid)
    else $error("sync_fifo: producer withdrew a word while the FIFO was full");
endmodule
