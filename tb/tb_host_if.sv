// tb_host_if: drives local-bus writes and reads into the host interface and
// checks what comes out on each internal port: start pulse, NPOINTS
// register, signal-matrix write (sign-extended parts), SRAM write and its
// hold-off while the SRAM is being read, release pulses, the result mask and
// grid-point registers, and result reads (module and entry selection, real
// and imaginary part).  Also checks the one-clock acknowledge.
module tb_host_if;
  import sart_pkg::*;
  localparam int ROWS = 8, COLS = 4, NBD = 4, MAXP = 16;
  localparam int SAW = $clog2(MAXP * COLS), MAW = $clog2(ROWS * COLS), PW = $clog2(MAXP + 1);
  localparam int XW = $clog2(2 * COLS);
  logic clk = 0, rst_n = 0;
  logic [23:0] lb_addr;
  logic lb_wr, lb_rd, lb_ack;
  logic [63:0] lb_wdata, lb_rdata;
  logic start, run_busy, mat_we, sram_we, sram_busy;
  logic [PW-1:0] npoints;
  logic [MAW-1:0] mat_waddr;
  cplx_t mat_wdata, res_data;
  logic [SAW-1:0] sram_waddr;
  logic [63:0] sram_wdata;
  logic [1:0] res_mod;
  logic [XW-1:0] res_idx;
  logic [NBD-1:0] res_valid, res_release;
  logic [PW-1:0] res_tag [NBD];
  int checks = 0, failures = 0;
  int n_start = 0, n_mat = 0, n_sram = 0, n_rel = 0, n_ack = 0;
  logic [NBD-1:0] rel_seen;

  host_if #(.ROWS(ROWS), .COLS(COLS), .NBD(NBD), .MAX_POINTS(MAXP)) dut (.*);
  always #5 clk = ~clk;

  // result memory seen through the result port: value depends on module/entry
  always_comb begin
    res_data.re = sdata_t'(-(int'(res_mod) * 100 + int'(res_idx)));
    res_data.im = sdata_t'(int'(res_mod) * 1000 + int'(res_idx));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic lb_write(input logic [23:0] a, input logic [63:0] d);
    @(negedge clk); lb_addr = a; lb_wdata = d; lb_wr = 1;
    do @(posedge clk); while (!lb_ack);
    @(negedge clk); lb_wr = 0;
  endtask
  task automatic lb_read(input logic [23:0] a, output logic [63:0] d);
    @(negedge clk); lb_addr = a; lb_rd = 1;
    do @(posedge clk); while (!lb_ack);
    d = lb_rdata;
    @(negedge clk); lb_rd = 0;
  endtask

  logic [MAW-1:0] last_maddr; cplx_t last_mdata;
  logic [SAW-1:0] last_saddr; logic [63:0] last_sdata;
  always @(posedge clk) if (rst_n) begin
    if (start) n_start++;
    if (mat_we) begin n_mat++; last_maddr = mat_waddr; last_mdata = mat_wdata; end
    if (sram_we) begin
      n_sram++; last_saddr = sram_waddr; last_sdata = sram_wdata;
      if (sram_busy) begin failures++; $display("FAIL SRAM write while busy"); end
    end
    if (res_release != '0) begin n_rel++; rel_seen = res_release; end
    if (lb_ack) n_ack++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    int a0;
    lb_addr = '0; lb_wr = 0; lb_rd = 0; lb_wdata = '0; run_busy = 0; sram_busy = 0;
    res_valid = 4'b1010;
    for (int b = 0; b < NBD; b++) res_tag[b] = PW'(b * 3 + 1);
    repeat (3) @(posedge clk); rst_n = 1;
    lb_write(24'h000001, 64'd9);
    lb_read(24'h000001, d);                check(d == 64'd9 && npoints == PW'(9), "NPOINTS");
    lb_write(24'h000000, 64'd1);           check(n_start == 1, "start pulse");
    run_busy = 1;
    lb_read(24'h000000, d);                check(d == 64'd1, "busy status");
    lb_write(24'h100007, {32'hFFFF_FFFE, 32'd12345});
    check(n_mat == 1 && last_maddr == MAW'(7) && last_mdata.re == -35'sd2 && last_mdata.im == 35'sd12345, "matrix write");
    // SRAM write held while the SRAM is being read
    sram_busy = 1;
    fork
      lb_write(24'h200021, 64'hDEAD_BEEF_0123_4567);
      begin repeat (10) @(posedge clk); check(n_sram == 0, "SRAM write held"); sram_busy = 0; end
    join
    check(n_sram == 1 && last_saddr == SAW'(33) && last_sdata == 64'hDEAD_BEEF_0123_4567, "SRAM write");
    lb_read(24'h000002, d);                check(d == 64'b1010, "result mask");
    for (int b = 0; b < NBD; b++) begin
      lb_read(24'(4 + b), d);              check(d == 64'(b * 3 + 1), "grid point register");
    end
    for (int b = 0; b < NBD; b++)
      for (int x = 0; x < 2 * COLS - 1; x++) begin
        a0 = (3 << 20) | (b << 16) | (x << 1);
        lb_read(24'(a0), d);               check($signed(d) == -(b * 100 + x), "result real part");
        lb_read(24'(a0 + 1), d);           check($signed(d) == b * 1000 + x, "result imaginary part");
      end
    lb_write(24'h000002, 64'b0100);        check(n_rel == 1 && rel_seen == 4'b0100, "release pulse");
    check(n_ack == 5 + 3 + NBD + 2 * NBD * (2 * COLS - 1), $sformatf("one ack per transaction (%0d)", n_ack));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
