// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, the full and empty flags and the occupancy count.
module tb_sync_fifo;
  localparam int W = 12, D = 5;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  bit last_push = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit push, pop;
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // a word not yet accepted stays offered
      if (!in_valid || last_push) begin
        in_valid = ($urandom_range(0, 99) < 60);
        in_data  = W'($urandom);
      end
      out_ready = ($urandom_range(0, 99) < (n < 1500 ? 40 : 70));
      #1;
      checks++;
      if (count != model.size() || in_ready != (model.size() < D) || out_valid != (model.size() > 0)) begin
        failures++;
        $display("flag mismatch count=%0d model=%0d", count, model.size());
      end
      if (out_valid) begin
        checks++;
        if (out_data != model[0]) begin
          failures++;
          $display("data mismatch %h vs %h", out_data, model[0]);
        end
      end
      push = in_valid && in_ready;
      pop  = out_valid && out_ready;
      last_push = push;
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
