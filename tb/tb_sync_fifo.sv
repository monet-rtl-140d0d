// tb_sync_fifo: random pushes and pops against a queue model; checks order,
// data, full/empty flags and the occupancy count.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [7:0] in_data = '0, out_data;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [7:0] q [$];
  sync_fifo #(.T(logic [7:0]), .DEPTH(4)) dut (.*);

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0; in_data = 8'($urandom); out_ready = ($urandom % 2) == 0;
      #1;
      checks += 3;
      if (count != 3'(q.size())) begin failures++; $display("count %0d exp %0d", count, q.size()); end
      if (in_ready != (q.size() < 4)) failures++;
      if (out_valid != (q.size() > 0)) failures++;
      if (out_valid) begin checks++; if (out_data !== q[0]) begin failures++; $display("data"); end end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
