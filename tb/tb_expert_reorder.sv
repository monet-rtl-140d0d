// tb_expert_reorder: random token-to-expert assignments and batch sizes; checks
// that the order is a permutation grouped by expert in ascending order, stable
// inside each group, and the latency: done is seen 2n+4 cycles after the start cycle.
module tb_expert_reorder;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic start = 0, done;
  logic [4:0] n_tok = '0;
  logic [15:0][3:0] exp_id = '0, order;
  int checks = 0, failures = 0;
  expert_reorder dut (.*);
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 100; it++) begin
      int n, cyc, pos;
      n = 1 + $urandom % 16;
      for (int t = 0; t < 16; t++) exp_id[t] = 4'($urandom % ((it % 2) ? 4 : 16));
      @(negedge clk); start = 1; n_tok = 5'(n);
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 2 * n + 4) begin failures++; $display("latency %0d n=%0d", cyc, n); end
      pos = 0;
      for (int e = 0; e < 16; e++)
        for (int t = 0; t < n; t++)
          if (exp_id[t] == 4'(e)) begin
            checks++;
            if (order[pos] != 4'(t)) begin failures++; $display("it %0d pos %0d got %0d exp %0d", it, pos, order[pos], t); end
            pos++;
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
