// tb_aggregator: opens tokens with k = 1..4, feeds their weighted expert results
// interleaved across tokens, and compares each finished sum with a reference.
module tb_aggregator;
  import monet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic start = 0, in_valid = 0, out_valid;
  logic [7:0] start_tag = '0, in_tag = '0, out_tag;
  logic [2:0] start_k = '0;
  logic [16:0] in_w = '0;
  vec_t in_vec = '0, out_vec;
  int checks = 0, failures = 0, outs = 0;
  longint acc [16][8];
  int kt [16];
  aggregator dut (.*);

  always @(negedge clk) if (out_valid) begin
    outs++;
    for (int l = 0; l < 8; l++) begin
      longint r;
      r = acc[out_tag][l] >>> 16;
      if (r > 32767) r = 32767;
      if (r < -32768) r = -32768;
      checks++;
      if (out_vec[l] !== data_t'(r)) begin failures++; $display("tag %0d lane %0d got %0d exp %0d", out_tag, l, out_vec[l], r); end
    end
  end

  initial begin
    int left [16];
    int total;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 5; round++) begin
      total = 0;
      for (int t = 0; t < 16; t++) begin
        @(negedge clk); start = 1; start_tag = 8'(t); kt[t] = 1 + (t + round) % 4; start_k = 3'(kt[t]);
        left[t] = kt[t]; total += kt[t];
        for (int l = 0; l < 8; l++) acc[t][l] = 0;
      end
      @(negedge clk); start = 0;
      while (total > 0) begin
        int t;
        t = $urandom % 16;
        if (left[t] > 0) begin
          @(negedge clk); in_valid = 1; in_tag = 8'(t); in_w = 17'($urandom % 65537);
          for (int l = 0; l < 8; l++) begin
            in_vec[l] = data_t'($urandom);
            acc[t][l] += longint'(in_vec[l]) * longint'(in_w);
          end
          left[t]--; total--;
          @(negedge clk); in_valid = 0;
        end
      end
      repeat (3) @(negedge clk);
    end
    checks++; if (outs != 80) begin failures++; $display("outputs %0d", outs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
