// tb_softmax_topk: random logit sets (with ties) for k = 1..4; checks the
// selected experts (descending, lower index on ties), the weights against a
// reference of the base-2 softmax approximation, that weights sum to about 1.0,
// and the 2k+1-cycle latency.
module tb_softmax_topk;
  import monet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic start = 0, busy, done;
  logic [2:0] k = 3'd1;
  data_t [15:0] logits = '0;
  logic [3:0][3:0] sel_idx;
  logic [3:0][16:0] sel_w;
  int checks = 0, failures = 0;
  softmax_topk dut (.*);

  function automatic longint e2(input data_t l, input data_t m);
    longint d = longint'(l) - longint'(m);
    longint z = (d * 369) >>> 8;
    longint q = z >>> 8;
    longint f = z - (q << 8);
    if (q < -16) return 0;
    return ((256 + f) << 8) >>> (-q);
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      int kk, sel [4], cyc;
      bit taken [16];
      longint e [4], sum, wsum;
      kk = 1 + it % 4;
      for (int i = 0; i < 16; i++) begin
        logits[i] = data_t'(int'($urandom % 2048) - 1024);
        if (it % 5 == 0 && i > 0 && ($urandom % 3) == 0) logits[i] = logits[i-1];
        taken[i] = 0;
      end
      for (int j = 0; j < kk; j++) begin
        int b;
        b = -1;
        for (int i = 0; i < 16; i++) if (!taken[i] && (b < 0 || logits[i] > logits[b])) b = i;
        sel[j] = b; taken[b] = 1;
      end
      sum = 0;
      for (int j = 0; j < kk; j++) begin e[j] = e2(logits[sel[j]], logits[sel[0]]); sum += e[j]; end
      @(negedge clk); start = 1; k = 3'(kk);
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 2 * kk + 1) begin failures++; $display("latency %0d for k=%0d", cyc, kk); end
      wsum = 0;
      for (int j = 0; j < kk; j++) begin
        longint w;
        w = (e[j] << 16) / sum;
        checks += 2;
        if (sel_idx[j] != 4'(sel[j])) begin failures++; $display("it %0d sel[%0d]=%0d exp %0d", it, j, sel_idx[j], sel[j]); end
        if (sel_w[j] != 17'(w)) begin failures++; $display("it %0d w[%0d]=%0d exp %0d", it, j, sel_w[j], w); end
        wsum += sel_w[j];
      end
      checks++;
      if (wsum > 65536 || wsum < 65536 - kk) begin failures++; $display("weights sum %0d", wsum); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
