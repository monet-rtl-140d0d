// tb_activation_unit: drives random and edge-case vectors in all three modes and
// compares with reference formulas for ReLU and x*clamp(x+3,0,6)/6 in Q8.8,
// checking the one-cycle latency.
module tb_activation_unit;
  import monet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic bypass = 0, gelu = 0, in_valid = 0, out_valid;
  vec_t in_vec = '0, out_vec;
  logic [7:0] in_tag = '0, out_tag;
  int checks = 0, failures = 0;
  activation_unit dut (.*);

  function automatic data_t ref_f(input data_t x, input bit byp, input bit g);
    longint t, p;
    if (byp) return x;
    if (!g) return (x < 0) ? 16'sd0 : x;
    t = longint'(x) + 768;
    if (t < 0) t = 0;
    if (t > 1536) t = 1536;
    p = (longint'(x) * t * 43) >>> 16;
    if (p > 32767) p = 32767;
    if (p < -32768) p = -32768;
    return data_t'(p);
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      bypass = (i % 3) == 0; gelu = (i % 3) == 2; in_valid = 1; in_tag = 8'(i);
      for (int l = 0; l < LANES; l++)
        in_vec[l] = (i < 4) ? data_t'(l * 8192 - 32768) : data_t'(int'($urandom % 4096) - 2048);
      @(posedge clk); #1;
      checks += 2;
      if (!out_valid || out_tag != 8'(i)) failures++;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (out_vec[l] !== ref_f(in_vec[l], bypass, gelu)) begin
          failures++; $display("mode b%0d g%0d x=%0d got %0d exp %0d", bypass, gelu, in_vec[l], out_vec[l], ref_f(in_vec[l], bypass, gelu));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
