// tb_pe: checks one processing element: weight load, multiply-accumulate,
// activation forwarding, and zero skipping in sparse mode (same sum, skip flag).
module tb_pe;
  import monet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic w_load = 0, sparse = 0, x_valid_in = 0, x_valid_out, skip;
  data_t w_in = '0, x_in = '0, x_out;
  logic signed [ACC_W-1:0] psum_in = '0, psum_out;
  int checks = 0, failures = 0;

  pe dut (.*);

  task automatic step(input data_t x, input longint ps, input bit sp, input data_t w);
    longint exp_ps;
    @(negedge clk); x_in = x; psum_in = ACC_W'(ps); sparse = sp; x_valid_in = 1;
    @(negedge clk); x_valid_in = 0;
    exp_ps = ps + longint'(x) * longint'(w);
    checks += 3;
    if (psum_out !== ACC_W'(exp_ps)) begin failures++; $display("psum %0d exp %0d", psum_out, exp_ps); end
    if (x_out !== x) failures++;
    if (skip !== (sp && (x == 0 || w == 0))) begin failures++; $display("skip flag wrong"); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); w_load = 1; w_in = 16'sd300;
    @(negedge clk); w_load = 0; w_in = 16'sd7;
    for (int i = 0; i < 40; i++) step(data_t'($urandom_range(0, 2000) - 1000), longint'($urandom_range(0, 100000)) - 50000, i[0], 16'sd300);
    step(16'sd0, 1234, 1, 16'sd300);
    step(16'sd0, 1234, 0, 16'sd300);
    @(negedge clk); w_load = 1; w_in = 16'sd0;
    @(negedge clk); w_load = 0;
    step(16'sd55, -77, 1, 16'sd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
