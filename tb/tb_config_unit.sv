// tb_config_unit: checks the reset configuration, writes every configuration
// word and checks the stored fields and the decoded expert count.
module tb_config_unit;
  import monet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic cfg_we = 0;
  cfg_t cfg_in = '0, cfg;
  logic [4:0] n_experts;
  int checks = 0, failures = 0;
  config_unit dut (.*);
  initial begin
    cfg_t c;
    repeat (2) @(negedge clk); rst_n = 1;
    checks += 2;
    if (cfg !== cfg_t'({1'b0, 1'b0, EXP_2, 1'b0, 1'b1})) failures++;
    if (n_experts != 2) failures++;
    for (int w = 0; w < 64; w++) begin
      @(negedge clk); cfg_we = 1; cfg_in = cfg_t'(w);
      @(negedge clk); cfg_we = 0; cfg_in = '0;
      @(negedge clk);
      checks += 2;
      if (cfg !== cfg_t'(w)) begin failures++; $display("cfg %0d", w); end
      c = cfg_t'(w);
      if (n_experts != 5'(2 << c.exp_par)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
