// tb_global_buffer: random writes and reads on both ports against a model,
// checking the one-cycle read latency on each port.
module tb_global_buffer;
  import monet_pkg::*;
  logic clk = 0;
  always #5 clk = !clk;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [7:0] a_addr = '0, b_addr = '0;
  vec_t a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  vec_t model [256];
  bit   known [256];
  global_buffer dut (.*);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic ra, rb; logic [7:0] aa, ab;
      @(negedge clk);
      a_en = 1; b_en = 1;
      a_we = $urandom % 2; b_we = $urandom % 2;
      a_addr = 8'($urandom % 32); b_addr = 8'(32 + $urandom % 32);
      a_wdata = {4{32'($urandom)}}; b_wdata = {4{32'($urandom)}};
      ra = !a_we && known[a_addr]; rb = !b_we && known[b_addr]; aa = a_addr; ab = b_addr;
      @(negedge clk);
      a_en = 0; b_en = 0;
      if (ra) begin checks++; if (a_rdata !== model[aa]) failures++; end
      if (rb) begin checks++; if (b_rdata !== model[ab]) failures++; end
      if (a_we) begin model[aa] = a_wdata; known[aa] = 1; end
      if (b_we) begin model[ab] = b_wdata; known[ab] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
