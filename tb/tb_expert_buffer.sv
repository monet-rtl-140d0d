// tb_expert_buffer: writes tiles into expert slots and reads them back under
// each expert-parallelism setting, checking the slot-count wrap-around.
module tb_expert_buffer;
  import monet_pkg::*;
  logic clk = 0;
  always #5 clk = !clk;
  exp_par_e exp_par = EXP_16;
  logic wr_en = 0;
  logic [3:0] wr_slot = '0, rd_slot = '0;
  logic [2:0] wr_row = '0, rd_row = '0;
  vec_t wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  vec_t model [16][8];
  expert_buffer dut (.*);

  task automatic wr(input int s, input int r);
    @(negedge clk); wr_en = 1; wr_slot = 4'(s); wr_row = 3'(r);
    for (int l = 0; l < LANES; l++) wr_data[l] = data_t'($urandom);
    @(negedge clk); wr_en = 0;
  endtask

  initial begin
    int m;
    exp_par_e modes [4] = '{EXP_2, EXP_4, EXP_8, EXP_16};
    for (int mi = 0; mi < 4; mi++) begin
      exp_par = modes[mi];
      m = 2 << mi;
      for (int s = 0; s < 16; s++)
        for (int r = 0; r < 8; r++) begin
          wr(s, r); model[s % m][r] = wr_data;
        end
      for (int s = 0; s < 16; s++)
        for (int r = 0; r < 8; r++) begin
          rd_slot = 4'(s); rd_row = 3'(r); #1; checks++;
          if (rd_data !== model[s % m][r]) begin failures++; $display("mode %0d slot %0d row %0d", mi, s, r); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
