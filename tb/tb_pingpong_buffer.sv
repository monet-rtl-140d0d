// tb_pingpong_buffer: fills one bank while reading the other, swaps, and checks
// that reads return the bank written before the swap, that writes never
// disturb the read bank, and the fill counters.
module tb_pingpong_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic wr_en = 0, swap = 0, wr_bank;
  logic [3:0] wr_addr = '0, rd_addr = '0;
  logic [31:0] wr_data = '0, rd_data;
  logic [4:0] wr_count, rd_count;
  int checks = 0, failures = 0;
  logic [31:0] model [2][16];
  pingpong_buffer #(.WIDTH(32), .DEPTH(16)) dut (.*);

  initial begin
    int b;
    repeat (2) @(negedge clk); rst_n = 1;
    b = 0;
    for (int round = 0; round < 4; round++) begin
      int n = 5 + round * 3;
      for (int i = 0; i < n; i++) begin
        @(negedge clk); wr_en = 1; wr_addr = 4'(i); wr_data = $urandom; model[b][i] = wr_data;
        swap = (i == n - 1);
        // read bank stays intact while writing
        if (round > 0) begin
          rd_addr = 4'(i % (n - 3));
          #1; checks++;
          if (rd_data !== model[1-b][rd_addr]) begin failures++; $display("read bank disturbed"); end
        end
      end
      @(negedge clk); wr_en = 0; swap = 0;
      checks += 2;
      if (rd_count != 5'(n)) begin failures++; $display("rd_count %0d exp %0d", rd_count, n); end
      if (wr_count != 0) failures++;
      for (int i = 0; i < n; i++) begin
        rd_addr = 4'(i); #1; checks++;
        if (rd_data !== model[b][i]) begin failures++; $display("swap data wrong"); end
      end
      b = 1 - b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
