// tb_systolic_array: loads random 8x8 weight matrices, streams random vectors one
// per cycle and compares each result with a reference matrix-vector product
// (Q8.8, floor, saturate). Checks the 15-cycle latency, the one-vector-per-cycle
// throughput, sparse mode (same results, multiplies skipped) and a reload.
module tb_systolic_array;
  import monet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic sparse = 0, w_load = 0, x_valid = 0, y_valid;
  logic [2:0] w_row = '0;
  data_t [7:0] w_vec = '0, x_vec = '0, y_vec;
  logic [31:0] skip_cnt;
  int checks = 0, failures = 0;
  systolic_array dut (.*);

  data_t W [8][8];
  data_t X [32][8];
  int issue_cyc [32];
  int cyc = 0, nout = 0;
  always @(posedge clk) cyc++;

  function automatic data_t ref_y(input int v, input int j);
    longint s = 0;
    for (int i = 0; i < 8; i++) s += longint'(W[j][i]) * longint'(X[v][i]);
    s = s >>> 8;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return data_t'(s);
  endfunction

  always @(negedge clk) if (y_valid) begin
    checks++;
    if (cyc - issue_cyc[nout] != 15) begin failures++; $display("latency %0d", cyc - issue_cyc[nout]); end
    for (int j = 0; j < 8; j++) begin
      checks++;
      if (y_vec[j] !== ref_y(nout, j)) begin failures++; $display("vec %0d col %0d got %0d exp %0d", nout, j, y_vec[j], ref_y(nout, j)); end
    end
    nout++;
  end

  task automatic load(input int zero_pct);
    for (int j = 0; j < 8; j++) begin
      @(negedge clk); w_load = 1; w_row = 3'(j);
      for (int i = 0; i < 8; i++) begin
        W[j][i] = (($urandom % 100) < zero_pct) ? 16'sd0 : data_t'(int'($urandom % 512) - 256);
        w_vec[i] = W[j][i];
      end
    end
    @(negedge clk); w_load = 0;
  endtask

  task automatic stream(input int first, input int cnt);
    for (int v = first; v < first + cnt; v++) begin
      for (int i = 0; i < 8; i++) begin
        X[v][i] = (($urandom % 4) == 0) ? 16'sd0 : data_t'(int'($urandom % 4096) - 2048);
        x_vec[i] = X[v][i];
      end
      x_valid = 1; issue_cyc[v] = cyc;   // cycle in which the vector is presented
      @(negedge clk);
    end
    x_valid = 0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    load(0);
    @(negedge clk); stream(0, 12);
    checks++; if (skip_cnt != 0) failures++;
    sparse = 1;
    load(30);
    @(negedge clk); stream(12, 12);
    checks++; if (skip_cnt == 0) begin failures++; $display("no skips in sparse mode"); end
    checks++; if (nout != 24) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
