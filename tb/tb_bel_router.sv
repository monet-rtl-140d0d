// tb_bel_router: a Bel router at column 1, row 1 of the 4x4 mesh.
// 1) A lone flit with the bypass enabled leaves one cycle after it arrives; with
//    the bypass disabled it takes the four-cycle RC/VA/SA pipeline.
// 2) Random traffic on all inputs with random output back-pressure: every flit
//    must leave through the port given by X-then-Y routing (west for flits
//    marked for the global buffer), exactly once, and both the bypass and the
//    pipelined path must be used.
module tb_bel_router;
  import monet_pkg::*;
  localparam int XI = 1, YI = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic bypass_en = 1;
  logic in_valid [5], in_ready [5], out_valid [5], out_ready [5];
  bel_flit_t in_flit [5], out_flit [5];
  logic [15:0] bypass_cnt;
  int checks = 0, failures = 0;
  bel_router #(.X_ID(XI), .Y_ID(YI)) dut (.*);

  function automatic int exp_port(input bel_flit_t f);
    int dx, dy;
    dx = int'(f.dest) % 4; dy = int'(f.dest) / 4;
    if (f.to_gb) return 4;
    if (dx > XI) return 2;
    if (dx < XI) return 4;
    if (dy < YI) return 1;
    if (dy > YI) return 3;
    return 0;
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc++;

  int seen [8192];
  int n_sent [5], n_out = 0, pipelined = 0;
  bit rnd_go [5], rnd_rdy [5];
  bit traffic = 0;
  bel_flit_t nxt [5];
  logic man_valid = 0;
  bel_flit_t man_flit = '0;

  function automatic bel_flit_t mk(input int id);
    bel_flit_t f = '0;
    f.to_gb = ($urandom % 4) == 0;
    f.dest = 4'($urandom % 16);
    f.data[0] = data_t'(id);
    return f;
  endfunction

  always_comb for (int p = 0; p < 5; p++) begin
    in_valid[p] = traffic ? (rnd_go[p] && n_sent[p] < 150) : (p == 3 && man_valid);
    in_flit[p]  = traffic ? nxt[p] : man_flit;
    out_ready[p] = !traffic || rnd_rdy[p];
  end

  always @(negedge clk) for (int p = 0; p < 5; p++) begin
    rnd_go[p] = ($urandom % 2) == 0; rnd_rdy[p] = ($urandom % 3) != 0;
  end

  always @(posedge clk) if (traffic) begin
    for (int p = 0; p < 5; p++) begin
      if (in_valid[p] && in_ready[p]) begin
        n_sent[p] <= n_sent[p] + 1;
        nxt[p] <= mk(p * 1000 + n_sent[p] + 1);
      end
      if (out_valid[p] && out_ready[p]) begin
        int id;
        id = int'(out_flit[p].data[0]);
        checks += 2;
        if (exp_port(out_flit[p]) != p) begin failures++; $display("flit %0d left port %0d", id, p); end
        if (seen[id] != 0) begin failures++; $display("flit %0d twice", id); end
        seen[id] = 1; n_out++;
      end
    end
  end

  task automatic lone(input bit byp, input int expect_lat);
    int t0;
    bypass_en = byp;
    @(negedge clk);
    man_valid = 1; man_flit = '0; man_flit.dest = 4'd4; // west neighbour, from south
    t0 = cyc;
    @(negedge clk); man_valid = 0;
    while (!out_valid[4]) @(negedge clk);
    checks++;
    if (cyc - t0 != expect_lat) begin failures++; $display("bypass=%0d latency %0d", byp, cyc - t0); end
    @(negedge clk);
  endtask

  initial begin
    for (int p = 0; p < 5; p++) n_sent[p] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    lone(1, 1);
    lone(0, 4);
    bypass_en = 1;
    for (int p = 0; p < 5; p++) nxt[p] = mk(p * 1000);
    traffic = 1;
    repeat (1200) @(negedge clk);
    traffic = 0;
    repeat (20) @(negedge clk);
    checks += 3;
    if (n_out != 750) begin failures++; $display("delivered %0d of 750", n_out); end
    if (bypass_cnt < 2) begin failures++; $display("no bypass under traffic"); end
    if (bypass_cnt >= 16'(n_out + 2)) begin failures++; $display("pipeline never used"); end
    $display("delivered %0d, bypassed %0d", n_out, bypass_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
