// tb_monet_top: end-to-end test of the MONET accelerator at its default size
// (4x4 islands, batch of 16 tokens, 16 experts).
//
// The bench fills the global buffer with random gating weights, expert weights
// and tokens, runs three batches with different configurations and compares
// every output vector with a reference model written here from the arithmetic
// definitions: y = sum over the top-k experts of softmax weight x act(W_e x),
// with the same Q8.8 number format, base-2 exponential approximation and
// activation formulas the hardware is specified to use.
//   batch 1: k = 2, ReLU, dense, no reordering, NoC logic on
//   batch 2: k = 4, GELU, sparse, reordering on, NoC logic on
//   batch 3: k = 1, ReLU, dense, no reordering, NoC logic off
// It also checks that each mechanism happened: multicast replication in the Mel
// routers, lane reversal on the entry link, Bel bypasses (and none with the NoC
// logic off), zero-skipping in sparse mode, weight reuse (fewer tile loads than
// jobs) and token regrouping.
module tb_monet_top;
  import monet_pkg::*;

  localparam int T  = 16;
  localparam int AW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic ext_en = 1'b0, ext_we = 1'b0;
  logic [AW-1:0] ext_addr = '0;
  vec_t ext_wdata = '0, ext_rdata;
  logic start = 1'b0, busy, done;
  logic [4:0] n_tok = 5'd16;
  logic [2:0] k = 3'd2;
  cfg_t cfg_in = '0;
  logic [15:0] mcast_cnt [NODES], bypass_cnt [NODES], tile_loads [NODES], jobs_done [NODES];
  logic [31:0] skip_cnt [NODES];
  logic [15:0] entry_rev_cnt;

  monet_top dut (.*);

  int checks = 0, failures = 0;

  data_t wg [NUM_EXPERTS][LANES];
  data_t we [NUM_EXPERTS][LANES][LANES];
  data_t xt [T][LANES];

  // ---------------- reference model ----------------
  function automatic data_t sat(input longint v);
    if (v > 32767) return 16'sh7fff;
    if (v < -32768) return 16'sh8000;
    return data_t'(v);
  endfunction

  function automatic data_t dotq(input data_t w [LANES], input data_t x [LANES]);
    longint s = 0;
    for (int i = 0; i < LANES; i++) s += longint'(w[i]) * longint'(x[i]);
    return sat(s >>> 8);
  endfunction

  function automatic data_t relu(input data_t v);
    return (v < 0) ? 16'sd0 : v;
  endfunction

  function automatic data_t gelu(input data_t v);
    longint t = longint'(v) + 768;
    if (t < 0) t = 0;
    if (t > 1536) t = 1536;
    return sat((longint'(v) * t * 43) >>> 16);
  endfunction

  function automatic longint exp2q(input data_t l, input data_t lmax);
    longint d = longint'(l) - longint'(lmax);
    longint z = (d * 369) >>> 8;
    longint q = z >>> 8;
    longint f = z - (q << 8);
    if (q < -16) return 0;
    return ((256 + f) << 8) >>> (-q);
  endfunction

  function automatic void model(input int kk, input bit use_gelu, output data_t y [T][LANES]);
    for (int t = 0; t < T; t++) begin
      data_t lg [NUM_EXPERTS];
      int    sel [4];
      bit    taken [NUM_EXPERTS];
      longint e [4], sum, w [4];
      longint acc [LANES];
      for (int x = 0; x < NUM_EXPERTS; x++) begin lg[x] = dotq(wg[x], xt[t]); taken[x] = 0; end
      for (int j = 0; j < kk; j++) begin
        int best = -1;
        for (int x = 0; x < NUM_EXPERTS; x++)
          if (!taken[x] && (best < 0 || lg[x] > lg[best])) best = x;
        sel[j] = best; taken[best] = 1;
      end
      sum = 0;
      for (int j = 0; j < kk; j++) begin e[j] = exp2q(lg[sel[j]], lg[sel[0]]); sum += e[j]; end
      for (int j = 0; j < kk; j++) w[j] = (e[j] << 16) / sum;
      for (int l = 0; l < LANES; l++) acc[l] = 0;
      for (int j = 0; j < kk; j++)
        for (int l = 0; l < LANES; l++) begin
          data_t h = dotq(we[sel[j]][l], xt[t]);
          h = use_gelu ? gelu(h) : relu(h);
          acc[l] += longint'(h) * w[j];
        end
      for (int l = 0; l < LANES; l++) y[t][l] = sat(acc[l] >>> 16);
    end
  endfunction

  // ---------------- global buffer access ----------------
  task automatic gb_write(input int a, input vec_t v);
    @(negedge clk); ext_en = 1; ext_we = 1; ext_addr = AW'(a); ext_wdata = v;
    @(negedge clk); ext_en = 0; ext_we = 0;
  endtask

  task automatic gb_read(input int a, output vec_t v);
    @(negedge clk); ext_en = 1; ext_we = 0; ext_addr = AW'(a);
    @(negedge clk); ext_en = 0; v = ext_rdata;
  endtask

  function automatic data_t rnd(input int lo, input int hi, input int zero_pct);
    if (($urandom % 100) < zero_pct) return '0;
    return data_t'(lo + int'($urandom % (hi - lo + 1)));
  endfunction

  task automatic load_weights();
    vec_t v;
    for (int x = 0; x < NUM_EXPERTS; x++) begin
      for (int i = 0; i < LANES; i++) begin wg[x][i] = rnd(-128, 127, 10); v[i] = wg[x][i]; end
      gb_write(x, v);
    end
    for (int x = 0; x < NUM_EXPERTS; x++)
      for (int r = 0; r < LANES; r++) begin
        for (int i = 0; i < LANES; i++) begin we[x][r][i] = rnd(-128, 127, 20); v[i] = we[x][r][i]; end
        gb_write(16 + x * 8 + r, v);
      end
  endtask

  task automatic load_tokens();
    vec_t v;
    for (int t = 0; t < T; t++) begin
      for (int i = 0; i < LANES; i++) begin xt[t][i] = rnd(-512, 511, 15); v[i] = xt[t][i]; end
      gb_write(144 + t, v);
    end
  endtask

  task automatic run_batch(input int kk, input cfg_t c, output int cycles);
    data_t y [T][LANES];
    vec_t  v;
    int    bad = 0;
    @(negedge clk); k = 3'(kk); cfg_in = c; n_tok = 5'd16; start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; end
    model(kk, c.act_gelu, y);
    for (int t = 0; t < T; t++) begin
      gb_read(160 + t, v);
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (v[l] !== y[t][l]) begin
          failures++; bad++;
          if (bad < 5) $display("MISMATCH k=%0d token %0d lane %0d: got %0d expected %0d", kk, t, l, v[l], y[t][l]);
        end
      end
    end
    $display("batch k=%0d gelu=%0d sparse=%0d reorder=%0d noc=%0d: %0d cycles, %0d mismatches",
             kk, c.act_gelu, c.sparse, c.reorder, c.noc_en, cycles, bad);
  endtask

  function automatic longint total16(input logic [15:0] a [NODES]);
    longint s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  function automatic void mech(input string name, input bit happened);
    checks++;
    if (!happened) begin failures++; $display("MECHANISM NOT SEEN: %s", name); end
    else $display("mechanism seen: %s", name);
  endfunction

  initial begin
    int cyc;
    longint byp0, byp1, skip0, skip1, rev0;
    longint jobs, loads;
    cfg_t c;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_weights();
    load_tokens();

    c = '{act_gelu: 1'b0, sparse: 1'b0, exp_par: EXP_2, reorder: 1'b0, noc_en: 1'b1};
    run_batch(2, c, cyc);
    byp0 = total16(bypass_cnt); rev0 = entry_rev_cnt;
    mech("multicast replication in Mel routers", total16(mcast_cnt) > 0);
    mech("lane reversal on the entry link", rev0 > 0);
    mech("Bel bypass", byp0 > 0);
    skip0 = 0; foreach (skip_cnt[i]) skip0 += skip_cnt[i];
    mech("no skipped multiplies in dense mode", skip0 == 0);

    load_tokens();
    c = '{act_gelu: 1'b1, sparse: 1'b1, exp_par: EXP_4, reorder: 1'b1, noc_en: 1'b1};
    run_batch(4, c, cyc);
    skip1 = 0; foreach (skip_cnt[i]) skip1 += skip_cnt[i];
    mech("zero skipping in sparse mode", skip1 > skip0);
    mech("token regrouping by expert", dut.u_ctrl.order != {4'd15, 4'd14, 4'd13, 4'd12, 4'd11, 4'd10, 4'd9, 4'd8,
                                                           4'd7, 4'd6, 4'd5, 4'd4, 4'd3, 4'd2, 4'd1, 4'd0});

    load_tokens();
    byp1 = total16(bypass_cnt);
    c = '{act_gelu: 1'b0, sparse: 1'b0, exp_par: EXP_16, reorder: 1'b0, noc_en: 1'b0};
    run_batch(1, c, cyc);
    mech("bypass off with NoC logic disabled", total16(bypass_cnt) == byp1);
    jobs = total16(jobs_done); loads = total16(tile_loads);
    $display("jobs %0d, tile loads %0d, multicasts %0d, bypasses %0d, reversals %0d",
             jobs, loads, total16(mcast_cnt), total16(bypass_cnt), entry_rev_cnt);
    mech("stationary weight reuse", loads < jobs);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
