// tb_pe_island: feeds one PE island through its network ports: a configuration
// word (GELU, sparse, 2 experts), a gating tile, two expert tiles, then gating
// and expert tokens in mixed order. Every result flit is compared with a
// reference (W x in Q8.8, no activation for gating, GELU approximation for
// experts). Also checks tile reuse (one load per tile change), back-to-back
// results for tokens that share a tile, skipped multiplies in sparse mode and
// that a token waits for an incomplete tile.
module tb_pe_island;
  import monet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic mel_valid = 0, mel_ready, bel_valid, bel_ready = 1;
  mel_flit_t mel_flit = '0;
  bel_flit_t bel_flit;
  cfg_t cfg;
  logic [31:0] skip_cnt;
  logic [15:0] tile_loads, jobs_done;
  int checks = 0, failures = 0;
  pe_island #(.NODE_ID(6)) dut (.*);

  data_t wg [8][8], we [2][8][8], xs [64][8];
  int    job_slot [64];   // -1 gating
  int    n_res = 0, last_res_cyc = -10, b2b = 0, cyc = 0;
  always @(posedge clk) cyc++;

  function automatic data_t sat(input longint v);
    if (v > 32767) return 16'sh7fff;
    if (v < -32768) return 16'sh8000;
    return data_t'(v);
  endfunction

  function automatic data_t ref_out(input int t, input int j);
    longint s = 0, tt;
    data_t h;
    for (int i = 0; i < 8; i++)
      s += longint'(job_slot[t] < 0 ? wg[j][i] : we[job_slot[t]][j][i]) * longint'(xs[t][i]);
    h = sat(s >>> 8);
    if (job_slot[t] < 0) return h;
    tt = longint'(h) + 768;
    if (tt < 0) tt = 0;
    if (tt > 1536) tt = 1536;
    return sat((longint'(h) * tt * 43) >>> 16);
  endfunction

  always @(negedge clk) if (bel_valid && bel_ready) begin
    int t;
    t = int'(bel_flit.tag);
    checks += 3;
    if (bel_flit.src != 4'd6 || !bel_flit.to_gb) failures++;
    if (bel_flit.typ != (job_slot[t] < 0 ? BF_GATE_RES : BF_EXP_RES)) begin failures++; $display("type wrong tag %0d", t); end
    for (int j = 0; j < 8; j++) begin
      checks++;
      if (bel_flit.data[j] !== ref_out(t, j)) begin failures++; $display("tag %0d lane %0d got %0d exp %0d", t, j, bel_flit.data[j], ref_out(t, j)); end
    end
    if (cyc == last_res_cyc + 1) b2b++;
    last_res_cyc = cyc;
    n_res++;
  end

  task automatic send(input mel_type_e typ, input int idx, input int tag, input vec_t d);
    @(negedge clk);
    mel_valid = 1; mel_flit = '0; mel_flit.dest = 16'(1 << 6); mel_flit.typ = typ;
    mel_flit.idx = 4'(idx); mel_flit.tag = 8'(tag); mel_flit.data = d;
    @(posedge clk); while (!mel_ready) @(posedge clk);
    @(negedge clk); mel_valid = 0;
  endtask

  function automatic data_t r(input int span, input int zpct);
    if (($urandom % 100) < zpct) return '0;
    return data_t'(int'($urandom % (2 * span)) - span);
  endfunction

  task automatic token(input int t, input int slot);
    vec_t v;
    for (int i = 0; i < 8; i++) begin xs[t][i] = r(600, 20); v[i] = xs[t][i]; end
    job_slot[t] = slot;
    send(slot < 0 ? MF_TOK_GATE : MF_TOK_EXP, slot < 0 ? 0 : slot, t, v);
  endtask

  initial begin
    vec_t v;
    cfg_t c;
    repeat (2) @(negedge clk); rst_n = 1;
    c = '{act_gelu: 1'b1, sparse: 1'b1, exp_par: EXP_2, reorder: 1'b0, noc_en: 1'b1};
    v = '0; v[0] = data_t'(16'($bits(cfg_t)'(c)));
    send(MF_CFG, 0, 0, v);
    // an expert token before its tile is complete must wait
    for (int rr = 0; rr < 7; rr++) begin
      for (int i = 0; i < 8; i++) begin we[0][rr][i] = r(200, 30); v[i] = we[0][rr][i]; end
      send(MF_EXP_W, rr, 0, v);
    end
    token(0, 0);
    repeat (30) @(negedge clk);
    checks++; if (n_res != 0) begin failures++; $display("token ran on an incomplete tile"); end
    for (int i = 0; i < 8; i++) begin we[0][7][i] = r(200, 30); v[i] = we[0][7][i]; end
    send(MF_EXP_W, 7, 0, v);
    for (int rr = 0; rr < 8; rr++) begin
      for (int i = 0; i < 8; i++) begin we[1][rr][i] = r(200, 30); v[i] = we[1][rr][i]; end
      send(MF_EXP_W, rr, 1, v);
      for (int i = 0; i < 8; i++) begin wg[rr][i] = r(200, 10); v[i] = wg[rr][i]; end
      send(MF_GATE_W, rr, 0, v);
    end
    repeat (40) @(negedge clk);
    // batches of tokens sharing a tile, sent into the input buffer back to back
    for (int t = 1; t < 7; t++) token(t, 0);
    for (int t = 7; t < 13; t++) token(t, -1);
    for (int t = 13; t < 19; t++) token(t, 1);
    for (int t = 19; t < 25; t++) token(t, -1);
    repeat (200) @(negedge clk);
    checks += 5;
    if (n_res != 25) begin failures++; $display("results %0d of 25", n_res); end
    if (tile_loads != 4) begin failures++; $display("tile loads %0d, expected 4", tile_loads); end
    if (jobs_done != 16'(25)) failures++;
    if (skip_cnt == 0) begin failures++; $display("no skipped multiplies"); end
    if (b2b < 8) begin failures++; $display("back-to-back results %0d", b2b); end
    $display("results %0d, tile loads %0d, back-to-back %0d, skipped %0d", n_res, tile_loads, b2b, skip_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
