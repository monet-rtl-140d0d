// tb_control_unit: runs the control unit against a behavioural model of the
// islands and both network planes. The model answers each gating token with
// two logit vectors (islands 0 and 1) and each expert token with one ReLU result
// per destination island, returned on random rows after random delays. It also
// stands in for the global buffer. Checks the flit sequence (configuration,
// 16 gating rows, 128 expert rows, n gating tokens, n dispatched tokens whose
// destination set is exactly the reference top-k), the token order with
// reordering on, and every aggregated output written back.
module tb_control_unit;
  import monet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic start = 0, busy, done;
  logic [4:0] n_tok = 5'd16;
  logic [2:0] k = 3'd2;
  cfg_t cfg_in = '0;
  logic gb_en, gb_we;
  logic [7:0] gb_addr;
  vec_t gb_wdata, gb_rdata;
  logic tx_valid [2], tx_ready [2], tx_req;
  mel_flit_t tx_flit [2];
  logic rx_valid [4], rx_ready [4];
  bel_flit_t rx_flit [4];
  logic [15:0] n_gate_res, n_exp_res;
  int checks = 0, failures = 0;
  control_unit dut (.*);

  // ---- global buffer model ----
  vec_t mem [256];
  always @(posedge clk) if (gb_en) begin
    if (gb_we) mem[gb_addr] <= gb_wdata;
    gb_rdata <= mem[gb_addr];
  end

  // ---- reference arithmetic ----
  function automatic data_t sat(input longint v);
    if (v > 32767) return 16'sh7fff;
    if (v < -32768) return 16'sh8000;
    return data_t'(v);
  endfunction
  function automatic data_t dot(input vec_t w, input vec_t x);
    longint s = 0;
    for (int i = 0; i < 8; i++) s += longint'(w[i]) * longint'(x[i]);
    return sat(s >>> 8);
  endfunction
  function automatic longint e2(input data_t l, input data_t m);
    longint d = longint'(l) - longint'(m);
    longint z = (d * 369) >>> 8;
    longint q = z >>> 8;
    longint f = z - (q << 8);
    if (q < -16) return 0;
    return ((256 + f) << 8) >>> (-q);
  endfunction

  int sel [16][4];
  longint wt [16][4];
  function automatic void ref_gate(input int kk);
    for (int t = 0; t < 16; t++) begin
      data_t lg [16];
      bit tk [16];
      longint e [4], sum;
      for (int x = 0; x < 16; x++) begin lg[x] = dot(mem[x], mem[144 + t]); tk[x] = 0; end
      for (int j = 0; j < kk; j++) begin
        int b;
        b = -1;
        for (int x = 0; x < 16; x++) if (!tk[x] && (b < 0 || lg[x] > lg[b])) b = x;
        sel[t][j] = b; tk[b] = 1;
      end
      sum = 0;
      for (int j = 0; j < kk; j++) begin e[j] = e2(lg[sel[t][j]], lg[sel[t][0]]); sum += e[j]; end
      for (int j = 0; j < kk; j++) wt[t][j] = (e[j] << 16) / sum;
    end
  endfunction

  function automatic vec_t expert(input int e, input int t);
    vec_t y;
    for (int j = 0; j < 8; j++) begin
      y[j] = dot(mem[16 + e * 8 + j], mem[144 + t]);
      if (y[j] < 0) y[j] = '0;
    end
    return y;
  endfunction

  // ---- network model: accept flits, queue responses ----
  bel_flit_t resp [$];
  int  n_cfg = 0, n_gw = 0, n_ew = 0, n_gt = 0, n_disp = 0, kk_now = 2;
  int  disp_order [16];
  logic [15:0] disp_dest [16];
  bit  lane1_rdy;
  always @(negedge clk) lane1_rdy = ($urandom % 2) == 0;
  assign tx_ready[0] = 1'b1;
  assign tx_ready[1] = lane1_rdy;

  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < 2; l++) if (tx_valid[l] && tx_ready[l]) begin
      mel_flit_t f;
      f = tx_flit[l];
      case (f.typ)
        MF_CFG: n_cfg++;
        MF_GATE_W: n_gw++;
        MF_EXP_W: n_ew++;
        MF_TOK_GATE: begin
          bel_flit_t r;
          n_gt++;
          for (int s = 0; s < 2; s++) begin
            r = '0; r.to_gb = 1; r.src = 4'(s); r.typ = BF_GATE_RES; r.tag = f.tag;
            for (int j = 0; j < 8; j++) r.data[j] = dot(mem[s * 8 + j], f.data);
            resp.push_back(r);
          end
        end
        MF_TOK_EXP: begin
          bel_flit_t r;
          disp_order[n_disp] = int'(f.tag); disp_dest[n_disp] = f.dest; n_disp++;
          for (int e = 0; e < 16; e++) if (f.dest[e]) begin
            r = '0; r.to_gb = 1; r.src = 4'(e); r.typ = BF_EXP_RES; r.tag = f.tag;
            r.data = expert(e, int'(f.tag));
            resp.push_back(r);
          end
        end
        default: begin failures++; $display("unknown flit type"); end
      endcase
    end
  end

  // responses leave on random rows, one at a time, in random order
  bel_flit_t cur;
  bit cur_v = 0;
  int cur_row = 0;
  always_comb for (int r = 0; r < 4; r++) begin
    rx_valid[r] = cur_v && cur_row == r;
    rx_flit[r] = cur;
  end
  always @(posedge clk) begin
    if (cur_v && rx_ready[cur_row]) cur_v <= 0;
    else if (!cur_v && resp.size() > 0 && ($urandom % 3) == 0) begin
      int i;
      i = $urandom % resp.size();
      cur <= resp[i]; resp.delete(i); cur_v <= 1; cur_row <= $urandom % 4;
    end
  end

  task automatic batch(input int kk, input bit reorder);
    cfg_t c;
    c = '{act_gelu: 1'b0, sparse: 1'b0, exp_par: EXP_2, reorder: reorder, noc_en: 1'b1};
    for (int t = 0; t < 16; t++) for (int i = 0; i < 8; i++) mem[144 + t][i] = data_t'(int'($urandom % 1024) - 512);
    n_cfg = 0; n_gw = 0; n_ew = 0; n_gt = 0; n_disp = 0;
    @(negedge clk); start = 1; k = 3'(kk); cfg_in = c;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    ref_gate(kk);
    checks += 5;
    if (n_cfg != 1) failures++;
    if (n_gw != 16) begin failures++; $display("gating rows %0d", n_gw); end
    if (n_ew != 128) begin failures++; $display("expert rows %0d", n_ew); end
    if (n_gt != 16) failures++;
    if (n_disp != 16) failures++;
    for (int d = 0; d < 16; d++) begin
      int t;
      logic [15:0] m;
      t = disp_order[d]; m = '0;
      for (int j = 0; j < kk; j++) m[sel[t][j]] = 1'b1;
      checks++;
      if (disp_dest[d] != m) begin failures++; $display("token %0d sent to %h, top-k %h", t, disp_dest[d], m); end
      if (reorder && d > 0) begin
        checks++;
        if (sel[disp_order[d]][0] < sel[disp_order[d-1]][0]) begin failures++; $display("not grouped at %0d", d); end
      end
      if (!reorder) begin checks++; if (t != d) failures++; end
    end
    for (int t = 0; t < 16; t++) begin
      longint acc [8];
      for (int l = 0; l < 8; l++) acc[l] = 0;
      for (int j = 0; j < kk; j++) begin
        vec_t y;
        y = expert(sel[t][j], t);
        for (int l = 0; l < 8; l++) acc[l] += longint'(y[l]) * wt[t][j];
      end
      for (int l = 0; l < 8; l++) begin
        checks++;
        if (mem[160 + t][l] !== sat(acc[l] >>> 16)) begin failures++; $display("out %0d lane %0d got %0d exp %0d", t, l, mem[160 + t][l], sat(acc[l] >>> 16)); end
      end
    end
  endtask

  initial begin
    for (int a = 0; a < 144; a++) for (int i = 0; i < 8; i++) mem[a][i] = data_t'(int'($urandom % 256) - 128);
    repeat (2) @(negedge clk); rst_n = 1;
    batch(2, 0);
    batch(4, 1);
    batch(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (30000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
