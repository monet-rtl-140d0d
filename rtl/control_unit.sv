// control_unit: central control unit that sequences one MoE layer over a batch
// of tokens.
//
// It reads the global buffer and injects flits into the multicast plane at the
// top-left corner of the mesh, collects results leaving the aggregation plane at
// the west edge (one port per row), and runs the gating arithmetic and the
// output aggregation. Sequence for a batch of n tokens with top-k gating:
//   1. multicast the configuration word to all islands;
//   2. gating weights: rows 0-7 (experts 0-7) to island 0, rows 8-15 to island 1;
//   3. expert weights: expert e's 8x8 tile to island e (slot 0);
//   4. gating: each token multicast to islands 0 and 1 (gating functions 1 and
//      2), which return 8 logits each;
//   5. for each token, softmax_topk picks k experts and their weights;
//   6. if reordering is on, expert_reorder groups the tokens by first-choice
//      expert, otherwise tokens keep their order;
//   7. dispatch: each token is multicast once to all islands of its k experts
//      (token reuse) and the aggregator is told to expect k results;
//   8. each expert result is weighted and summed; finished outputs are written
//      back to the global buffer. done pulses when all n outputs are written.
// Global-buffer map (vectors of 8 values): gating rows at GATE_BASE (16 rows),
// expert e row r at EXP_BASE + 8e + r, token t at TOK_BASE + t, output t at
// OUT_BASE + t. Timing: about three cycles per injected flit; result collection
// runs concurrently. The three-phase sequence (gating, expert weight delivery,
// token dispatch with aggregation), multicast of tokens and gating weights and
// token reuse follow the design description; the memory map, the placement of
// gating and experts on islands and the collection ports are this
// implementation's choices.
module control_unit
  import monet_pkg::*;
#(
  parameter int TOKENS    = 16,
  parameter int GB_DEPTH  = 256,
  parameter int GATE_BASE = 0,
  parameter int EXP_BASE  = 16,
  parameter int TOK_BASE  = 144,
  parameter int OUT_BASE  = 160
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [$clog2(TOKENS+1)-1:0]   n_tok,
  input  logic [2:0]                    k,
  input  cfg_t                          cfg_in,
  output logic                          busy,
  output logic                          done,
  // global buffer port B
  output logic                          gb_en,
  output logic                          gb_we,
  output logic [$clog2(GB_DEPTH)-1:0]   gb_addr,
  output vec_t                          gb_wdata,
  input  vec_t                          gb_rdata,
  // multicast plane entry (side A of the corner link)
  output logic                          tx_valid [2],
  output mel_flit_t                     tx_flit  [2],
  input  logic                          tx_ready [2],
  output logic                          tx_req,
  // aggregation plane exits, one per mesh row
  input  logic                          rx_valid [MESH_Y],
  input  bel_flit_t                     rx_flit  [MESH_Y],
  output logic                          rx_ready [MESH_Y],
  // event counters
  output logic [15:0]                   n_gate_res,
  output logic [15:0]                   n_exp_res
);
  localparam int TW = $clog2(TOKENS);
  localparam int CW = $clog2(TOKENS+1);
  localparam int AW = $clog2(GB_DEPTH);
  localparam int EW = $clog2(NUM_EXPERTS);

  typedef enum logic [3:0] {
    P_IDLE, P_CFG, P_GW, P_EW, P_GT, P_GWAIT, P_TOPK, P_TOPK_W, P_REORD, P_REORD_W,
    P_DISP, P_DWAIT
  } phase_e;
  typedef enum logic [1:0] {T_IDLE, T_RD, T_DATA, T_SEND} tx_e;

  phase_e     ph;
  tx_e        ts;
  logic [7:0] item;          // item counter within a phase
  logic [CW-1:0] n;
  logic [2:0] kk;
  cfg_t       cfg;

  data_t [TOKENS-1:0][NUM_EXPERTS-1:0] logits;
  logic  [TOKENS-1:0][MAX_K-1:0][EW-1:0] sel;
  logic  [TOKENS-1:0][MAX_K-1:0][16:0]   wgt;
  logic  [TOKENS-1:0][TW-1:0]            order;
  logic  [15:0] n_out;

  // ---------------- helpers ----------------
  logic          sm_start, sm_done, sm_busy;
  logic [MAX_K-1:0][EW-1:0] sm_idx;
  logic [MAX_K-1:0][16:0]   sm_w;
  softmax_topk #(.N(NUM_EXPERTS), .KMAX(MAX_K)) u_softmax (
    .clk, .rst_n, .start(sm_start), .k(3'(kk)), .logits(logits[TW'(item)]),
    .busy(sm_busy), .done(sm_done), .sel_idx(sm_idx), .sel_w(sm_w)
  );

  logic ro_start, ro_done;
  logic [TOKENS-1:0][EW-1:0] first_choice;
  logic [TOKENS-1:0][TW-1:0] ro_order;
  always_comb for (int t = 0; t < TOKENS; t++) first_choice[t] = sel[t][0];
  expert_reorder #(.TOKENS(TOKENS), .E(NUM_EXPERTS)) u_reorder (
    .clk, .rst_n, .start(ro_start), .n_tok(n), .exp_id(first_choice),
    .done(ro_done), .order(ro_order)
  );

  logic       ag_start, ag_in_valid, ag_out_valid;
  logic [TAG_W-1:0] ag_start_tag, ag_in_tag, ag_out_tag;
  logic [16:0] ag_in_w;
  vec_t        ag_in_vec, ag_out_vec;
  aggregator #(.TOKENS(TOKENS)) u_agg (
    .clk, .rst_n,
    .start(ag_start), .start_tag(ag_start_tag), .start_k(kk),
    .in_valid(ag_in_valid), .in_tag(ag_in_tag), .in_w(ag_in_w), .in_vec(ag_in_vec),
    .out_valid(ag_out_valid), .out_tag(ag_out_tag), .out_vec(ag_out_vec)
  );

  // ---------------- flit generation ----------------
  logic       gen_valid;     // the phase has an item to send
  logic [AW-1:0] gen_addr;
  mel_flit_t  gen_flit;      // data field filled from the buffer
  logic       last_item;
  logic [TW-1:0] disp_tok;

  assign disp_tok = order[TW'(item)];

  always_comb begin
    gen_valid = 1'b0; gen_addr = '0; gen_flit = '0; last_item = 1'b0;
    unique case (ph)
      P_CFG: begin
        gen_valid = 1'b1; last_item = 1'b1;
        gen_flit.dest = '1; gen_flit.typ = MF_CFG;
      end
      P_GW: begin
        gen_valid = 1'b1; gen_addr = AW'(GATE_BASE + int'(item));
        gen_flit.dest = NODES'(1) << (item / 8); gen_flit.typ = MF_GATE_W;
        gen_flit.idx  = 4'(item % 8);
        last_item = (item == 8'(NUM_EXPERTS - 1));
      end
      P_EW: begin
        gen_valid = 1'b1; gen_addr = AW'(EXP_BASE + int'(item));
        gen_flit.dest = NODES'(1) << (item / 8); gen_flit.typ = MF_EXP_W;
        gen_flit.idx  = 4'(item % 8); gen_flit.tag = '0;
        last_item = (item == 8'(NUM_EXPERTS * LANES - 1));
      end
      P_GT: begin
        gen_valid = 1'b1; gen_addr = AW'(TOK_BASE + int'(item));
        gen_flit.dest = NODES'(3); gen_flit.typ = MF_TOK_GATE;
        gen_flit.tag  = item;
        last_item = (item == 8'(n - 1'b1));
      end
      P_DISP: begin
        gen_valid = 1'b1; gen_addr = AW'(TOK_BASE + int'(disp_tok));
        gen_flit.typ = MF_TOK_EXP; gen_flit.tag = TAG_W'(disp_tok); gen_flit.idx = '0;
        for (int i = 0; i < MAX_K; i++)
          if (3'(i) < kk) gen_flit.dest[sel[disp_tok][i]] = 1'b1;
        last_item = (item == 8'(n - 1'b1));
      end
      default: ;
    endcase
  end

  mel_flit_t tx_reg;
  logic      tx_sent;
  assign tx_req      = (ts == T_SEND);
  assign tx_valid[0] = (ts == T_SEND) && tx_ready[0];
  assign tx_valid[1] = (ts == T_SEND) && !tx_ready[0] && tx_ready[1];
  assign tx_flit[0]  = tx_reg;
  assign tx_flit[1]  = tx_reg;
  assign tx_sent     = tx_valid[0] || tx_valid[1];

  // global buffer port: output write-back has priority over reads
  assign gb_en    = ag_out_valid || (ts == T_RD);
  assign gb_we    = ag_out_valid;
  assign gb_addr  = ag_out_valid ? AW'(OUT_BASE + int'(ag_out_tag[TW-1:0])) : gen_addr;
  assign gb_wdata = ag_out_vec;

  // ---------------- result collection ----------------
  logic [1:0] rx_rr;
  logic       rx_take;
  logic [1:0] rx_sel;
  always_comb begin
    rx_take = 1'b0; rx_sel = '0;
    for (int i = 0; i < MESH_Y; i++) begin
      logic [1:0] r;
      r = 2'((int'(rx_rr) + i) % MESH_Y);
      if (!rx_take && rx_valid[r]) begin rx_take = 1'b1; rx_sel = r; end
    end
    for (int i = 0; i < MESH_Y; i++) rx_ready[i] = rx_take && (rx_sel == 2'(i));
  end

  bel_flit_t rf;
  assign rf = rx_flit[rx_sel];
  always_comb begin
    ag_in_valid = rx_take && rf.typ == BF_EXP_RES;
    ag_in_tag   = rf.tag;
    ag_in_vec   = rf.data;
    ag_in_w     = '0;
    for (int i = 0; i < MAX_K; i++)
      if (3'(i) < kk && sel[TW'(rf.tag)][i] == EW'(rf.src)) ag_in_w = wgt[TW'(rf.tag)][i];
  end

  // gate-result count at the start of a batch (counters run across batches)
  logic [15:0] n_gate_base;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_gate_base <= '0;
    else if (ph == P_IDLE && start) n_gate_base <= n_gate_res;
  end

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= P_IDLE; ts <= T_IDLE; item <= '0; n <= '0; kk <= 3'd1; cfg <= '0;
      tx_reg <= '0; logits <= '0; sel <= '0; wgt <= '0; order <= '0;
      n_out <= '0; n_gate_res <= '0; n_exp_res <= '0; rx_rr <= '0; done <= 1'b0;
      sm_start <= 1'b0; ro_start <= 1'b0; ag_start <= 1'b0; ag_start_tag <= '0;
    end else begin
      done <= 1'b0; sm_start <= 1'b0; ro_start <= 1'b0; ag_start <= 1'b0;

      // collection
      if (rx_take) begin
        rx_rr <= rx_sel + 1'b1;
        if (rf.typ == BF_GATE_RES) begin
          for (int l = 0; l < LANES; l++)
            logits[TW'(rf.tag)][(rf.src == '0 ? 0 : LANES) + l] <= rf.data[l];
          n_gate_res <= n_gate_res + 1'b1;
        end else begin
          n_exp_res <= n_exp_res + 1'b1;
        end
      end
      if (ag_out_valid) n_out <= n_out + 1'b1;

      // flit transmitter
      unique case (ts)
        T_IDLE: if (gen_valid) ts <= T_RD;
        T_RD:   if (!ag_out_valid) ts <= T_DATA;
        T_DATA: begin
          tx_reg <= gen_flit;
          if (ph != P_CFG) tx_reg.data <= gb_rdata;
          else tx_reg.data <= vec_t'($bits(vec_t)'(cfg));
          if (ph == P_DISP) begin
            ag_start <= 1'b1; ag_start_tag <= TAG_W'(disp_tok);
          end
          ts <= T_SEND;
        end
        T_SEND: if (tx_sent) begin
          ts <= T_IDLE;
          if (last_item) begin
            item <= '0;
            unique case (ph)
              P_CFG:  ph <= P_GW;
              P_GW:   ph <= P_EW;
              P_EW:   ph <= P_GT;
              P_GT:   ph <= P_GWAIT;
              P_DISP: ph <= P_DWAIT;
              default: ;
            endcase
          end else item <= item + 1'b1;
        end
        default: ts <= T_IDLE;
      endcase

      unique case (ph)
        P_IDLE: if (start) begin
          n <= n_tok; kk <= (k == 3'd0) ? 3'd1 : (k > 3'(MAX_K) ? 3'(MAX_K) : k);
          cfg <= cfg_in; item <= '0; n_out <= '0; ph <= P_CFG;
        end
        P_GWAIT: if (n_gate_res == 16'(2 * int'(n)) + 16'(n_gate_base)) begin
          item <= '0; ph <= P_TOPK;
        end
        P_TOPK: begin sm_start <= 1'b1; ph <= P_TOPK_W; end
        P_TOPK_W: if (sm_done) begin
          sel[TW'(item)] <= sm_idx;
          wgt[TW'(item)] <= sm_w;
          if (item == 8'(n - 1'b1)) begin item <= '0; ph <= P_REORD; end
          else begin item <= item + 1'b1; ph <= P_TOPK; end
        end
        P_REORD: begin
          if (cfg.reorder) begin ro_start <= 1'b1; ph <= P_REORD_W; end
          else begin
            for (int t = 0; t < TOKENS; t++) order[t] <= TW'(t);
            ph <= P_DISP;
          end
        end
        P_REORD_W: if (ro_done) begin order <= ro_order; ph <= P_DISP; end
        P_DWAIT: if (n_out == 16'(n)) begin done <= 1'b1; ph <= P_IDLE; end
        default: ;
      endcase
    end
  end

  assign busy = (ph != P_IDLE);
endmodule
