// pe_island: reconfigurable PE island, the first tier of the accelerator.
//
// An island receives flits from the multicast plane, computes matrix-vector
// products on its 8x8 weight-stationary systolic array and sends result vectors
// into the aggregation plane. It contains: the configuration unit; a double-
// buffered weight buffer for gating weights (a complete 8-row tile swaps banks
// and becomes usable); the expert buffer with the weight tiles of the experts it
// hosts; a double-buffered input buffer for tokens (one bank fills from the
// network while the other is processed); the systolic array; the activation unit
// (none for gating logits, ReLU or GELU for expert outputs); and the output
// buffer, a FIFO feeding the aggregation network.
// Operation: each token entry names its job, gating (gating tile) or expert
// (expert slot). If the tile in the array differs, the island waits until the
// array has drained and loads the tile, one row per cycle (8 cycles); otherwise
// the stationary weights are reused and tokens are issued back to back, one per
// cycle, as long as the output buffer has room for every token in flight. A job
// waits until its weight tile is complete. Results leave as one flit per token
// addressed to the global-buffer side, carrying the island number and the tag.
// Timing: token issue to result in the output buffer is 16 cycles (15 in the
// array, 1 in the activation unit). The buffers, configuration options, array,
// activation choices and output buffer follow the design description; the job
// format, the tile-completion rules and the issue policy are this
// implementation's.
module pe_island
  import monet_pkg::*;
#(
  parameter int NODE_ID   = 0,
  parameter int TOK_DEPTH = 16,
  parameter int OUT_DEPTH = 4,
  parameter int SLOTS     = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  // from the multicast plane (router ejection port)
  input  logic       mel_valid,
  input  mel_flit_t  mel_flit,
  output logic       mel_ready,
  // to the aggregation plane (router injection port)
  output logic       bel_valid,
  output bel_flit_t  bel_flit,
  input  logic       bel_ready,
  // status
  output cfg_t       cfg,
  output logic [31:0] skip_cnt,
  output logic [15:0] tile_loads,
  output logic [15:0] jobs_done
);
  localparam int SW = $clog2(SLOTS);
  localparam int IW = $clog2(TOK_DEPTH);

  typedef struct packed {
    logic             is_exp;
    logic [3:0]       slot;
    logic [TAG_W-1:0] tag;
    vec_t             data;
  } job_t;

  // ---------------- configuration ----------------
  logic [4:0] n_experts;
  logic       cfg_we;
  config_unit u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_in(cfg_t'(mel_flit.data[0][$bits(cfg_t)-1:0])),
    .cfg, .n_experts
  );

  // ---------------- network intake ----------------
  logic is_tok, wb_we, eb_we, ib_we, wb_swap, ib_swap;
  logic [$clog2(LANES+1)-1:0] wb_wcount, wb_rcount;
  logic [$clog2(TOK_DEPTH+1)-1:0] ib_wcount, ib_rcount;
  logic gate_ready;
  logic [LANES-1:0] slot_rows [SLOTS];

  assign is_tok    = (mel_flit.typ == MF_TOK_GATE) || (mel_flit.typ == MF_TOK_EXP);
  assign mel_ready = !(is_tok && ib_wcount == ($bits(ib_wcount))'(TOK_DEPTH));
  assign cfg_we    = mel_valid && mel_ready && mel_flit.typ == MF_CFG;
  assign wb_we     = mel_valid && mel_ready && mel_flit.typ == MF_GATE_W;
  assign eb_we     = mel_valid && mel_ready && mel_flit.typ == MF_EXP_W;
  assign ib_we     = mel_valid && mel_ready && is_tok;
  assign wb_swap   = wb_we && wb_wcount == ($bits(wb_wcount))'(LANES - 1);

  // weight buffer (gating tile), double buffered
  logic [2:0] load_row;
  vec_t       wb_rdata, eb_rdata;
  pingpong_buffer #(.WIDTH($bits(vec_t)), .DEPTH(LANES)) u_wbuf (
    .clk, .rst_n,
    .wr_en(wb_we), .wr_addr(mel_flit.idx[2:0]), .wr_data(mel_flit.data),
    .swap(wb_swap), .rd_addr(load_row), .rd_data(wb_rdata),
    .wr_count(wb_wcount), .rd_count(wb_rcount), .wr_bank()
  );

  // expert buffer
  logic [SW-1:0] ld_slot;
  expert_buffer #(.SLOTS(SLOTS), .ROWS(LANES)) u_ebuf (
    .clk, .exp_par(cfg.exp_par),
    .wr_en(eb_we), .wr_slot(SW'(mel_flit.tag)), .wr_row(mel_flit.idx[2:0]),
    .wr_data(mel_flit.data),
    .rd_slot(ld_slot), .rd_row(load_row), .rd_data(eb_rdata)
  );

  // input buffer (tokens), double buffered
  job_t ib_wdata, ib_rdata;
  logic [IW-1:0] ib_wptr, ib_rptr;
  logic [$clog2(TOK_DEPTH+1)-1:0] ib_consumed;
  assign ib_wdata = '{is_exp: (mel_flit.typ == MF_TOK_EXP), slot: mel_flit.idx,
                      tag: mel_flit.tag, data: mel_flit.data};
  assign ib_wptr  = IW'(ib_wcount);
  pingpong_buffer #(.WIDTH($bits(job_t)), .DEPTH(TOK_DEPTH)) u_ibuf (
    .clk, .rst_n,
    .wr_en(ib_we), .wr_addr(ib_wptr), .wr_data(ib_wdata),
    .swap(ib_swap), .rd_addr(ib_rptr), .rd_data(ib_rdata),
    .wr_count(ib_wcount), .rd_count(ib_rcount), .wr_bank()
  );
  assign ib_rptr = IW'(ib_consumed);
  assign ib_swap = (ib_consumed == ib_rcount) && (ib_wcount != '0 || ib_we);

  // ---------------- compute control ----------------
  typedef enum logic [1:0] {C_RUN, C_DRAIN, C_LOAD} cstate_e;
  cstate_e    cst;
  logic       sa_tile_v;
  logic [4:0] sa_tile;          // {is_exp, slot}
  logic [4:0] want_tile;
  logic       have_job, job_ready, issue, w_load;
  logic [$clog2(OUT_DEPTH+1)-1:0] inflight, of_count;

  assign have_job  = (ib_consumed != ib_rcount);
  assign want_tile = {ib_rdata.is_exp, ib_rdata.slot & 4'(n_experts - 1'b1)};
  assign job_ready = ib_rdata.is_exp ? (&slot_rows[SW'(want_tile[3:0])]) : gate_ready;
  assign ld_slot   = SW'(sa_tile[3:0]);
  assign issue     = (cst == C_RUN) && have_job && job_ready && sa_tile_v && (sa_tile == want_tile)
                     && (32'(inflight) + 32'(of_count) < OUT_DEPTH);
  assign w_load    = (cst == C_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_ready <= 1'b0;
      for (int s = 0; s < SLOTS; s++) slot_rows[s] <= '0;
    end else begin
      if (wb_swap) gate_ready <= 1'b1;
      if (eb_we) slot_rows[SW'(mel_flit.tag) & SW'(n_experts - 1'b1)][mel_flit.idx[2:0]] <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst <= C_RUN; sa_tile_v <= 1'b0; sa_tile <= '0; load_row <= '0;
      ib_consumed <= '0; tile_loads <= '0;
    end else begin
      if (ib_swap) ib_consumed <= '0;
      else if (issue) ib_consumed <= ib_consumed + 1'b1;
      // a new gating tile replaces the one in the array
      if (wb_swap && !sa_tile[4]) sa_tile_v <= 1'b0;
      unique case (cst)
        C_RUN: if (have_job && job_ready && (!sa_tile_v || sa_tile != want_tile)) begin
          cst <= C_DRAIN;
          sa_tile <= want_tile;
          sa_tile_v <= 1'b0;
        end
        C_DRAIN: if (inflight == '0) begin
          cst <= C_LOAD; load_row <= '0;
        end
        C_LOAD: begin
          load_row <= load_row + 1'b1;
          if (load_row == 3'(LANES - 1)) begin
            cst <= C_RUN; sa_tile_v <= 1'b1; tile_loads <= tile_loads + 1'b1;
          end
        end
        default: cst <= C_RUN;
      endcase
    end
  end

  // ---------------- systolic array and post-processing ----------------
  logic y_valid, a_valid;
  vec_t y_vec, a_vec;
  logic [TAG_W-1:0] a_tag;
  systolic_array #(.ROWS(LANES), .COLS(LANES)) u_sa (
    .clk, .rst_n, .sparse(cfg.sparse),
    .w_load, .w_row(load_row), .w_vec(sa_tile[4] ? eb_rdata : wb_rdata),
    .x_valid(issue), .x_vec(ib_rdata.data),
    .y_valid, .y_vec, .skip_cnt
  );

  // job information travelling alongside the array
  typedef struct packed { logic is_exp; logic [TAG_W-1:0] tag; } meta_t;
  meta_t m_head;
  logic  m_valid;
  sync_fifo #(.T(meta_t), .DEPTH(OUT_DEPTH)) u_meta (
    .clk, .rst_n,
    .in_valid(issue), .in_ready(), .in_data('{is_exp: ib_rdata.is_exp, tag: ib_rdata.tag}),
    .out_valid(m_valid), .out_ready(y_valid), .out_data(m_head), .count()
  );

  logic a_is_exp;
  activation_unit u_act (
    .clk, .rst_n, .bypass(!m_head.is_exp), .gelu(cfg.act_gelu),
    .in_valid(y_valid), .in_vec(y_vec), .in_tag(m_head.tag),
    .out_valid(a_valid), .out_vec(a_vec), .out_tag(a_tag)
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_is_exp <= 1'b0;
    else        a_is_exp <= m_head.is_exp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight <= '0; jobs_done <= '0;
    end else begin
      inflight <= inflight + $bits(inflight)'(issue) - $bits(inflight)'(a_valid);
      if (a_valid) jobs_done <= jobs_done + 1'b1;
    end
  end

  // output buffer
  bel_flit_t res;
  assign res = '{to_gb: 1'b1, dest: '0, src: NODE_W'(NODE_ID),
                 typ: a_is_exp ? BF_EXP_RES : BF_GATE_RES, tag: a_tag, data: a_vec};
  sync_fifo #(.T(bel_flit_t), .DEPTH(OUT_DEPTH)) u_obuf (
    .clk, .rst_n,
    .in_valid(a_valid), .in_ready(), .in_data(res),
    .out_valid(bel_valid), .out_ready(bel_ready), .out_data(bel_flit), .count(of_count)
  );

  // the array never produces a result without its job record
  assert property (@(posedge clk) disable iff (!rst_n) y_valid |-> m_valid);
endmodule
