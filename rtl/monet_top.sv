// monet_top: MONET mixture-of-experts accelerator, 4x4 PE islands on a two-tier
// network-on-chip.
//
// Tier one is the array of reconfigurable PE islands. Tier two is two separate
// mesh planes over the same 4x4 grid: the Mel plane (multicast routers joined by
// reversible two-lane links) carries configuration, gating weights, expert
// weights and tokens from the top-left corner into the islands; the Bel plane
// (bypass routers) carries gating logits and expert results west to the global-
// buffer side, one exit per row. The global buffer is loaded and read through
// port A (the external-memory side); the central control unit uses port B.
// Operation: load the global buffer (see control_unit for the memory map), pulse
// start with the batch size, top-k and configuration; done pulses when the
// batch's outputs are in the global buffer. Island numbering: island y*4 + x at
// column x, row y; island e hosts expert e, islands 0 and 1 also evaluate the
// gating function. Event counters per island (multicast replications, Bel
// bypasses, skipped multiplies, tile loads, jobs) and the reversal count of the
// entry link are brought out. The grid size, the two planes with their router
// types and the global buffer follow the design description; the placement of
// the control at the corner and the row exits are this implementation's.
module monet_top
  import monet_pkg::*;
#(
  parameter int TOKENS   = 16,
  parameter int GB_DEPTH = 256
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // external-memory side of the global buffer
  input  logic                         ext_en,
  input  logic                         ext_we,
  input  logic [$clog2(GB_DEPTH)-1:0]  ext_addr,
  input  vec_t                         ext_wdata,
  output vec_t                         ext_rdata,
  // batch control
  input  logic                         start,
  input  logic [$clog2(TOKENS+1)-1:0]  n_tok,
  input  logic [2:0]                   k,
  input  cfg_t                         cfg_in,
  output logic                         busy,
  output logic                         done,
  // event counters
  output logic [15:0]                  mcast_cnt  [NODES],
  output logic [15:0]                  bypass_cnt [NODES],
  output logic [31:0]                  skip_cnt   [NODES],
  output logic [15:0]                  tile_loads [NODES],
  output logic [15:0]                  jobs_done  [NODES],
  output logic [15:0]                  entry_rev_cnt
);
  localparam int AW = $clog2(GB_DEPTH);

  // ---------------- global buffer and control ----------------
  logic gb_en, gb_we;
  logic [AW-1:0] gb_addr;
  vec_t gb_wdata, gb_rdata;

  global_buffer #(.DEPTH(GB_DEPTH)) u_gb (
    .clk,
    .a_en(ext_en), .a_we(ext_we), .a_addr(ext_addr), .a_wdata(ext_wdata), .a_rdata(ext_rdata),
    .b_en(gb_en), .b_we(gb_we), .b_addr(gb_addr), .b_wdata(gb_wdata), .b_rdata(gb_rdata)
  );

  logic      tx_valid [2];
  mel_flit_t tx_flit  [2];
  logic      tx_ready [2];
  logic      tx_req;
  logic      rx_valid [MESH_Y];
  bel_flit_t rx_flit  [MESH_Y];
  logic      rx_ready [MESH_Y];

  control_unit #(.TOKENS(TOKENS), .GB_DEPTH(GB_DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .n_tok, .k, .cfg_in, .busy, .done,
    .gb_en, .gb_we, .gb_addr, .gb_wdata, .gb_rdata,
    .tx_valid, .tx_flit, .tx_ready, .tx_req,
    .rx_valid, .rx_flit, .rx_ready,
    .n_gate_res(), .n_exp_res()
  );

  // ---------------- per-node signals ----------------
  // Mel router lanes, direction 0 N, 1 E, 2 S, 3 W
  logic      m_lin_valid  [NODES][4][2];
  mel_flit_t m_lin_flit   [NODES][4][2];
  logic      m_lin_pop    [NODES][4][2];
  logic      m_lout_valid [NODES][4][2];
  mel_flit_t m_lout_flit  [NODES][4][2];
  logic      m_lout_ready [NODES][4][2];
  logic      m_req        [NODES][4];
  logic      m_ej_valid   [NODES];
  mel_flit_t m_ej_flit    [NODES];
  logic      m_ej_ready   [NODES];
  // Bel router ports, 0 L, 1 N, 2 E, 3 S, 4 W
  logic      b_in_valid   [NODES][5];
  bel_flit_t b_in_flit    [NODES][5];
  logic      b_in_ready   [NODES][5];
  logic      b_out_valid  [NODES][5];
  bel_flit_t b_out_flit   [NODES][5];
  logic      b_out_ready  [NODES][5];
  cfg_t      icfg         [NODES];

  for (genvar id = 0; id < NODES; id++) begin : g_node
    localparam int X = id % MESH_X;
    localparam int Y = id / MESH_X;

    mel_router #(.X_ID(X), .Y_ID(Y)) u_mel (
      .clk, .rst_n,
      .lin_valid(m_lin_valid[id]), .lin_flit(m_lin_flit[id]), .lin_pop(m_lin_pop[id]),
      .lout_valid(m_lout_valid[id]), .lout_flit(m_lout_flit[id]), .lout_ready(m_lout_ready[id]),
      .req(m_req[id]),
      .inj_valid(1'b0), .inj_flit('0), .inj_ready(),
      .ej_valid(m_ej_valid[id]), .ej_flit(m_ej_flit[id]), .ej_ready(m_ej_ready[id]),
      .mcast_cnt(mcast_cnt[id])
    );

    bel_router #(.X_ID(X), .Y_ID(Y)) u_bel (
      .clk, .rst_n, .bypass_en(icfg[id].noc_en),
      .in_valid(b_in_valid[id]), .in_flit(b_in_flit[id]), .in_ready(b_in_ready[id]),
      .out_valid(b_out_valid[id]), .out_flit(b_out_flit[id]), .out_ready(b_out_ready[id]),
      .bypass_cnt(bypass_cnt[id])
    );

    pe_island #(.NODE_ID(id)) u_island (
      .clk, .rst_n,
      .mel_valid(m_ej_valid[id]), .mel_flit(m_ej_flit[id]), .mel_ready(m_ej_ready[id]),
      .bel_valid(b_in_valid[id][0]), .bel_flit(b_in_flit[id][0]), .bel_ready(b_in_ready[id][0]),
      .cfg(icfg[id]), .skip_cnt(skip_cnt[id]), .tile_loads(tile_loads[id]),
      .jobs_done(jobs_done[id])
    );
    // nothing is addressed to an island on the aggregation plane
    assign b_out_ready[id][0] = 1'b1;

    // ---- Mel: east link (this node side A, east neighbour side B) ----
    if (X < MESH_X - 1) begin : g_mh
      localparam int E = id + 1;
      mel_link u_link (
        .clk, .rst_n, .rev_en(icfg[id].noc_en), .req_a(m_req[id][1]), .req_b(m_req[E][3]),
        .a_out_valid(m_lout_valid[id][1]), .a_out_flit(m_lout_flit[id][1]), .a_out_ready(m_lout_ready[id][1]),
        .a_in_valid(m_lin_valid[id][1]),   .a_in_flit(m_lin_flit[id][1]),   .a_in_pop(m_lin_pop[id][1]),
        .b_out_valid(m_lout_valid[E][3]),  .b_out_flit(m_lout_flit[E][3]),  .b_out_ready(m_lout_ready[E][3]),
        .b_in_valid(m_lin_valid[E][3]),    .b_in_flit(m_lin_flit[E][3]),    .b_in_pop(m_lin_pop[E][3]),
        .rev_cnt()
      );
      // Bel east/west pair
      assign b_in_valid[E][4]  = b_out_valid[id][2];
      assign b_in_flit[E][4]   = b_out_flit[id][2];
      assign b_out_ready[id][2] = b_in_ready[E][4];
      assign b_in_valid[id][2] = b_out_valid[E][4];
      assign b_in_flit[id][2]  = b_out_flit[E][4];
      assign b_out_ready[E][4] = b_in_ready[id][2];
    end else begin : g_eedge
      for (genvar l = 0; l < 2; l++) begin : g_l
        assign m_lin_valid[id][1][l]  = 1'b0;
        assign m_lin_flit[id][1][l]   = '0;
        assign m_lout_ready[id][1][l] = 1'b0;
      end
      assign b_in_valid[id][2]  = 1'b0;
      assign b_in_flit[id][2]   = '0;
      assign b_out_ready[id][2] = 1'b0;
    end

    // ---- Mel: south link (this node side A, south neighbour side B) ----
    if (Y < MESH_Y - 1) begin : g_mv
      localparam int S = id + MESH_X;
      mel_link u_link (
        .clk, .rst_n, .rev_en(icfg[id].noc_en), .req_a(m_req[id][2]), .req_b(m_req[S][0]),
        .a_out_valid(m_lout_valid[id][2]), .a_out_flit(m_lout_flit[id][2]), .a_out_ready(m_lout_ready[id][2]),
        .a_in_valid(m_lin_valid[id][2]),   .a_in_flit(m_lin_flit[id][2]),   .a_in_pop(m_lin_pop[id][2]),
        .b_out_valid(m_lout_valid[S][0]),  .b_out_flit(m_lout_flit[S][0]),  .b_out_ready(m_lout_ready[S][0]),
        .b_in_valid(m_lin_valid[S][0]),    .b_in_flit(m_lin_flit[S][0]),    .b_in_pop(m_lin_pop[S][0]),
        .rev_cnt()
      );
      assign b_in_valid[S][1]  = b_out_valid[id][3];
      assign b_in_flit[S][1]   = b_out_flit[id][3];
      assign b_out_ready[id][3] = b_in_ready[S][1];
      assign b_in_valid[id][3] = b_out_valid[S][1];
      assign b_in_flit[id][3]  = b_out_flit[S][1];
      assign b_out_ready[S][1] = b_in_ready[id][3];
    end else begin : g_sedge
      for (genvar l = 0; l < 2; l++) begin : g_l
        assign m_lin_valid[id][2][l]  = 1'b0;
        assign m_lin_flit[id][2][l]   = '0;
        assign m_lout_ready[id][2][l] = 1'b0;
      end
      assign b_in_valid[id][3]  = 1'b0;
      assign b_in_flit[id][3]   = '0;
      assign b_out_ready[id][3] = 1'b0;
    end

    // ---- north edge ----
    if (Y == 0) begin : g_nedge
      for (genvar l = 0; l < 2; l++) begin : g_l
        assign m_lin_valid[id][0][l]  = 1'b0;
        assign m_lin_flit[id][0][l]   = '0;
        assign m_lout_ready[id][0][l] = 1'b0;
      end
      assign b_in_valid[id][1]  = 1'b0;
      assign b_in_flit[id][1]   = '0;
      assign b_out_ready[id][1] = 1'b0;
    end

    // ---- west edge: Bel exits to the control unit, Mel entry at the corner ----
    if (X == 0) begin : g_wedge
      assign rx_valid[Y]        = b_out_valid[id][4];
      assign rx_flit[Y]         = b_out_flit[id][4];
      assign b_out_ready[id][4] = rx_ready[Y];
      assign b_in_valid[id][4]  = 1'b0;
      assign b_in_flit[id][4]   = '0;
      if (Y == 0) begin : g_entry
        logic      e_in_valid [2];
        mel_flit_t e_in_flit  [2];
        logic      e_pop      [2];
        assign e_pop[0] = 1'b0;
        assign e_pop[1] = 1'b0;
        mel_link u_entry (
          .clk, .rst_n, .rev_en(icfg[0].noc_en), .req_a(tx_req), .req_b(m_req[0][3]),
          .a_out_valid(tx_valid), .a_out_flit(tx_flit), .a_out_ready(tx_ready),
          .a_in_valid(e_in_valid), .a_in_flit(e_in_flit), .a_in_pop(e_pop),
          .b_out_valid(m_lout_valid[0][3]), .b_out_flit(m_lout_flit[0][3]), .b_out_ready(m_lout_ready[0][3]),
          .b_in_valid(m_lin_valid[0][3]),   .b_in_flit(m_lin_flit[0][3]),   .b_in_pop(m_lin_pop[0][3]),
          .rev_cnt(entry_rev_cnt)
        );
      end else begin : g_wm
        for (genvar l = 0; l < 2; l++) begin : g_l
          assign m_lin_valid[id][3][l]  = 1'b0;
          assign m_lin_flit[id][3][l]   = '0;
          assign m_lout_ready[id][3][l] = 1'b0;
        end
      end
    end
  end
endmodule
