// mel_router: multicast-enabled link-reversal (Mel) router of the token/weight
// distribution plane.
//
// Each flit carries a destination bitmap over all islands. The router forwards a
// flit to every output whose part of the mesh holds a destination, in the same
// cycle when those outputs are free (in-router replication, no central
// replication unit). Routing is a Y-then-X multicast tree: destinations in other
// rows leave north or south, destinations in this row leave east or west, and
// this island's bit goes to the local port. Each copy carries only the
// destinations of its own subtree, so no island receives a flit twice. When only
// some of the needed outputs are free, the free ones are served and the rest are
// remembered per input (done mask); the input is released when all have been
// served.
// Ports: towards each neighbour (N, E, S, W) two lanes of a reversible mel_link;
// a lane is read when it points into the router and written when it points out.
// req[d] tells the link that a waiting flit needs direction d, which is how a
// link decides to turn a lane around. The local port has an injection FIFO and
// a registered ejection port. Inputs are served in round-robin order.
// Timing: a flit at the head of an inbound lane is written into the next link
// (or the ejection register) in the same cycle, so a hop takes one cycle plus
// the link buffer. Multicast replication, reversible links and the local-PE
// path follow the design description; the routing tree, the bitmap format and
// the partial-service rule are this implementation's choices.
module mel_router
  import monet_pkg::*;
#(
  parameter int X_ID = 0,
  parameter int Y_ID = 0,
  parameter int INJ_DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // neighbour lanes: direction 0 N, 1 E, 2 S, 3 W; two lanes each
  input  logic       lin_valid  [4][2],
  input  mel_flit_t  lin_flit   [4][2],
  output logic       lin_pop    [4][2],
  output logic       lout_valid [4][2],
  output mel_flit_t  lout_flit  [4][2],
  input  logic       lout_ready [4][2],
  output logic       req        [4],
  // local injection
  input  logic       inj_valid,
  input  mel_flit_t  inj_flit,
  output logic       inj_ready,
  // local ejection
  output logic       ej_valid,
  output mel_flit_t  ej_flit,
  input  logic       ej_ready,
  output logic [15:0] mcast_cnt
);
  localparam int NS = 9;                  // 8 lanes + local
  localparam int ME = Y_ID * MESH_X + X_ID;

  // destination subsets per output port: 0 L, 1 N, 2 E, 3 S, 4 W
  function automatic logic [NODES-1:0] port_mask(input int p);
    logic [NODES-1:0] m;
    m = '0;
    for (int j = 0; j < NODES; j++) begin
      int jx, jy;
      jx = j % MESH_X; jy = j / MESH_X;
      unique case (p)
        0: m[j] = (j == ME);
        1: m[j] = (jy < Y_ID);
        2: m[j] = (jy == Y_ID) && (jx > X_ID);
        3: m[j] = (jy > Y_ID);
        default: m[j] = (jy == Y_ID) && (jx < X_ID);
      endcase
    end
    return m;
  endfunction

  localparam logic [4:0][NODES-1:0] PMASK = {port_mask(4), port_mask(3), port_mask(2),
                                              port_mask(1), port_mask(0)};

  function automatic logic [4:0] need_of(input logic [NODES-1:0] dest);
    logic [4:0] n;
    for (int p = 0; p < 5; p++) n[p] = |(dest & PMASK[p]);
    return n;
  endfunction

  // local injection FIFO
  logic      q_valid, q_pop;
  mel_flit_t q_flit;
  sync_fifo #(.T(mel_flit_t), .DEPTH(INJ_DEPTH)) u_inj (
    .clk, .rst_n,
    .in_valid (inj_valid), .in_ready (inj_ready), .in_data (inj_flit),
    .out_valid(q_valid), .out_ready(q_pop), .out_data(q_flit), .count()
  );

  // sources
  logic      s_valid [NS];
  mel_flit_t s_flit  [NS];
  always_comb begin
    for (int s = 0; s < 8; s++) begin
      s_valid[s] = lin_valid[s/2][s%2];
      s_flit[s]  = lin_flit[s/2][s%2];
    end
    s_valid[8] = q_valid;
    s_flit[8]  = q_flit;
  end

  logic [4:0] done_q [NS];
  logic [4:0] done_d [NS];
  logic       s_pop  [NS];
  logic [3:0] rr;
  logic       ej_load;
  mel_flit_t  ej_next;
  logic       ej_free;
  logic       multi;

  assign ej_free = !ej_valid || ej_ready;

  always_comb begin
    logic       lane_taken [4][2];
    logic       loc_taken;
    for (int d = 0; d < 4; d++)
      for (int l = 0; l < 2; l++) begin
        lane_taken[d][l] = 1'b0;
        lout_valid[d][l] = 1'b0;
        lout_flit[d][l]  = '0;
      end
    loc_taken = 1'b0;
    ej_load   = 1'b0;
    ej_next   = '0;
    multi     = 1'b0;
    for (int s = 0; s < NS; s++) begin
      s_pop[s]  = 1'b0;
      done_d[s] = done_q[s];
    end
    for (int i = 0; i < NS; i++) begin
      int s;
      logic [4:0] need, got;
      s = (int'(rr) + i) % NS;
      need = need_of(s_flit[s].dest);
      got  = '0;
      if (s_valid[s]) begin
        for (int p = 0; p < 5; p++) begin
          if (need[p] && !done_q[s][p]) begin
            if (p == 0) begin
              if (!loc_taken && ej_free) begin
                loc_taken = 1'b1; got[0] = 1'b1; ej_load = 1'b1;
                ej_next = s_flit[s];
                ej_next.dest = s_flit[s].dest & PMASK[0];
              end
            end else begin
              for (int l = 0; l < 2; l++) begin
                if (!got[p] && !lane_taken[p-1][l] && lout_ready[p-1][l]) begin
                  lane_taken[p-1][l] = 1'b1; got[p] = 1'b1;
                  lout_valid[p-1][l] = 1'b1;
                  lout_flit[p-1][l]  = s_flit[s];
                  lout_flit[p-1][l].dest = s_flit[s].dest & PMASK[p];
                end
              end
            end
          end
        end
        if ($countones(got) > 1) multi = 1'b1;
        if (((got | done_q[s]) & need) == need) begin
          s_pop[s]  = 1'b1;
          done_d[s] = '0;
        end else begin
          done_d[s] = done_q[s] | got;
        end
      end
    end
  end

  // requests towards the links: some waiting flit still needs direction d
  always_comb begin
    for (int d = 0; d < 4; d++) req[d] = 1'b0;
    for (int s = 0; s < NS; s++) begin
      logic [4:0] need;
      need = need_of(s_flit[s].dest) & ~done_q[s];
      if (s_valid[s])
        for (int d = 0; d < 4; d++) if (need[d+1]) req[d] = 1'b1;
    end
  end

  always_comb begin
    for (int s = 0; s < 8; s++) lin_pop[s/2][s%2] = s_pop[s];
    q_pop = s_pop[8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0; ej_valid <= 1'b0; ej_flit <= '0; mcast_cnt <= '0;
      for (int s = 0; s < NS; s++) done_q[s] <= '0;
    end else begin
      rr <= (rr == 4'(NS - 1)) ? '0 : rr + 1'b1;
      for (int s = 0; s < NS; s++) done_q[s] <= done_d[s];
      if (ej_load) begin
        ej_valid <= 1'b1; ej_flit <= ej_next;
      end else if (ej_ready) begin
        ej_valid <= 1'b0;
      end
      if (multi) mcast_cnt <= mcast_cnt + 1'b1;
    end
  end
endmodule
