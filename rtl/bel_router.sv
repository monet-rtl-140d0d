// bel_router: bypass-enabled full (Bel) router of the aggregation plane.
//
// A five-port (local, N, E, S, W) router with a 5x5 crossbar. Flits take the
// normal pipeline: input buffer, route computation (RC), a VA stage holding the
// computed output request, and switch allocation (SA, round-robin per output)
// followed by switch traversal into the output register: four cycles from arrival
// to the output register. A flit arriving at an input whose buffer and pipeline
// are empty may take the bypass (express) path instead: its route is computed on
// the fly and, if its output register is free and no pipelined flit or
// lower-numbered bypass candidate wants that output this cycle, it goes straight
// into the output register: one cycle per hop. bypass_en (the configuration's
// NoC flag) enables the express path. Routing: flits marked to_gb travel west and
// leave column 0 through the west port towards the global-buffer side; others
// use X-then-Y dimension-order routing to their destination island.
// Flow control: valid/ready per port; an input is ready while its buffer has
// room. There is one virtual channel per port, so the VA stage only holds the
// output request for SA. The 5x5 crossbar, the RC/VA/SA stages and the bypass
// of them under no contention follow the design description; buffer depth,
// the single virtual channel and the routing function are this implementation's.
module bel_router
  import monet_pkg::*;
#(
  parameter int X_ID  = 0,
  parameter int Y_ID  = 0,
  parameter int DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bypass_en,
  input  logic       in_valid  [5],
  input  bel_flit_t  in_flit   [5],
  output logic       in_ready  [5],
  output logic       out_valid [5],
  output bel_flit_t  out_flit  [5],
  input  logic       out_ready [5],
  output logic [15:0] bypass_cnt
);
  localparam int P = 5;

  function automatic logic [2:0] route(input bel_flit_t f);
    int dx, dy;
    dx = int'(f.dest) % MESH_X;
    dy = int'(f.dest) / MESH_X;
    if (f.to_gb)        return 3'd4;
    else if (dx > X_ID) return 3'd2;
    else if (dx < X_ID) return 3'd4;
    else if (dy < Y_ID) return 3'd1;
    else if (dy > Y_ID) return 3'd3;
    else                return 3'd0;
  endfunction

  // input buffers
  logic      f_valid [P];
  bel_flit_t f_head  [P];
  logic      f_pop   [P];
  logic      f_push  [P];
  logic [$clog2(DEPTH+1)-1:0] f_cnt [P];

  // pipeline registers
  logic      rc_v [P];  bel_flit_t rc_f [P];  logic [2:0] rc_o [P];
  logic      va_v [P];  bel_flit_t va_f [P];  logic [2:0] va_o [P];

  logic       out_free [P];
  logic [2:0] rr_sa    [P];
  logic       sa_gnt   [P];   // per input: VA flit wins SA
  logic       byp      [P];   // per input: arriving flit bypasses
  logic       out_load [P];
  bel_flit_t  out_next [P];
  logic [2:0] byp_n;

  for (genvar p = 0; p < P; p++) begin : g_in
    sync_fifo #(.T(bel_flit_t), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid (f_push[p]), .in_ready (in_ready[p]), .in_data (in_flit[p]),
      .out_valid(f_valid[p]), .out_ready(f_pop[p]), .out_data(f_head[p]),
      .count    (f_cnt[p])
    );
  end

  always_comb begin
    logic out_req [P];
    for (int o = 0; o < P; o++) begin
      out_free[o] = !out_valid[o] || out_ready[o];
      out_req[o]  = 1'b0;
      out_load[o] = 1'b0;
      out_next[o] = '0;
    end
    for (int p = 0; p < P; p++) begin
      sa_gnt[p] = 1'b0;
      byp[p]    = 1'b0;
      if (va_v[p]) out_req[va_o[p]] = 1'b1;
    end
    byp_n = '0;
    // switch allocation: round-robin among VA-stage flits per output
    for (int o = 0; o < P; o++) begin
      for (int i = 0; i < P; i++) begin
        int p;
        p = (int'(rr_sa[o]) + i) % P;
        if (out_free[o] && !out_load[o] && va_v[p] && va_o[p] == 3'(o)) begin
          sa_gnt[p]   = 1'b1;
          out_load[o] = 1'b1;
          out_next[o] = va_f[p];
        end
      end
    end
    // bypass: idle input, uncontended output
    for (int p = 0; p < P; p++) begin
      logic [2:0] o;
      o = route(in_flit[p]);
      if (bypass_en && in_valid[p] && in_ready[p] && f_cnt[p] == '0 && !rc_v[p] && !va_v[p]
          && out_free[o] && !out_req[o] && !out_load[o]) begin
        byp[p]      = 1'b1;
        out_load[o] = 1'b1;
        out_next[o] = in_flit[p];
        byp_n       = byp_n + 1'b1;
      end
    end
    for (int p = 0; p < P; p++) begin
      logic va_free, rc_free;
      f_push[p] = in_valid[p] && !byp[p];
      va_free   = !va_v[p] || sa_gnt[p];
      rc_free   = !rc_v[p] || va_free;
      f_pop[p]  = f_valid[p] && rc_free;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < P; p++) begin
        rc_v[p] <= 1'b0; rc_f[p] <= '0; rc_o[p] <= '0;
        va_v[p] <= 1'b0; va_f[p] <= '0; va_o[p] <= '0;
        out_valid[p] <= 1'b0; out_flit[p] <= '0; rr_sa[p] <= '0;
      end
      bypass_cnt <= '0;
    end else begin
      for (int p = 0; p < P; p++) begin
        // VA stage
        if (!va_v[p] || sa_gnt[p]) begin
          va_v[p] <= rc_v[p];
          va_f[p] <= rc_f[p];
          va_o[p] <= rc_o[p];
        end
        // RC stage
        if (!rc_v[p] || !va_v[p] || sa_gnt[p]) begin
          rc_v[p] <= f_pop[p];
          rc_f[p] <= f_head[p];
          rc_o[p] <= route(f_head[p]);
        end
        // output registers
        if (out_load[p]) begin
          out_valid[p] <= 1'b1;
          out_flit[p]  <= out_next[p];
          rr_sa[p]     <= (rr_sa[p] == 3'(P - 1)) ? '0 : rr_sa[p] + 1'b1;
        end else if (out_ready[p]) begin
          out_valid[p] <= 1'b0;
        end
      end
      bypass_cnt <= bypass_cnt + 16'(byp_n);
    end
  end
endmodule
