// aggregator: output aggregation unit combining the results of the selected
// experts of each token.
//
// For token t it forms y_t = sum_i w_i * E_i(x_t) over the k experts chosen by
// the gating, where w_i are the softmax weights (Q1.16) and E_i(x_t) the expert
// result vectors (Q8.8). `start` opens token <start_tag> expecting <start_k>
// results and clears its accumulators; each in_valid adds one weighted vector
// (products kept at full Q.24 precision). When the k-th result of a token has
// been added, out_valid pulses in the next cycle with the token's tag and the
// Q8.8 sum (rounded toward minus infinity, saturated). Results may arrive in any
// order and interleaved across tokens. The weighted combination follows the
// document's equation for the MoE output; the per-token accumulator table and the
// counting protocol are this implementation's.
module aggregator
  import monet_pkg::*;
#(
  parameter int TOKENS = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [TAG_W-1:0]     start_tag,
  input  logic [2:0]           start_k,
  input  logic                 in_valid,
  input  logic [TAG_W-1:0]     in_tag,
  input  logic [16:0]          in_w,
  input  vec_t                 in_vec,
  output logic                 out_valid,
  output logic [TAG_W-1:0]     out_tag,
  output vec_t                 out_vec
);
  localparam int TW = $clog2(TOKENS);
  typedef logic signed [47:0] acc_t;

  acc_t       acc  [TOKENS][LANES];
  logic [2:0] left [TOKENS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < TOKENS; t++) begin
        left[t] <= '0;
        for (int l = 0; l < LANES; l++) acc[t][l] <= '0;
      end
      out_valid <= 1'b0; out_tag <= '0; out_vec <= '0;
    end else begin
      out_valid <= 1'b0;
      if (start) begin
        left[start_tag[TW-1:0]] <= start_k;
        for (int l = 0; l < LANES; l++) acc[start_tag[TW-1:0]][l] <= '0;
      end
      if (in_valid) begin
        logic [TW-1:0] t;
        t = in_tag[TW-1:0];
        for (int l = 0; l < LANES; l++) begin
          acc_t s;
          s = acc[t][l] + 48'(in_vec[l]) * 48'(signed'({1'b0, in_w}));
          acc[t][l] <= s;
          out_vec[l] <= sat16(s >>> 16);
        end
        left[t] <= left[t] - 1'b1;
        if (left[t] == 3'd1) begin
          out_valid <= 1'b1;
          out_tag   <= in_tag;
        end
      end
    end
  end

  // a result must belong to an open token
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> left[in_tag[TW-1:0]] != '0);
endmodule
