// expert_reorder: workload reordering and grouping of tokens by expert.
//
// Given the first-choice expert of each of n tokens, it produces a dispatch
// order in which the tokens are grouped by expert (expert 0's tokens first),
// keeping the original order inside a group. This lets an island that hosts an
// expert receive its tokens back to back, keeping its stationary weights in use.
// It is a counting sort in three phases: a histogram pass (one token per cycle),
// one cycle of exclusive prefix sums, and a placement pass (one token per cycle).
// Timing: done pulses in the (2n+4)-th cycle, counting the cycle in which start
// is high as the first; `order` holds the result until the next start. Grouping tokens by expert follows the design description; the
// counting sort is this implementation's choice.
module expert_reorder
  import monet_pkg::*;
#(
  parameter int TOKENS = 16,
  parameter int E      = NUM_EXPERTS
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               start,
  input  logic [$clog2(TOKENS+1)-1:0]        n_tok,
  input  logic [TOKENS-1:0][$clog2(E)-1:0]   exp_id,
  output logic                               done,
  output logic [TOKENS-1:0][$clog2(TOKENS)-1:0] order
);
  localparam int TW = $clog2(TOKENS);
  localparam int CW = $clog2(TOKENS+1);
  typedef enum logic [1:0] {S_IDLE, S_HIST, S_PREFIX, S_PLACE} state_e;

  state_e st;
  logic [CW-1:0] t, n;
  logic [TOKENS-1:0][$clog2(E)-1:0] ids;
  logic [CW-1:0] cnt [E];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; t <= '0; n <= '0; ids <= '0; done <= 1'b0; order <= '0;
      for (int e = 0; e < E; e++) cnt[e] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          ids <= exp_id; n <= n_tok; t <= '0;
          for (int e = 0; e < E; e++) cnt[e] <= '0;
          st <= S_HIST;
        end
        S_HIST: begin
          if (t == n) st <= S_PREFIX;
          else begin
            cnt[ids[t[TW-1:0]]] <= cnt[ids[t[TW-1:0]]] + 1'b1;
            t <= t + 1'b1;
          end
        end
        S_PREFIX: begin
          logic [CW-1:0] run;
          run = '0;
          for (int e = 0; e < E; e++) begin
            cnt[e] <= run;
            run = run + cnt[e];
          end
          t  <= '0;
          st <= S_PLACE;
        end
        S_PLACE: begin
          if (t == n) begin st <= S_IDLE; done <= 1'b1; end
          else begin
            order[cnt[ids[t[TW-1:0]]][TW-1:0]] <= t[TW-1:0];
            cnt[ids[t[TW-1:0]]] <= cnt[ids[t[TW-1:0]]] + 1'b1;
            t <= t + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
