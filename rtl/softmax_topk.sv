// softmax_topk: top-k expert selection and softmax approximation of the gating
// logits.
//
// Given N gating logits (Q8.8) and k (1..MAX_K) it finds the k largest logits,
// one per cycle (ties go to the lower expert number), and returns their expert
// numbers in descending order together with the normalised weights
//   w_i = exp(l_i) / sum_{j in top-k} exp(l_j),
// as in the gated sum of experts. exp is approximated as 2^(log2(e) * (l_i -
// l_max)) with a piecewise-linear 2^f ~ 1 + f on the fraction, giving values in
// Q1.16 (1.0 for the largest logit). The weights are Q1.16 (65536 = 1.0),
// computed by one divider used over k cycles. Timing: after `start`, done pulses
// after 2k+1 cycles with the results held until the next start. The top-k
// selection and softmax over the selected experts follow the document's gating
// equation; the base-2 approximation and the sequential schedule are this
// implementation's.
module softmax_topk
  import monet_pkg::*;
#(
  parameter int N    = NUM_EXPERTS,
  parameter int KMAX = MAX_K
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [$clog2(KMAX+1)-1:0]    k,
  input  data_t [N-1:0]                logits,
  output logic                         busy,
  output logic                         done,
  output logic [KMAX-1:0][$clog2(N)-1:0] sel_idx,
  output logic [KMAX-1:0][16:0]        sel_w
);
  localparam int IW = $clog2(N);
  localparam int KW = $clog2(KMAX+1);
  typedef enum logic [1:0] {S_IDLE, S_SEL, S_DIV} state_e;

  state_e          st;
  data_t [N-1:0]   lg;
  logic  [N-1:0]   taken;
  logic  [KW-1:0]  kk, cnt;
  logic  [KMAX-1:0][16:0] ev;
  logic  [19:0]    sum;

  // argmax over the logits not taken yet
  logic [IW-1:0] amax;
  always_comb begin
    amax = '0;
    for (int i = N - 1; i >= 0; i--)
      if (!taken[i] && (taken[amax] || lg[i] >= lg[amax])) amax = IW'(i);
  end

  function automatic logic [16:0] exp2_approx(input data_t l, input data_t lmax);
    logic signed [31:0] d, z, q;
    logic [7:0]         f;
    d = 32'(l) - 32'(lmax);          // <= 0, Q8.8
    z = (d * 32'sd369) >>> 8;        // times log2(e), Q8.8
    q = z >>> 8;                     // integer part (<= 0)
    f = z[7:0];                      // fraction
    if (q < -32'sd16) return '0;
    return 17'(({9'd1, f} << 8) >> (-q));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; lg <= '0; taken <= '0; kk <= '0; cnt <= '0; ev <= '0; sum <= '0;
      sel_idx <= '0; sel_w <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          lg <= logits; taken <= '0; cnt <= '0; sum <= '0; ev <= '0;
          kk <= (k == '0) ? KW'(1) : (k > KW'(KMAX) ? KW'(KMAX) : k);
          st <= S_SEL;
        end
        S_SEL: begin
          logic [16:0] e;
          e = exp2_approx(lg[amax], (cnt == '0) ? lg[amax] : lg[sel_idx[0]]);
          taken[amax]  <= 1'b1;
          sel_idx[cnt] <= amax;
          ev[cnt]      <= e;
          sum          <= sum + 20'(e);
          if (cnt == kk - 1'b1) begin cnt <= '0; st <= S_DIV; end
          else cnt <= cnt + 1'b1;
        end
        S_DIV: begin
          sel_w[cnt] <= 17'((36'(ev[cnt]) << 16) / 36'(sum));
          if (cnt == kk - 1'b1) begin st <= S_IDLE; done <= 1'b1; end
          cnt <= cnt + 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
endmodule
