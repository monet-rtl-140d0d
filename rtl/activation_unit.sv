// activation_unit: activation function applied to a systolic-array result vector.
//
// Modes: pass-through (gating logits), ReLU, or a GELU approximation. The GELU
// approximation used is x * clamp(x + 3, 0, 6) / 6 (the "hard" sigmoid form), in
// Q8.8: the Q16.16 product is multiplied by 43/256 (about 1/6) and shifted back
// to Q8.8, rounding toward minus infinity, then saturated. Interface: a vector
// with a valid bit in, the same out one cycle later (one register stage). That
// the unit offers ReLU and an approximated GELU follows the design description;
// the particular approximation and its constants are this implementation's.
module activation_unit
  import monet_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic bypass,     // 1: no activation (gating logits)
  input  logic gelu,       // 1: GELU approximation, 0: ReLU
  input  logic in_valid,
  input  vec_t in_vec,
  input  logic [TAG_W-1:0] in_tag,
  output logic out_valid,
  output vec_t out_vec,
  output logic [TAG_W-1:0] out_tag
);
  localparam logic signed [DATA_W:0] THREE = 17'sd768;   // 3.0 in Q8.8
  localparam logic signed [DATA_W:0] SIX   = 17'sd1536;  // 6.0 in Q8.8

  function automatic data_t gelu_approx(input data_t x);
    logic signed [DATA_W:0]   t;
    logic signed [47:0]       p;
    t = (DATA_W+1)'(x) + THREE;
    if (t < 0)   t = '0;
    if (t > SIX) t = SIX;
    p = 48'(x) * 48'(t) * 48'sd43;
    return sat16(p >>> 16);
  endfunction

  vec_t f;
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      if (bypass)    f[l] = in_vec[l];
      else if (gelu) f[l] = gelu_approx(in_vec[l]);
      else           f[l] = in_vec[l][DATA_W-1] ? '0 : in_vec[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_vec <= '0; out_tag <= '0;
    end else begin
      out_valid <= in_valid;
      out_vec   <= f;
      out_tag   <= in_tag;
    end
  end
endmodule
