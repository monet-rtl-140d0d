// pe: one processing element of the weight-stationary systolic array.
//
// The PE holds one stationary weight. Each cycle it registers the activation
// arriving from its left neighbour (passed on to the right) and adds
// weight x activation to the partial sum arriving from above (passed on below).
// In sparse mode a multiply whose activation or weight is zero is skipped: the
// partial sum is forwarded unchanged and `skip` is raised for that cycle, which
// the array counts. Dense and sparse mode give the same sums. Timing: one
// register stage on both the activation and partial-sum paths. The weight-
// stationary dataflow and the sparse/dense mode follow the design description;
// zero skipping as the sparse mechanism is this implementation's choice.
module pe
  import monet_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    w_load,     // load w_in as the stationary weight
  input  data_t                   w_in,
  input  logic                    sparse,     // skip zero multiplies
  input  logic                    x_valid_in,
  input  data_t                   x_in,
  input  logic signed [ACC_W-1:0] psum_in,
  output logic                    x_valid_out,
  output data_t                   x_out,
  output logic signed [ACC_W-1:0] psum_out,
  output logic                    skip
);
  data_t w;
  logic  zero_op;
  logic signed [2*DATA_W-1:0] prod;

  assign zero_op = (x_in == '0) || (w == '0);
  assign prod    = x_in * w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w <= '0; x_out <= '0; x_valid_out <= 1'b0; psum_out <= '0; skip <= 1'b0;
    end else begin
      if (w_load) w <= w_in;
      x_out       <= x_in;
      x_valid_out <= x_valid_in;
      skip        <= x_valid_in && sparse && zero_op;
      if (sparse && zero_op) psum_out <= psum_in;
      else                   psum_out <= psum_in + ACC_W'(prod);
    end
  end
endmodule
