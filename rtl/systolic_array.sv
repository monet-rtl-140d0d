// systolic_array: the unified weight-stationary systolic array (SA) of a PE island.
//
// ROWS x COLS processing elements. PE[i][j] holds weight W[j][i], so the array
// computes y = W x for a ROWS-element input vector x and a COLS x ROWS matrix W.
// Input element x[i] enters row i from the left, delayed i cycles (input skew);
// partial sums flow down the columns, and column j is delayed COLS-1-j cycles at
// the bottom (output deskew), so a whole result vector leaves at once.
// Interface: weights are loaded one matrix row per cycle (w_load, w_row = j,
// w_vec = W[j][*]); one input vector may be issued per cycle (x_valid, x_vec).
// Timing: the result of a vector issued in cycle t appears on y_valid/y_vec in
// cycle t + ROWS + COLS - 1 (15 cycles for 8x8); throughput one vector per cycle.
// Results are Q8.8, rounded toward minus infinity and saturated. skip_cnt counts
// multiplies skipped in sparse mode. The 8x8 size and weight-stationary dataflow
// follow the design description; skew/deskew and the number format are this
// implementation's.
module systolic_array
  import monet_pkg::*;
#(
  parameter int ROWS = LANES,
  parameter int COLS = LANES
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         sparse,
  input  logic                         w_load,
  input  logic [$clog2(COLS)-1:0]      w_row,
  input  data_t [ROWS-1:0]             w_vec,
  input  logic                         x_valid,
  input  data_t [ROWS-1:0]             x_vec,
  output logic                         y_valid,
  output data_t [COLS-1:0]             y_vec,
  output logic [31:0]                  skip_cnt
);
  localparam int LAT = ROWS + COLS - 1;

  data_t                   xh [ROWS][COLS+1];   // activation entering PE[i][j]
  logic                    vh [ROWS][COLS+1];
  logic signed [ACC_W-1:0] pv [ROWS+1][COLS];   // partial sum entering PE[i][j]
  logic [ROWS*COLS-1:0]    skips;

  // input skew: row i delayed by i cycles
  for (genvar i = 0; i < ROWS; i++) begin : g_skew
    if (i == 0) begin : g_d0
      assign xh[0][0] = x_vec[0];
      assign vh[0][0] = x_valid;
    end else begin : g_dn
      data_t sx [i];
      logic  sv [i];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < i; k++) begin sx[k] <= '0; sv[k] <= 1'b0; end
        end else begin
          sx[0] <= x_vec[i]; sv[0] <= x_valid;
          for (int k = 1; k < i; k++) begin sx[k] <= sx[k-1]; sv[k] <= sv[k-1]; end
        end
      end
      assign xh[i][0] = sx[i-1];
      assign vh[i][0] = sv[i-1];
    end
  end

  for (genvar j = 0; j < COLS; j++) begin : g_top
    assign pv[0][j] = '0;
  end

  for (genvar i = 0; i < ROWS; i++) begin : g_r
    for (genvar j = 0; j < COLS; j++) begin : g_c
      pe u_pe (
        .clk, .rst_n,
        .w_load     (w_load && (w_row == j[$clog2(COLS)-1:0])),
        .w_in       (w_vec[i]),
        .sparse,
        .x_valid_in (vh[i][j]),
        .x_in       (xh[i][j]),
        .psum_in    (pv[i][j]),
        .x_valid_out(vh[i][j+1]),
        .x_out      (xh[i][j+1]),
        .psum_out   (pv[i+1][j]),
        .skip       (skips[i*COLS+j])
      );
    end
  end

  // output deskew: column j delayed by COLS-1-j cycles
  logic signed [ACC_W-1:0] ycol [COLS];
  for (genvar j = 0; j < COLS; j++) begin : g_desk
    localparam int D = COLS - 1 - j;
    if (D == 0) begin : g_d0
      assign ycol[j] = pv[ROWS][j];
    end else begin : g_dn
      logic signed [ACC_W-1:0] sy [D];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < D; k++) sy[k] <= '0;
        end else begin
          sy[0] <= pv[ROWS][j];
          for (int k = 1; k < D; k++) sy[k] <= sy[k-1];
        end
      end
      assign ycol[j] = sy[D-1];
    end
    assign y_vec[j] = sat16(48'(ycol[j] >>> FRAC));
  end

  // valid pipe matching the array latency
  logic [LAT-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LAT-2:0], x_valid};
  end
  assign y_valid = vpipe[LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) skip_cnt <= '0;
    else        skip_cnt <= skip_cnt + 32'($countones(skips));
  end
endmodule
