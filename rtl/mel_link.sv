// mel_link: reversible link between two Mel routers (sides A and B).
//
// The link has two lanes, each a small FIFO (the reversible buffer) whose
// direction can be turned around. Lane 0 belongs to A (default direction A->B),
// lane 1 to B (default B->A). A lane is lent to the other side when it is empty,
// nothing is being written into it, its owner has nothing to send across the
// link and the other side has (req_a / req_b); it returns to its owner when it
// is empty and the owner asks for it again, or when reversal is disabled. A
// backlog in one direction therefore gets twice the link bandwidth while the
// other direction is idle. Per side and lane the interface is a write port
// (x_out_*, ready only while the lane points away from that side) and a read
// port (x_in_*, valid only while the lane points towards it). A flit written in
// cycle t can be read in cycle t+1. rev_cnt counts direction changes. Reversible
// links and buffers follow the design description; the two-lane arrangement and
// the lending rule are this implementation's.
module mel_link
  import monet_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rev_en,
  input  logic       req_a,
  input  logic       req_b,
  // side A
  input  logic       a_out_valid [2],
  input  mel_flit_t  a_out_flit  [2],
  output logic       a_out_ready [2],
  output logic       a_in_valid  [2],
  output mel_flit_t  a_in_flit   [2],
  input  logic       a_in_pop    [2],
  // side B
  input  logic       b_out_valid [2],
  input  mel_flit_t  b_out_flit  [2],
  output logic       b_out_ready [2],
  output logic       b_in_valid  [2],
  output mel_flit_t  b_in_flit   [2],
  input  logic       b_in_pop    [2],
  output logic [15:0] rev_cnt
);
  logic dir [2];        // 0: A->B, 1: B->A
  logic [1:0] flip;

  for (genvar l = 0; l < 2; l++) begin : g_lane
    localparam logic HOME = (l == 0) ? 1'b0 : 1'b1;
    logic      push, pop, f_in_ready, f_out_valid;
    mel_flit_t f_in, f_out;
    logic [$clog2(DEPTH+1)-1:0] cnt;
    logic req_own, req_oth;

    assign push = dir[l] ? (b_out_valid[l] && f_in_ready) : (a_out_valid[l] && f_in_ready);
    assign f_in = dir[l] ? b_out_flit[l] : a_out_flit[l];
    assign pop  = dir[l] ? a_in_pop[l] : b_in_pop[l];

    assign a_out_ready[l] = !dir[l] && f_in_ready;
    assign b_out_ready[l] =  dir[l] && f_in_ready;
    assign a_in_valid[l]  =  dir[l] && f_out_valid;
    assign b_in_valid[l]  = !dir[l] && f_out_valid;
    assign a_in_flit[l]   = f_out;
    assign b_in_flit[l]   = f_out;

    sync_fifo #(.T(mel_flit_t), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid (push), .in_ready (f_in_ready), .in_data (f_in),
      .out_valid(f_out_valid), .out_ready(pop), .out_data(f_out),
      .count    (cnt)
    );

    // owner of lane 0 is A, of lane 1 is B
    assign req_own = (l == 0) ? req_a : req_b;
    assign req_oth = (l == 0) ? req_b : req_a;

    always_comb begin
      flip[l] = 1'b0;
      if (cnt == '0 && !push) begin
        if (dir[l] == HOME) flip[l] = rev_en && !req_own && req_oth;
        else                flip[l] = req_own || !rev_en;
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)       dir[l] <= HOME;
      else if (flip[l]) dir[l] <= !dir[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rev_cnt <= '0;
    else        rev_cnt <= rev_cnt + 16'(flip[0]) + 16'(flip[1]);
  end
endmodule
