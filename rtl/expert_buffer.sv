// expert_buffer: the expert-parameter buffer of a PE island.
//
// Holds the weight tiles of the experts hosted on the island: SLOTS tiles of
// ROWS rows each. The configuration's expert parallelism (2, 4, 8 or 16 experts
// per island) sets how many slots are in use; a slot number is taken modulo that
// count, so an island configured for 2 experts uses slots 0 and 1 only.
// Writes come from the network one row at a time; reads are combinational and
// feed the systolic array while it is loaded. The slot count per island follows
// the expert-parallelism options of the configuration table; the storage layout
// and the modulo mapping are this implementation's choice.
module expert_buffer
  import monet_pkg::*;
#(
  parameter int SLOTS = 16,
  parameter int ROWS  = LANES
) (
  input  logic                       clk,
  input  exp_par_e                   exp_par,
  input  logic                       wr_en,
  input  logic [$clog2(SLOTS)-1:0]   wr_slot,
  input  logic [$clog2(ROWS)-1:0]    wr_row,
  input  vec_t                       wr_data,
  input  logic [$clog2(SLOTS)-1:0]   rd_slot,
  input  logic [$clog2(ROWS)-1:0]    rd_row,
  output vec_t                       rd_data
);
  localparam int SW = $clog2(SLOTS);
  vec_t mem [SLOTS][ROWS];
  logic [SW-1:0] mask;

  always_comb begin
    unique case (exp_par)
      EXP_2:   mask = SW'(1);
      EXP_4:   mask = SW'(3);
      EXP_8:   mask = SW'(7);
      default: mask = SW'(15);
    endcase
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_slot & mask][wr_row] <= wr_data;
  end
  assign rd_data = mem[rd_slot & mask][rd_row];
endmodule
