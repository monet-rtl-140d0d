// global_buffer: on-chip global buffer between external memory and the PE
// islands.
//
// A two-port SRAM of DEPTH vectors (one vector = LANES Q8.8 values = one flit
// payload). Port A faces external memory (host loads inputs and weights and reads
// back results); port B faces the central control unit, which streams gating
// weights, expert weights and tokens into the network and writes aggregated
// outputs back. Both ports are synchronous: read data appears the cycle after
// the address. A write and a read of the same address in one cycle on different
// ports return the old data. The buffer's role follows the design description;
// its capacity (the document gives only its area) and port arrangement are this
// implementation's.
module global_buffer
  import monet_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic                     clk,
  // port A: external memory side
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  vec_t                     a_wdata,
  output vec_t                     a_rdata,
  // port B: control unit side
  input  logic                     b_en,
  input  logic                     b_we,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  vec_t                     b_wdata,
  output vec_t                     b_rdata
);
  vec_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule
