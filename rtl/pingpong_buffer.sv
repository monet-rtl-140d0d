// pingpong_buffer: double-buffered SRAM used as the input buffer and the weight
// buffer of a PE island.
//
// Two banks of DEPTH words. The network side writes the write bank while the
// systolic array reads the read bank, so data movement overlaps computation.
// `swap` exchanges the roles of the banks: the filled write bank becomes the read
// bank, its fill count is latched as rd_count, and the new write bank starts
// empty. wr_count counts writes into the current write bank. Reads are
// combinational from the read bank (register-file style). Double buffering of the
// input and weight SRAMs follows the design description; the swap protocol and
// the fill counters are this implementation's choice.
module pingpong_buffer #(
  parameter int WIDTH = 128,
  parameter int DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [$clog2(DEPTH)-1:0]   wr_addr,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       swap,
  input  logic [$clog2(DEPTH)-1:0]   rd_addr,
  output logic [WIDTH-1:0]           rd_data,
  output logic [$clog2(DEPTH+1)-1:0] wr_count,
  output logic [$clog2(DEPTH+1)-1:0] rd_count,
  output logic                       wr_bank   // bank currently written
);
  logic [WIDTH-1:0] mem [2][DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_bank][wr_addr] <= wr_data;
  end

  assign rd_data = mem[!wr_bank][rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank <= 1'b0; wr_count <= '0; rd_count <= '0;
    end else if (swap) begin
      wr_bank  <= !wr_bank;
      rd_count <= wr_count + $bits(wr_count)'(wr_en);
      wr_count <= '0;
    end else if (wr_en) begin
      wr_count <= wr_count + 1'b1;
    end
  end
endmodule
