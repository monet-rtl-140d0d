// sync_fifo: synchronous first-in first-out buffer; used as the output buffer of a
// PE island and as the input buffers of the routers.
//
// Storage is a register array with read and write pointers and an occupancy
// counter. Interface: valid/ready on both sides; the head is visible on
// out_data whenever out_valid is 1 (first-word fall-through). A write and a read
// in the same cycle are both accepted when the FIFO is full or empty respectively
// in the usual way (a full FIFO accepts no write even if it is read). Depth and
// the first-word fall-through style are choices of this implementation.
module sync_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  T mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic push, pop;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];
  assign push = in_valid && in_ready;
  assign pop  = out_valid && out_ready;

  function automatic logic [PW-1:0] nxt(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push) wp <= nxt(wp);
      if (pop)  rp <= nxt(rp);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  // The occupancy never exceeds the depth.
  assert property (@(posedge clk) disable iff (!rst_n) count <= DEPTH[$clog2(DEPTH+1)-1:0]);
endmodule
