// flit_fifo: the router's input and output flit buffer together with its FIFO
// controller (read/write pointers and occupancy count). DEPTH defaults to the
// 8 flit slots of the published router; WIDTH is the 55-bit internal flit.
// Show-ahead: rd_data is the oldest entry whenever empty is low. A push while
// full and a pop while empty are ignored; push and pop in the same cycle are
// both done. Writes land at the clock edge, so a flit pushed in cycle t can be
// popped from cycle t+1. Synchronous active-low reset empties the buffer.
module flit_fifo #(
  parameter int DEPTH = 8,
  parameter int WIDTH = noc_pkg::IFLIT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;
  logic             do_wr, do_rd;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk)
    if (do_wr) mem[wr_ptr] <= wr_data;

`ifndef SYNTHESIS
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
`endif
endmodule
