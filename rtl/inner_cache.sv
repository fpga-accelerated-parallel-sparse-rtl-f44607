// inner_cache: the column buffer of a PE (row index and value columns).
//
// While a PE factorizes column k it keeps the column's nonzeros here, at the
// positions the CAM maps their row indices to; the update step reads and
// rewrites the values in place. It is a simple dual-port RAM: one write port
// and one synchronous read port (data one clock after rd_en). Its depth
// bounds the nonzeros of one column; the depth is this design's choice.
module inner_cache
  import lu_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic   clk,
  input  logic   we,
  input  addr_t  waddr,
  input  entry_t wdata,
  input  logic   rd_en,
  input  addr_t  raddr,
  output entry_t rdata
);

  localparam int AW = $clog2(DEPTH);

  entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW-1:0]] <= wdata;
    if (rd_en) rdata <= mem[raddr[AW-1:0]];
  end

endmodule
