// cam_index: the content-addressed index of a PE's column buffer.
//
// Given the row index i of a nonzero, it returns in one clock the address of
// that nonzero in the column buffer. It is built as a table of DEPTH words
// indexed by the low bits of the row (DEPTH = n indexes a whole column,
// DEPTH = section length indexes one aligned section), each word holding the
// buffer address, a tag naming the column and section that wrote it, and a
// valid bit. A lookup hits only if the word was written for the tag given
// with the lookup, so moving to the next column or section needs no
// clearing. After reset the table
// clears its valid bits itself, one word per clock (init_busy high for DEPTH
// clocks); writes and lookups must wait for that.
// Timing: write in one clock; lookup result (hit, addr) one clock after
// lk_en, for the column tag given with the lookup.
module cam_index
  import lu_pkg::*;
#(
  parameter int DEPTH = 256,     // rows indexed (n, or the section length)
  parameter int TAG_W = 2 * ROW_W
) (
  input  logic  clk,
  input  logic  rst_n,
  output logic  init_busy,
  input  logic  wr_en,
  input  row_t  wr_row,
  input  logic [TAG_W-1:0] wr_tag,
  input  addr_t wr_addr,
  input  logic  lk_en,
  input  row_t  lk_row,
  input  logic [TAG_W-1:0] lk_tag,
  output logic  lk_hit,
  output addr_t lk_addr
);

  localparam int AW = $clog2(DEPTH);

  typedef struct packed {
    logic  valid;
    logic [TAG_W-1:0] tag;
    addr_t addr;
  } cam_word_t;

  cam_word_t mem [DEPTH];
  logic [AW:0] clr_q;
  logic [TAG_W-1:0] tag_q;
  cam_word_t   rd_q;

  assign init_busy = !clr_q[AW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clr_q <= '0;
    else if (!clr_q[AW]) clr_q <= clr_q + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!clr_q[AW])  mem[clr_q[AW-1:0]] <= '0;
    else if (wr_en)  mem[wr_row[AW-1:0]] <= '{valid: 1'b1, tag: wr_tag, addr: wr_addr};
    if (lk_en) begin
      rd_q  <= mem[lk_row[AW-1:0]];
      tag_q <= lk_tag;
    end
  end

  assign lk_hit  = rd_q.valid && (rd_q.tag == tag_q);
  assign lk_addr = rd_q.addr;

endmodule
