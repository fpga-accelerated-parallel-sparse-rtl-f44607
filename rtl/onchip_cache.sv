// onchip_cache: the distributed on-chip cache of one PE, a tri-port RAM.
//
// It stores this PE's share of the matrix in compressed column storage: an
// entry array of {row, value} words and a descriptor array with one
// {start, diag, fin} word per column owned by the PE. Following the
// tri-port organisation of the cache, there is one write port and one read
// port for the local PE and a second read port for the switch, through which
// other PEs and the host driver read. The write port is shared: the driver
// writes through the switch while the matrix is loaded, and the PE writes
// finished columns back; the two never write in the same clock (checked by an
// assertion), and the PE's write wins if they did. Each read port reads both
// arrays at the address given, so a response carries an entry and a
// descriptor and the requester uses the one it asked for.
// Timing: synchronous reads, data one clock after the read enable.
module onchip_cache
  import lu_pkg::*;
#(
  parameter int DEPTH      = 8192,   // entries
  parameter int DESC_DEPTH = 512     // columns owned by this PE
) (
  input  logic    clk,
  // write from the local PE
  input  logic    pe_we,
  input  wr_req_t pe_wr,
  // write from the switch (driver)
  input  logic    sw_we,
  input  wr_req_t sw_wr,
  // local read port
  input  logic    loc_re,
  input  rd_req_t loc_rd,
  output rd_rsp_t loc_rsp,
  // external read port, to the switch
  input  logic    ext_re,
  input  rd_req_t ext_rd,
  output rd_rsp_t ext_rsp
);

  localparam int EAW = $clog2(DEPTH);
  localparam int DAW = $clog2(DESC_DEPTH);

  entry_t ent_mem [DEPTH];
  desc_t  dsc_mem [DESC_DEPTH];

  logic    we;
  wr_req_t wr;
  assign we = pe_we | sw_we;
  assign wr = pe_we ? pe_wr : sw_wr;

  always_ff @(posedge clk) begin
    if (we) begin
      if (wr.is_desc) dsc_mem[wr.addr[DAW-1:0]] <= wr.desc;
      else            ent_mem[wr.addr[EAW-1:0]] <= wr.entry;
    end
  end

  always_ff @(posedge clk) begin
    if (loc_re) begin
      loc_rsp.entry <= ent_mem[loc_rd.addr[EAW-1:0]];
      loc_rsp.desc  <= dsc_mem[loc_rd.addr[DAW-1:0]];
    end
    if (ext_re) begin
      ext_rsp.entry <= ent_mem[ext_rd.addr[EAW-1:0]];
      ext_rsp.desc  <= dsc_mem[ext_rd.addr[DAW-1:0]];
    end
  end

  a_one_writer: assert property (@(posedge clk) !(pe_we && sw_we))
    else $error("onchip_cache: PE and driver wrote in the same clock");

endmodule
