// lu_top: parallel sparse LU numeric factorization engine.
//
// NUM_PE processing elements each own a slice of the matrix in their own
// on-chip cache (distributed shared memory) and factorize the columns they
// own, column k on PE (k mod NUM_PE). A global PE controller hands out the
// columns and tells every PE when an earlier column it needs is finished. A
// fully connected switch lets each PE read the finished L columns held in the
// other PEs' caches, and carries the host driver port, through which the host
// writes the pre-processed matrix (after static pivoting and symbolic
// analysis, in compressed column storage with fill-ins present) into the
// caches before a run and reads L and U back after it. Each PE works through
// a column in sections of SEC_ROWS rows, so its CAM has SEC_ROWS words
// whatever the matrix dimension (up to N_MAX).
// Host sequence: write entries and column descriptors of every PE's cache
// (drv_we), give n_cols and pulse start, wait for done, read the caches back
// (drv_rd_*). With the same nonzero structure, new values can be written and
// the matrix factorized again. cycles reports the length of the last run.
// Port timing: drv_rd_* is a hold-until-ready request; drv_rsp arrives one
// clock after the clock with drv_rd_ready.
// From the document: PEs with their own caches, the PE controller on a
// control bus, the fully connected switch with the driver port, 16 PEs, the
// sectioned column processing. This design's choices: round-robin column
// ownership with run-time dependency checks in place of elimination-tree
// scheduling, the descriptor layout, the statistics outputs, and the sizes
// N_MAX, CACHE_DEPTH, SEC_ROWS and COL_MAX.
module lu_top
  import lu_pkg::*;
#(
  parameter int NUM_PE      = 16,
  parameter int N_MAX       = 8192,   // largest matrix dimension
  parameter int CACHE_DEPTH = 8192,   // nonzeros of L+U per PE cache
  parameter int SEC_ROWS    = 256,    // rows per section of a column
  parameter int COL_MAX     = 1024,   // nonzeros of one section of a column
  localparam int TW = (NUM_PE > 1) ? $clog2(NUM_PE) : 1,
  localparam int CW = ROW_W + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // run control
  input  logic          start,
  input  logic [CW-1:0] n_cols,
  output logic          busy,
  output logic          done,
  output logic [31:0]   cycles,
  // host driver port
  input  logic          drv_we,
  input  logic [TW-1:0] drv_tgt,
  input  wr_req_t       drv_wr,
  input  logic          drv_rd_valid,
  input  logic [TW-1:0] drv_rd_tgt,
  input  rd_req_t       drv_rd,
  output logic          drv_rd_ready,
  output logic          drv_rsp_valid,
  output rd_rsp_t       drv_rsp,
  // status
  output phase_e        phase [NUM_PE],
  output logic          err_cam_miss,
  output logic          err_zero_pivot,
  output logic [31:0]   dep_wait_cycles [NUM_PE],
  output logic [31:0]   remote_reads [NUM_PE],
  output logic [31:0]   local_reads [NUM_PE],
  output logic [31:0]   mac_ops [NUM_PE],
  output logic [31:0]   extra_sections [NUM_PE],
  output logic [31:0]   sw_wait_cycles
);

  localparam int NR = NUM_PE + 1;
  localparam int DESC_DEPTH = (N_MAX + NUM_PE - 1) / NUM_PE;

  logic    run;
  logic    pe_req [NUM_PE], assign_valid [NUM_PE], col_done [NUM_PE], qry_ready [NUM_PE];
  row_t    assign_col [NUM_PE], qry_col [NUM_PE];
  logic    loc_re [NUM_PE], pe_we [NUM_PE], ext_re [NUM_PE], sw_we [NUM_PE];
  rd_req_t loc_rd [NUM_PE], ext_rd [NUM_PE];
  rd_rsp_t loc_rsp [NUM_PE], ext_rsp [NUM_PE];
  wr_req_t pe_wr [NUM_PE], sw_wr [NUM_PE];
  logic          req_valid [NR], req_ready [NR], rsp_valid [NR];
  logic [TW-1:0] req_tgt [NR];
  rd_req_t       req [NR];
  rd_rsp_t       rsp [NR];
  logic          miss [NUM_PE], zpiv [NUM_PE];

  pe_controller #(.NUM_PE(NUM_PE)) u_ctrl (
    .clk, .rst_n, .start, .n_cols, .busy, .done, .cycles, .run,
    .pe_req, .assign_valid, .assign_col, .col_done, .qry_col, .qry_ready
  );

  lu_switch #(.NUM_PE(NUM_PE)) u_sw (
    .clk, .rst_n,
    .req_valid, .req_tgt, .req, .req_ready, .rsp_valid, .rsp,
    .drv_we, .drv_tgt, .drv_wr,
    .ext_re, .ext_rd, .ext_rsp, .sw_we, .sw_wr,
    .wait_cycles(sw_wait_cycles)
  );

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    proc_element #(.NUM_PE(NUM_PE), .PE_ID(p), .SEC_ROWS(SEC_ROWS), .COL_MAX(COL_MAX)) u_pe (
      .clk, .rst_n, .run,
      .pe_req(pe_req[p]), .assign_valid(assign_valid[p]), .assign_col(assign_col[p]),
      .col_done(col_done[p]), .qry_col(qry_col[p]), .qry_ready(qry_ready[p]),
      .loc_re(loc_re[p]), .loc_rd(loc_rd[p]), .loc_rsp(loc_rsp[p]),
      .pe_we(pe_we[p]), .pe_wr(pe_wr[p]),
      .sw_req_valid(req_valid[p]), .sw_req_tgt(req_tgt[p]), .sw_req(req[p]),
      .sw_req_ready(req_ready[p]), .sw_rsp_valid(rsp_valid[p]), .sw_rsp(rsp[p]),
      .phase(phase[p]), .err_cam_miss(miss[p]), .err_zero_pivot(zpiv[p]),
      .dep_wait_cycles(dep_wait_cycles[p]), .remote_reads(remote_reads[p]),
      .local_reads(local_reads[p]), .mac_ops(mac_ops[p]),
      .extra_sections(extra_sections[p])
    );

    onchip_cache #(.DEPTH(CACHE_DEPTH), .DESC_DEPTH(DESC_DEPTH)) u_cache (
      .clk,
      .pe_we(pe_we[p]), .pe_wr(pe_wr[p]),
      .sw_we(sw_we[p]), .sw_wr(sw_wr[p]),
      .loc_re(loc_re[p]), .loc_rd(loc_rd[p]), .loc_rsp(loc_rsp[p]),
      .ext_re(ext_re[p]), .ext_rd(ext_rd[p]), .ext_rsp(ext_rsp[p])
    );
  end

  // driver is the last requester of the switch
  assign req_valid[NUM_PE] = drv_rd_valid;
  assign req_tgt[NUM_PE]   = drv_rd_tgt;
  assign req[NUM_PE]       = drv_rd;
  assign drv_rd_ready      = req_ready[NUM_PE];
  assign drv_rsp_valid     = rsp_valid[NUM_PE];
  assign drv_rsp           = rsp[NUM_PE];

  always_comb begin
    err_cam_miss   = 1'b0;
    err_zero_pivot = 1'b0;
    for (int p = 0; p < NUM_PE; p++) begin
      err_cam_miss   |= miss[p];
      err_zero_pivot |= zpiv[p];
    end
  end

endmodule
