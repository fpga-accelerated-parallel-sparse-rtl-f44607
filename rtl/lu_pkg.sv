// lu_pkg: types and constants shared by the sparse LU factorization engine.
//
// Matrix values are IEEE-754 single precision words (the precision is this
// design's choice). Row indices and cache addresses are 13 bits wide, enough
// for matrices of up to 8192 rows and 8192 stored nonzeros per PE cache.
// A cache holds two kinds of words: nonzero entries {row, value} in
// compressed column storage, and one column descriptor {start, diag, fin}
// per column, giving the address of the column's first entry, of its
// diagonal entry, and one past its last entry. Entries of a column are stored
// in ascending row order, so the U part precedes the diagonal and the L part
// follows it.
package lu_pkg;

  localparam int ROW_W  = 13;            // row / column index width
  localparam int ADDR_W = 13;            // entry address width in a cache
  localparam int VAL_W  = 32;            // single precision value

  typedef logic [ROW_W-1:0]  row_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [VAL_W-1:0]  fp32_t;

  typedef struct packed {
    row_t  row;
    fp32_t val;
  } entry_t;

  typedef struct packed {
    addr_t start;   // first entry of the column
    addr_t diag;    // the diagonal entry
    addr_t fin;     // one past the last entry
  } desc_t;

  // A read request into a cache: entry array or descriptor array.
  typedef struct packed {
    logic  is_desc;
    addr_t addr;
  } rd_req_t;

  // A read response carries both views; the requester uses the one it asked for.
  typedef struct packed {
    entry_t entry;
    desc_t  desc;
  } rd_rsp_t;

  // A write into a cache (from the driver or from the owning PE).
  typedef struct packed {
    logic   is_desc;
    addr_t  addr;
    entry_t entry;
    desc_t  desc;
  } wr_req_t;

  // Processing Controller phases (state switching diagram of the PE).
  typedef enum logic [2:0] {
    PH_INIT   = 3'd4,   // I: matrix is being loaded into the caches
    PH_IDLE   = 3'd0,   // 0: idle
    PH_LOAD   = 3'd1,   // 1: load column, map its rows into the CAM
    PH_UPDATE = 3'd2,   // 2: update column with earlier columns of L
    PH_NORM   = 3'd3    // 3: normalize L part and dump column back
  } phase_e;

endpackage
