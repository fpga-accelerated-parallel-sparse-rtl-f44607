// proc_element: one processing element (PE), factorizing one column at a time
// with the left-looking, symbolically pre-analysed Gilbert/Peierls scheme,
// section by section.
//
// The host has already placed the column's full predicted nonzero structure
// (entries of A plus zero-valued fill-ins) in this PE's cache, sorted by row.
// To keep the CAM small, the rows are split into aligned sections of SEC_ROWS
// rows and a column is processed one section at a time; sections holding no
// entry of the column are skipped. The PE's Processing Controller runs each
// section through the phases of the state switching diagram:
//   I  wait in the initial state while the matrix is loaded (after reset);
//   0  idle: ask the PE controller for the next column k, or, if column k
//      has sections left, go on with the next one;
//   1  stream the section's entries of column k from the cache into the
//      column buffer (inner cache), one per clock, writing each row's
//      buffer address into the CAM;
//   2  for each U entry x_j = U(j,k) above the diagonal and above the
//      section's end, in ascending row order (taken from the buffer, or from
//      the cache if an earlier section already finished it): wait until
//      column j is finished (dependency stall), read column j's descriptor
//      and scan its L entries (own cache directly, other caches through the
//      switch), skipping rows above the section and stopping below it; for
//      rows inside, find the buffer word via the CAM and do
//      buf[i] = buf[i] - L(i,j) * x_j;
//   3  take the pivot U(k,k) (from the buffer, or kept from the section that
//      held it), divide the section's L entries by it and write the section
//      back to the cache; report the column finished after its last section.
// With SEC_ROWS at least the matrix dimension there is one section per
// column and this is the plain column algorithm.
// Each multiply-subtract takes about five clocks (read, CAM, buffer read,
// multiply, subtract) plus switch waits; each division 28 clocks. Operations
// run one after another; the document gives no schedule, so this simple
// sequential order is this design's choice, as are the counters and error
// flags. A CAM miss (an L row absent from column k's structure, i.e. a wrong
// symbolic analysis) is flagged in err_cam_miss and the update skipped; a
// zero pivot sets err_zero_pivot. SEC_ROWS must be a power of two.
// From the document: the phases and their transitions (state diagram), the
// PE's parts (controller, CAM, inner cache, arithmetic, cache) and the section
// scheme with its update order. This design's choices: aligned sections, the
// pass through idle between sections, the {start, diag, fin} descriptor.
// Interfaces: pe_req/assign_* is a one-clock handshake with the PE
// controller; qry_col/qry_ready is combinational; the own cache answers a
// read one clock after loc_re; a switch read is held until sw_req_ready and
// answered by sw_rsp_valid; pe_we writes in the same clock.
module proc_element
  import lu_pkg::*;
#(
  parameter int NUM_PE   = 16,
  parameter int PE_ID    = 0,
  parameter int SEC_ROWS = 256,    // rows per section (CAM words)
  parameter int COL_MAX  = 1024,   // largest nonzero count of one section of a column
  localparam int TW = (NUM_PE > 1) ? $clog2(NUM_PE) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  // control bus to the PE controller
  output logic          pe_req,
  input  logic          assign_valid,
  input  row_t          assign_col,
  output logic          col_done,
  output row_t          qry_col,
  input  logic          qry_ready,
  // own cache
  output logic          loc_re,
  output rd_req_t       loc_rd,
  input  rd_rsp_t       loc_rsp,
  output logic          pe_we,
  output wr_req_t       pe_wr,
  // switch
  output logic          sw_req_valid,
  output logic [TW-1:0] sw_req_tgt,
  output rd_req_t       sw_req,
  input  logic          sw_req_ready,
  input  logic          sw_rsp_valid,
  input  rd_rsp_t       sw_rsp,
  // status
  output phase_e        phase,
  output logic          err_cam_miss,
  output logic          err_zero_pivot,
  output logic [31:0]   dep_wait_cycles,
  output logic [31:0]   remote_reads,
  output logic [31:0]   local_reads,
  output logic [31:0]   mac_ops,
  output logic [31:0]   extra_sections
);

  localparam int TAG_W = 2 * ROW_W;

  typedef enum logic [4:0] {
    S_INIT, S_IDLE,
    S_LD_DESC, S_LD_DESC_W, S_LD_ENT,
    S_UP_NEXT, S_UP_XB, S_UP_XC, S_UP_DEP, S_UP_DESC, S_UP_LREQ, S_UP_LRSP,
    S_UP_CAM, S_UP_RD, S_UP_SUB,
    S_NM_PIV, S_NM_PIVW, S_NM_RD, S_NM_CHK, S_NM_DIV, S_DONE
  } pstate_e;

  pstate_e st_q;

  row_t  k_q;                  // current column
  addr_t start_q, diag_q, fin_q; // column k in the own cache
  addr_t a_q;                  // next load address
  logic  ld_pend_q;            // a load read is in flight
  addr_t ld_addr_q;            // its address
  logic  first_q;              // next loaded entry opens a section
  logic  more_q;               // column k has sections left
  row_t  sec_lo_q;             // first row of the section
  addr_t sp_q, se_q;           // section's first and one-past-last address
  addr_t ua_q;                 // U entry being applied
  fp32_t xj_q;
  row_t  j_q;
  addr_t la_q, lend_q;         // L entries of column j
  addr_t t_q;                  // address being normalised / written back
  fp32_t piv_q;
  row_t  nrow_q;
  logic  loc_pend_q;           // a local read of the update phase is in flight
  logic  sw_pend_q;            // a switch read is waiting for its response

  logic    rsp_ok;             // response of an update-phase read
  rd_rsp_t rsp_sel;

  function automatic logic same_sec(input row_t a, input row_t b);
    return (int'(a) / SEC_ROWS) == (int'(b) / SEC_ROWS);
  endfunction

  function automatic row_t sec_base(input row_t r);
    return row_t'((int'(r) / SEC_ROWS) * SEC_ROWS);
  endfunction

  // ------------------------------------------------------------------
  // sub-blocks
  logic   cam_busy, cam_we, cam_lk, cam_hit;
  row_t   cam_wrow;
  logic [TAG_W-1:0] cam_wtag;
  addr_t  cam_waddr, cam_laddr;
  logic   buf_we, buf_re;
  addr_t  buf_waddr, buf_raddr;
  entry_t buf_wdata, buf_rdata;
  logic   mul_v, mul_ov, sub_v, sub_ov;
  fp32_t  mul_y, sub_y;
  logic   div_start, div_busy, div_done, div_dz;
  fp32_t  div_y;

  cam_index #(.DEPTH(SEC_ROWS), .TAG_W(TAG_W)) u_cam (
    .clk, .rst_n, .init_busy(cam_busy),
    .wr_en(cam_we), .wr_row(cam_wrow), .wr_tag(cam_wtag), .wr_addr(cam_waddr),
    .lk_en(cam_lk), .lk_row(rsp_sel.entry.row), .lk_tag({k_q, sec_lo_q}),
    .lk_hit(cam_hit), .lk_addr(cam_laddr)
  );

  inner_cache #(.DEPTH(COL_MAX)) u_buf (
    .clk, .we(buf_we), .waddr(buf_waddr), .wdata(buf_wdata),
    .rd_en(buf_re), .raddr(buf_raddr), .rdata(buf_rdata)
  );

  fp_mul u_mul (.clk, .rst_n, .in_valid(mul_v), .a(rsp_sel.entry.val), .b(xj_q),
                .out_valid(mul_ov), .y(mul_y));
  fp_sub u_sub (.clk, .rst_n, .in_valid(sub_v), .a(buf_rdata.val), .b(mul_y),
                .out_valid(sub_ov), .y(sub_y));
  fp_div u_div (.clk, .rst_n, .start(div_start), .a(buf_rdata.val), .b(piv_q),
                .busy(div_busy), .done(div_done), .y(div_y), .div_by_zero(div_dz));

  // the unit handshakes are implied by the fixed schedule of the controller
  logic unused_ok;
  assign unused_ok = mul_ov | sub_ov | div_busy | div_dz;

  assign rsp_sel = loc_pend_q ? loc_rsp : sw_rsp;
  assign rsp_ok  = loc_pend_q || sw_rsp_valid;

  // ------------------------------------------------------------------
  // loading a section (phase 1)
  row_t  ld_row, ld_lo;
  addr_t ld_sp;
  logic  ld_accept, ld_stop, ld_issue;

  always_comb begin
    ld_row    = loc_rsp.entry.row;
    ld_lo     = first_q ? sec_base(ld_row) : sec_lo_q;
    ld_sp     = first_q ? ld_addr_q : sp_q;
    ld_accept = (st_q == S_LD_ENT) && ld_pend_q && same_sec(ld_row, ld_lo);
    ld_stop   = (st_q == S_LD_ENT) && ld_pend_q && !ld_accept;
    ld_issue  = (st_q == S_LD_ENT) && (a_q != fin_q) && !ld_stop;
  end

  // ------------------------------------------------------------------
  // reads issued in the update phase
  logic          f_go, f_desc;
  addr_t         f_addr;
  logic [TW-1:0] f_owner;
  logic          f_local;
  addr_t         u_end;        // U entries of this section end here
  row_t          l_row;        // row of the L entry just read
  logic          l_above, l_below;

  always_comb begin
    f_go    = 1'b0;
    f_desc  = 1'b0;
    f_addr  = '0;
    f_owner = TW'(int'(j_q) % NUM_PE);
    if (st_q == S_UP_DEP && qry_ready && !sw_pend_q && !sw_req_valid) begin
      f_go   = 1'b1;
      f_desc = 1'b1;
      f_addr = addr_t'(int'(j_q) / NUM_PE);
    end else if (st_q == S_UP_LREQ && la_q != lend_q) begin
      f_go   = 1'b1;
      f_addr = la_q;
    end
    f_local = (int'(f_owner) == PE_ID);
    u_end   = (diag_q < se_q) ? diag_q : se_q;
    l_row   = rsp_sel.entry.row;
    l_above = l_row < sec_lo_q;
    l_below = !l_above && !same_sec(l_row, sec_lo_q);
  end

  always_comb begin
    pe_req  = (st_q == S_IDLE) && !more_q;
    qry_col = j_q;
    // local cache read port
    loc_re = 1'b0;
    loc_rd = '0;
    if (st_q == S_LD_DESC) begin
      loc_re = 1'b1;
      loc_rd = '{is_desc: 1'b1, addr: addr_t'(int'(k_q) / NUM_PE)};
    end else if (ld_issue) begin
      loc_re = 1'b1;
      loc_rd = '{is_desc: 1'b0, addr: a_q};
    end else if (st_q == S_UP_NEXT && ua_q != u_end && ua_q < sp_q) begin
      loc_re = 1'b1;
      loc_rd = '{is_desc: 1'b0, addr: ua_q};
    end else if (f_go && f_local) begin
      loc_re = 1'b1;
      loc_rd = '{is_desc: f_desc, addr: f_addr};
    end
    // CAM
    cam_we    = ld_accept;
    cam_wrow  = ld_row;
    cam_wtag  = {k_q, ld_lo};
    cam_waddr = ld_addr_q - ld_sp;
    cam_lk    = (st_q == S_UP_LRSP) && rsp_ok && !l_above && !l_below;
    // column buffer
    buf_we    = 1'b0;
    buf_waddr = '0;
    buf_wdata = '0;
    if (ld_accept) begin
      buf_we    = 1'b1;
      buf_waddr = ld_addr_q - ld_sp;
      buf_wdata = loc_rsp.entry;
    end else if (st_q == S_UP_SUB) begin
      buf_we    = 1'b1;
      buf_waddr = t_q;
      buf_wdata = '{row: buf_rdata.row, val: sub_y};
    end
    buf_re    = 1'b0;
    buf_raddr = '0;
    case (st_q)
      S_UP_NEXT: begin buf_re = (ua_q != u_end) && (ua_q >= sp_q); buf_raddr = ua_q - sp_q; end
      S_UP_CAM:  begin buf_re = cam_hit;         buf_raddr = cam_laddr; end
      S_NM_PIV:  begin buf_re = 1'b1;            buf_raddr = diag_q - sp_q; end
      S_NM_RD:   begin buf_re = (t_q != se_q);   buf_raddr = t_q - sp_q; end
      default: ;
    endcase
    // arithmetic
    mul_v     = cam_lk;
    sub_v     = (st_q == S_UP_RD);
    div_start = (st_q == S_NM_CHK) && (t_q > diag_q);
    // write back
    pe_we = 1'b0;
    pe_wr = '0;
    if (st_q == S_NM_CHK && t_q <= diag_q) begin
      pe_we = 1'b1;
      pe_wr.addr  = t_q;
      pe_wr.entry = buf_rdata;
    end else if (st_q == S_NM_DIV && div_done) begin
      pe_we = 1'b1;
      pe_wr.addr  = t_q;
      pe_wr.entry = '{row: nrow_q, val: div_y};
    end
    col_done = (st_q == S_DONE);
    case (st_q)
      S_INIT:                                 phase = PH_INIT;
      S_IDLE:                                 phase = PH_IDLE;
      S_LD_DESC, S_LD_DESC_W, S_LD_ENT:       phase = PH_LOAD;
      S_NM_PIV, S_NM_PIVW, S_NM_RD, S_NM_CHK,
      S_NM_DIV, S_DONE:                       phase = PH_NORM;
      default:                                phase = PH_UPDATE;
    endcase
  end

  // switch request: held until granted
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw_req_valid <= 1'b0;
      sw_req_tgt   <= '0;
      sw_req       <= '0;
      sw_pend_q    <= 1'b0;
      loc_pend_q   <= 1'b0;
    end else begin
      loc_pend_q <= f_go && f_local;
      if (f_go && !f_local) begin
        sw_req_valid <= 1'b1;
        sw_req_tgt   <= f_owner;
        sw_req       <= '{is_desc: f_desc, addr: f_addr};
        sw_pend_q    <= 1'b1;
      end else if (sw_req_valid && sw_req_ready) begin
        sw_req_valid <= 1'b0;
      end
      if (sw_rsp_valid) sw_pend_q <= 1'b0;
    end
  end

  // Processing Controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_INIT;
      k_q <= '0; start_q <= '0; diag_q <= '0; fin_q <= '0;
      a_q <= '0; ld_pend_q <= 1'b0; ld_addr_q <= '0; first_q <= 1'b0; more_q <= 1'b0;
      sec_lo_q <= '0; sp_q <= '0; se_q <= '0; ua_q <= '0;
      xj_q <= '0; j_q <= '0; la_q <= '0; lend_q <= '0;
      t_q <= '0; piv_q <= '0; nrow_q <= '0;
      err_cam_miss <= 1'b0; err_zero_pivot <= 1'b0;
      dep_wait_cycles <= '0; remote_reads <= '0; local_reads <= '0; mac_ops <= '0;
      extra_sections <= '0;
    end else begin
      if (f_go) begin
        if (f_local) local_reads  <= local_reads + 32'd1;
        else         remote_reads <= remote_reads + 32'd1;
      end
      unique case (st_q)
        S_INIT: if (run && !cam_busy) st_q <= S_IDLE;
        S_IDLE: begin
          if (more_q) begin
            more_q  <= 1'b0;
            first_q <= 1'b1;
            extra_sections <= extra_sections + 32'd1;
            st_q    <= S_LD_ENT;
          end else if (assign_valid) begin
            k_q  <= assign_col;
            st_q <= S_LD_DESC;
          end
        end
        S_LD_DESC: st_q <= S_LD_DESC_W;
        S_LD_DESC_W: begin
          start_q <= loc_rsp.desc.start;
          diag_q  <= loc_rsp.desc.diag;
          fin_q   <= loc_rsp.desc.fin;
          a_q     <= loc_rsp.desc.start;
          first_q <= 1'b1;
          st_q    <= S_LD_ENT;
        end
        S_LD_ENT: begin
          ld_pend_q <= ld_issue;
          if (ld_issue) begin
            ld_addr_q <= a_q;
            a_q       <= a_q + 1'b1;
          end
          if (ld_accept && first_q) begin
            first_q  <= 1'b0;
            sec_lo_q <= ld_lo;
            sp_q     <= ld_addr_q;
          end
          if (ld_stop) begin
            a_q  <= ld_addr_q;
            se_q <= ld_addr_q;
            ua_q <= start_q;
            st_q <= S_UP_NEXT;
          end else if (!ld_issue && !ld_pend_q) begin
            se_q <= fin_q;
            ua_q <= start_q;
            st_q <= S_UP_NEXT;
          end
        end
        S_UP_NEXT: begin
          if (ua_q == u_end)    st_q <= S_NM_PIV;
          else if (ua_q < sp_q) st_q <= S_UP_XC;
          else                  st_q <= S_UP_XB;
        end
        S_UP_XB: begin
          xj_q <= buf_rdata.val;
          j_q  <= buf_rdata.row;
          st_q <= S_UP_DEP;
        end
        S_UP_XC: begin
          xj_q <= loc_rsp.entry.val;
          j_q  <= loc_rsp.entry.row;
          st_q <= S_UP_DEP;
        end
        S_UP_DEP: begin
          if (f_go) st_q <= S_UP_DESC;
          else      dep_wait_cycles <= dep_wait_cycles + 32'd1;
        end
        S_UP_DESC: if (rsp_ok) begin
          la_q   <= rsp_sel.desc.diag + 1'b1;
          lend_q <= rsp_sel.desc.fin;
          st_q   <= S_UP_LREQ;
        end
        S_UP_LREQ: begin
          if (la_q == lend_q) begin
            ua_q <= ua_q + 1'b1;
            st_q <= S_UP_NEXT;
          end else begin
            st_q <= S_UP_LRSP;
          end
        end
        S_UP_LRSP: if (rsp_ok) begin
          if (l_above) begin              // row before this section: skip
            la_q <= la_q + 1'b1;
            st_q <= S_UP_LREQ;
          end else if (l_below) begin     // past this section: column j done
            ua_q <= ua_q + 1'b1;
            st_q <= S_UP_NEXT;
          end else begin
            st_q <= S_UP_CAM;
          end
        end
        S_UP_CAM: begin
          t_q <= cam_laddr;
          if (cam_hit) st_q <= S_UP_RD;
          else begin
            err_cam_miss <= 1'b1;
            la_q <= la_q + 1'b1;
            st_q <= S_UP_LREQ;
          end
        end
        S_UP_RD: st_q <= S_UP_SUB;
        S_UP_SUB: begin
          mac_ops <= mac_ops + 32'd1;
          la_q    <= la_q + 1'b1;
          st_q    <= S_UP_LREQ;
        end
        S_NM_PIV: begin
          t_q <= sp_q;
          if (diag_q >= sp_q && diag_q < se_q) st_q <= S_NM_PIVW;
          else                                 st_q <= S_NM_RD;   // pivot kept from its section
        end
        S_NM_PIVW: begin
          piv_q <= buf_rdata.val;
          if (buf_rdata.val[30:23] == 8'd0) err_zero_pivot <= 1'b1;
          st_q <= S_NM_RD;
        end
        S_NM_RD: begin
          if (t_q != se_q)        st_q <= S_NM_CHK;
          else if (se_q == fin_q) st_q <= S_DONE;
          else begin
            more_q <= 1'b1;
            st_q   <= S_IDLE;
          end
        end
        S_NM_CHK: begin
          nrow_q <= buf_rdata.row;
          if (t_q > diag_q) st_q <= S_NM_DIV;
          else begin
            t_q  <= t_q + 1'b1;
            st_q <= S_NM_RD;
          end
        end
        S_NM_DIV: if (div_done) begin
          t_q  <= t_q + 1'b1;
          st_q <= S_NM_RD;
        end
        S_DONE: st_q <= S_IDLE;
        default: st_q <= S_INIT;
      endcase
    end
  end

  a_no_double_read: assert property (@(posedge clk) disable iff (!rst_n)
    !(sw_req_valid && f_go && !f_local))
    else $error("proc_element: new switch read while one is outstanding");

endmodule
