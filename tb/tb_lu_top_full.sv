// tb_lu_top_full: end-to-end test of lu_top with every parameter at its default (16 PEs, 400 x 400 matrix, 256-row sections).
//
// Acting as the host, it generates a random sparse diagonally dominant
// matrix, performs the symbolic analysis (fill-ins), writes every PE's share
// of the matrix and its column descriptors through the driver port, starts
// the factorization, waits for done and reads every entry back, comparing it
// bit for bit with the reference factorization computed in the same order
// and precision. It then writes new values on the same structure and
// factorizes again, as a circuit simulator does in every Newton-Raphson
// step. It counts the mechanisms of the design and fails if one never
// occurred: the initial, idle, load, update and normalize phases, local and
// remote (switch) reads, dependency stalls, switch arbitration stalls,
// read-back and repeated factorization,
// and columns split into several sections. The cycle count reported by the
// controller is checked against the testbench's own count.
module tb_lu_top_full;
  import lu_pkg::*;
  import fp_ref_pkg::*;
  import lu_ref_pkg::*;

  localparam int NUM_PE = 16;
  localparam int N      = 400;         // matrix dimension of the test
  localparam int PER_COL = 2;
  localparam int TW = (NUM_PE > 1) ? $clog2(NUM_PE) : 1;
  localparam int CW = ROW_W + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done;
  logic [CW-1:0] n_cols = CW'(N);
  logic [31:0] cycles;
  logic          drv_we = 1'b0;
  logic [TW-1:0] drv_tgt = '0;
  wr_req_t       drv_wr = '0;
  logic          drv_rd_valid = 1'b0;
  logic [TW-1:0] drv_rd_tgt = '0;
  rd_req_t       drv_rd = '0;
  logic          drv_rd_ready, drv_rsp_valid;
  rd_rsp_t       drv_rsp;
  phase_e        phase [NUM_PE];
  logic          err_cam_miss, err_zero_pivot;
  logic [31:0]   dep_wait_cycles [NUM_PE], remote_reads [NUM_PE];
  logic [31:0]   local_reads [NUM_PE], mac_ops [NUM_PE], extra_sections [NUM_PE];
  logic [31:0]   sw_wait_cycles;

  int checks = 0, failures = 0;
  int seen_phase [5];
  int runs = 0, readbacks = 0;

  lu_top dut (
    .clk, .rst_n, .start, .n_cols, .busy, .done, .cycles,
    .drv_we, .drv_tgt, .drv_wr, .drv_rd_valid, .drv_rd_tgt, .drv_rd,
    .drv_rd_ready, .drv_rsp_valid, .drv_rsp,
    .phase, .err_cam_miss, .err_zero_pivot,
    .dep_wait_cycles, .remote_reads, .local_reads, .mac_ops, .extra_sections, .sw_wait_cycles
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n)
      for (int p = 0; p < NUM_PE; p++) seen_phase[int'(phase[p])]++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic write_word(input int p, input wr_req_t w);
    @(negedge clk);
    drv_we  = 1'b1;
    drv_tgt = TW'(p);
    drv_wr  = w;
    @(negedge clk);
    drv_we  = 1'b0;
  endtask

  task automatic read_word(input int p, input bit is_desc, input int addr, output rd_rsp_t r);
    @(negedge clk);
    drv_rd_valid = 1'b1;
    drv_rd_tgt   = TW'(p);
    drv_rd       = '{is_desc: is_desc, addr: addr_t'(addr)};
    do @(posedge clk); while (!drv_rd_ready);
    @(negedge clk);
    drv_rd_valid = 1'b0;
    check(drv_rsp_valid, "driver read response missing");
    r = drv_rsp;
  endtask

  // column k lives in PE k mod NUM_PE, slot k / NUM_PE, entries packed in order
  task automatic load_matrix();
    for (int p = 0; p < NUM_PE; p++) begin
      int addr = 0;
      for (int k = p; k < N; k += NUM_PE) begin
        desc_t d;
        d.start = addr_t'(addr);
        d.diag  = '0;
        for (int i = 0; i < N; i++)
          if (pat[i][k]) begin
            wr_req_t w = '0;
            if (i == k) d.diag = addr_t'(addr);
            w.addr  = addr_t'(addr);
            w.entry = '{row: row_t'(i), val: aval[i][k]};
            write_word(p, w);
            addr++;
          end
        d.fin = addr_t'(addr);
        begin
          wr_req_t w = '0;
          w.is_desc = 1'b1;
          w.addr    = addr_t'(k / NUM_PE);
          w.desc    = d;
          write_word(p, w);
        end
      end
    end
  endtask

  task automatic run_and_check(input string tag);
    int t0, bad;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = 0;
    while (!done) begin
      @(negedge clk);
      t0++;
    end
    runs++;
    $display("%s: n=%0d nnz(L+U)=%0d factorized in %0d cycles", tag, N, nnz(N), cycles);
    check(int'(cycles) == t0, $sformatf("%s: cycle count %0d, testbench counted %0d", tag, cycles, t0));
    check(!err_cam_miss, "CAM miss flagged");
    check(!err_zero_pivot, "zero pivot flagged");
    bad = 0;
    for (int p = 0; p < NUM_PE; p++) begin
      int addr = 0;
      for (int k = p; k < N; k += NUM_PE) begin
        rd_rsp_t r;
        read_word(p, 1'b1, k / NUM_PE, r);
        check(int'(r.desc.start) == addr, "descriptor changed");
        for (int i = 0; i < N; i++)
          if (pat[i][k]) begin
            read_word(p, 1'b0, addr, r);
            readbacks++;
            checks++;
            if (int'(r.entry.row) != i || r.entry.val !== lu[i][k]) begin
              failures++;
              bad++;
              if (bad < 10)
                $display("FAIL %s: LU(%0d,%0d) got row %0d value %h, expected %h",
                         tag, i, k, r.entry.row, r.entry.val, lu[i][k]);
            end
            addr++;
          end
      end
    end
  endtask

  initial begin
    int dep, rem, loc, macs, secs;
    for (int i = 0; i < 5; i++) seen_phase[i] = 0;
    gen(N, PER_COL);
    symbolic(N);
    factor(N);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    load_matrix();
    run_and_check("run 1");
    // same structure, new values: factorize again
    revalue(N);
    factor(N);
    load_matrix();
    run_and_check("run 2");

    dep = 0; rem = 0; loc = 0; macs = 0; secs = 0;
    for (int p = 0; p < NUM_PE; p++) begin
      dep  += int'(dep_wait_cycles[p]);
      rem  += int'(remote_reads[p]);
      loc  += int'(local_reads[p]);
      macs += int'(mac_ops[p]);
      secs += int'(extra_sections[p]);
    end
    $display("mechanisms: init %0d idle %0d load %0d update %0d normalize %0d (PE-cycles)",
             seen_phase[int'(PH_INIT)], seen_phase[int'(PH_IDLE)], seen_phase[int'(PH_LOAD)],
             seen_phase[int'(PH_UPDATE)], seen_phase[int'(PH_NORM)]);
    $display("mechanisms: local reads %0d remote reads %0d dependency stalls %0d switch stalls %0d multiply-subtracts %0d read-backs %0d runs %0d extra sections %0d",
             loc, rem, dep, sw_wait_cycles, macs, readbacks, runs, secs);
    check(seen_phase[int'(PH_INIT)] > 0, "phase I never seen");
    check(seen_phase[int'(PH_IDLE)] > 0, "phase 0 never seen");
    check(seen_phase[int'(PH_LOAD)] > 0, "phase 1 never seen");
    check(seen_phase[int'(PH_UPDATE)] > 0, "phase 2 never seen");
    check(seen_phase[int'(PH_NORM)] > 0, "phase 3 never seen");
    check(loc > 0, "no local read");
    check(rem > 0, "no remote read through the switch");
    check(dep > 0, "no dependency stall");
    check(sw_wait_cycles > 0, "no switch arbitration stall");
    check(macs > 0, "no multiply-subtract");
    check(readbacks > 0, "no read-back");
    check(runs == 2, "repeated factorization missing");
    check(secs > 0, "no column was split into sections");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
