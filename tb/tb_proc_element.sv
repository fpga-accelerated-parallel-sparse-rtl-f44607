// tb_proc_element: one PE (PE 0 of a two-PE system) factorizes the even
// columns of a random sparse matrix. The testbench plays the rest of the
// system: it loads the matrix into the PE's cache, holds the already
// factorized odd columns (PE 1's share, taken from the reference) in a second
// cache behind a model switch that grants after a random delay, hands out
// columns like the PE controller, and declares odd column j finished only
// after a delay growing with j, so the PE must wait on dependencies. The even
// columns read back must equal the reference bit for bit. Phase changes must
// follow the state diagram: I->0, 0->1, 1->2, 2->3, 3->0 only. Sections of 8
// rows (SEC_ROWS = 8) split the longer columns, and at least one split must
// occur.
module tb_proc_element;
  import lu_pkg::*;
  import fp_ref_pkg::*;
  import lu_ref_pkg::*;

  localparam int NUM_PE = 2;
  localparam int N = 24;
  localparam int TW = 1;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic pe_req, assign_valid = 1'b0, col_done, qry_ready;
  row_t assign_col = '0, qry_col;
  logic loc_re, pe_we, sw_req_valid, sw_req_ready, sw_rsp_valid = 1'b0;
  rd_req_t loc_rd, sw_req;
  rd_rsp_t loc_rsp, sw_rsp;
  wr_req_t pe_wr;
  logic [TW-1:0] sw_req_tgt;
  phase_e phase;
  logic err_cam_miss, err_zero_pivot;
  logic [31:0] dep_wait_cycles, remote_reads, local_reads, mac_ops, extra_sections;
  // testbench access to the caches
  logic    own_we = 1'b0, oth_we = 1'b0, own_re = 1'b0;
  wr_req_t own_wr = '0, oth_wr = '0;
  rd_req_t own_rd = '0;
  rd_rsp_t own_rsp;
  logic    oth_re;
  rd_rsp_t oth_rsp;
  logic    unused_we = 1'b0;
  rd_rsp_t unused_rsp;

  int checks = 0, failures = 0;
  int cyc = 0;
  int fin_even = 0;        // even columns finished by the PE
  int transitions = 0;

  proc_element #(.NUM_PE(NUM_PE), .PE_ID(0), .SEC_ROWS(8), .COL_MAX(8)) dut (.*);

  onchip_cache #(.DEPTH(1024), .DESC_DEPTH(64)) u_own (
    .clk, .pe_we, .pe_wr, .sw_we(own_we), .sw_wr(own_wr),
    .loc_re, .loc_rd, .loc_rsp, .ext_re(own_re), .ext_rd(own_rd), .ext_rsp(own_rsp));

  onchip_cache #(.DEPTH(1024), .DESC_DEPTH(64)) u_oth (
    .clk, .pe_we(unused_we), .pe_wr(oth_wr), .sw_we(oth_we), .sw_wr(oth_wr),
    .loc_re(1'b0), .loc_rd(own_rd), .loc_rsp(unused_rsp),
    .ext_re(oth_re), .ext_rd(sw_req), .ext_rsp(oth_rsp));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // model switch: random grant delay, response one clock after the grant
  assign sw_req_ready = sw_req_valid && ($urandom_range(2, 0) != 0);
  assign oth_re = sw_req_valid && sw_req_ready;
  always_ff @(posedge clk) sw_rsp_valid <= oth_re;
  assign sw_rsp = oth_rsp;
  always @(negedge clk)
    if (sw_req_valid) check(sw_req_tgt == 1'b1, "switch read aimed at the own cache");

  // dependency answers: even columns when the PE reported them, odd ones late
  always_comb begin
    if (qry_col[0] == 1'b0) qry_ready = int'(qry_col) / 2 < fin_even;
    else                    qry_ready = cyc > 400 + 150 * int'(qry_col);
  end

  // controller model
  always @(posedge clk) begin
    if (col_done) fin_even <= fin_even + 1;
  end

  // phase transitions of the state diagram
  phase_e last_phase = PH_INIT;
  always @(posedge clk) if (rst_n) begin
    if (phase != last_phase) begin
      bit ok;
      ok = (last_phase == PH_INIT && phase == PH_IDLE) || (last_phase == PH_IDLE && phase == PH_LOAD) ||
           (last_phase == PH_LOAD && phase == PH_UPDATE) || (last_phase == PH_UPDATE && phase == PH_NORM) ||
           (last_phase == PH_NORM && phase == PH_IDLE);
      check(ok, $sformatf("phase %s -> %s", last_phase.name(), phase.name()));
      transitions++;
    end
    last_phase <= phase;
  end

  task automatic wr(input bit own, input wr_req_t w);
    @(negedge clk);
    if (own) begin own_we = 1'b1; own_wr = w; end
    else     begin oth_we = 1'b1; oth_wr = w; end
    @(negedge clk);
    own_we = 1'b0; oth_we = 1'b0;
  endtask

  task automatic load(input int p, input bit final_values);
    int addr = 0;
    for (int k = p; k < N; k += NUM_PE) begin
      wr_req_t w;
      desc_t d;
      d.start = addr_t'(addr);
      d.diag = '0;
      for (int i = 0; i < N; i++)
        if (pat[i][k]) begin
          if (i == k) d.diag = addr_t'(addr);
          w = '0;
          w.addr = addr_t'(addr);
          w.entry = '{row: row_t'(i), val: final_values ? lu[i][k] : aval[i][k]};
          wr(p == 0, w);
          addr++;
        end
      d.fin = addr_t'(addr);
      w = '0;
      w.is_desc = 1'b1;
      w.addr = addr_t'(k / NUM_PE);
      w.desc = d;
      wr(p == 0, w);
    end
  endtask

  initial begin
    int t0;
    gen(N, 2);
    symbolic(N);
    factor(N);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load(0, 1'b0);
    load(1, 1'b1);
    check(phase == PH_INIT, "PE left the initial state before run");
    @(negedge clk);
    run = 1'b1;
    for (int k = 0; k < N; k += NUM_PE) begin
      while (!pe_req) @(negedge clk);
      assign_valid = 1'b1;
      assign_col = row_t'(k);
      @(negedge clk);
      assign_valid = 1'b0;
      @(negedge clk);
      check(!pe_req, "PE still requesting after an assignment");
      t0 = cyc;
      while (!col_done) @(negedge clk);
    end
    @(negedge clk);
    check(fin_even == N / 2, "not every column reported finished");
    // read the own cache back
    begin
      int addr = 0;
      for (int k = 0; k < N; k += NUM_PE)
        for (int i = 0; i < N; i++)
          if (pat[i][k]) begin
            @(negedge clk);
            own_re = 1'b1;
            own_rd = '{is_desc: 1'b0, addr: addr_t'(addr)};
            @(negedge clk);
            own_re = 1'b0;
            check(int'(own_rsp.entry.row) == i && own_rsp.entry.val === lu[i][k],
                  $sformatf("LU(%0d,%0d) = %h row %0d, expected %h", i, k,
                            own_rsp.entry.val, own_rsp.entry.row, lu[i][k]));
            addr++;
          end
    end
    check(!err_cam_miss && !err_zero_pivot, "error flag raised");
    check(dep_wait_cycles > 0, "no dependency stall");
    check(remote_reads > 0 && local_reads > 0, "local and remote reads not both used");
    check(transitions >= 4 * (N / 2), "too few phase changes");
    check(extra_sections > 0, "no column was split into sections");
    $display("PE: %0d multiply-subtracts, %0d local and %0d remote reads, %0d dependency stall cycles, %0d extra sections",
             mac_ops, local_reads, remote_reads, dep_wait_cycles, extra_sections);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
