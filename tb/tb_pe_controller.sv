// tb_pe_controller: four model PEs take columns from the controller. Each
// model PE asks for work when idle, takes a random time per column and
// reports it done. Checked: PE p receives exactly columns p, p+4, p+8, ... in
// order; qry_ready answers "column j finished" exactly as the testbench's own
// record says; done pulses once, after the last column, with cycles equal to
// the testbench's count; a second run restarts cleanly.
module tb_pe_controller;
  import lu_pkg::*;

  localparam int NUM_PE = 4;
  localparam int CW = ROW_W + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done, run;
  logic [CW-1:0] n_cols = '0;
  logic [31:0] cycles;
  logic pe_req [NUM_PE], assign_valid [NUM_PE], col_done [NUM_PE], qry_ready [NUM_PE];
  row_t assign_col [NUM_PE], qry_col [NUM_PE];
  int checks = 0, failures = 0;
  bit finished [256];
  int done_pulses = 0;

  pe_controller #(.NUM_PE(NUM_PE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (done) done_pulses++;

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    initial begin
      pe_req[p] = 1'b0;
      col_done[p] = 1'b0;
      qry_col[p] = '0;
      forever begin
        int expect_col;
        expect_col = p;
        wait (busy);
        while (busy) begin
          @(negedge clk);
          pe_req[p] = 1'b1;
          @(posedge clk);
          while (!assign_valid[p] && busy) @(posedge clk);
          if (!busy) begin
            pe_req[p] = 1'b0;
            break;
          end
          @(negedge clk);
          pe_req[p] = 1'b0;
          check(int'(assign_col[p]) == expect_col,
                $sformatf("PE %0d got column %0d, expected %0d", p, assign_col[p], expect_col));
          // random query while working
          repeat ($urandom_range(12, 1)) begin
            automatic int j = $urandom_range(int'(n_cols) - 1, 0);
            qry_col[p] = row_t'(j);
            #1;
            check(qry_ready[p] == finished[j],
                  $sformatf("query of column %0d: %b, expected %b", j, qry_ready[p], finished[j]));
            @(negedge clk);
          end
          col_done[p] = 1'b1;
          @(posedge clk);     // the controller counts it at this edge
          finished[expect_col] = 1'b1;
          @(negedge clk);
          col_done[p] = 1'b0;
          expect_col += NUM_PE;
        end
        wait (!busy);
      end
    end
  end

  task automatic run_once(input int n);
    int t;
    for (int j = 0; j < 256; j++) finished[j] = 1'b0;
    done_pulses = 0;
    @(negedge clk);
    n_cols = CW'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t = 0;
    while (!done) begin
      @(negedge clk);
      t++;
    end
    check(int'(cycles) == t, $sformatf("cycles %0d, counted %0d", cycles, t));
    for (int j = 0; j < n; j++) check(finished[j], $sformatf("column %0d not finished at done", j));
    repeat (5) @(negedge clk);
    check(done_pulses == 1, $sformatf("%0d done pulses", done_pulses));
    check(!busy, "still busy after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!run, "run before start");
    run_once(37);
    check(run, "run not raised");
    run_once(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
