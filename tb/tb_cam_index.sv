// tb_cam_index: checks the row-index CAM: the self-clearing after reset takes
// DEPTH clocks, a lookup returns the written address one clock later, a
// lookup with another column tag or of an unwritten row misses, and
// rewriting a row for a new column replaces the old word.
module tb_cam_index;
  import lu_pkg::*;

  localparam int DEPTH = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic init_busy, wr_en = 1'b0, lk_en = 1'b0, lk_hit;
  row_t wr_row = '0, wr_tag = '0, lk_row = '0, lk_tag = '0;
  addr_t wr_addr = '0, lk_addr;
  int checks = 0, failures = 0;

  int   m_addr [DEPTH];
  int   m_tag  [DEPTH];
  bit   m_val  [DEPTH];

  cam_index #(.DEPTH(DEPTH), .TAG_W(ROW_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  initial begin
    int n;
    for (int i = 0; i < DEPTH; i++) m_val[i] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    n = 0;
    while (init_busy) begin
      @(negedge clk);
      n++;
    end
    check(n == DEPTH, $sformatf("clearing took %0d clocks, expected %0d", n, DEPTH));
    for (int it = 0; it < 4000; it++) begin
      int r, tg;
      r  = $urandom_range(DEPTH - 1, 0);
      tg = $urandom_range(3, 0);
      if ($urandom_range(2, 0) == 0) begin
        automatic int ad = $urandom_range(1023, 0);
        wr_en = 1'b1; wr_row = row_t'(r); wr_tag = row_t'(tg); wr_addr = addr_t'(ad);
        @(negedge clk);
        wr_en = 1'b0;
        m_val[r] = 1'b1; m_tag[r] = tg; m_addr[r] = ad;
      end else begin
        bit exp_hit;
        lk_en = 1'b1; lk_row = row_t'(r); lk_tag = row_t'(tg);
        @(negedge clk);
        lk_en = 1'b0;
        exp_hit = m_val[r] && m_tag[r] == tg;
        check(lk_hit == exp_hit, $sformatf("row %0d tag %0d: hit %b expected %b", r, tg, lk_hit, exp_hit));
        if (exp_hit) check(int'(lk_addr) == m_addr[r],
                           $sformatf("row %0d: addr %0d expected %0d", r, lk_addr, m_addr[r]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
