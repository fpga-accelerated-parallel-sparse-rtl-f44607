// tb_onchip_cache: the tri-port cache against a model: entries and
// descriptors written from the PE port and the switch port, read through the
// local and the external read port in the same clock, one clock latency.
module tb_onchip_cache;
  import lu_pkg::*;

  localparam int DEPTH = 64, DESC_DEPTH = 16;

  logic clk = 1'b0;
  logic pe_we = 1'b0, sw_we = 1'b0, loc_re = 1'b0, ext_re = 1'b0;
  wr_req_t pe_wr = '0, sw_wr = '0;
  rd_req_t loc_rd = '0, ext_rd = '0;
  rd_rsp_t loc_rsp, ext_rsp;
  int checks = 0, failures = 0;
  entry_t m_ent [DEPTH];
  desc_t  m_dsc [DESC_DEPTH];

  onchip_cache #(.DEPTH(DEPTH), .DESC_DEPTH(DESC_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic wr_req_t rand_wr(input bit d);
    wr_req_t w;
    w.is_desc = d;
    w.addr    = addr_t'($urandom_range(d ? DESC_DEPTH - 1 : DEPTH - 1, 0));
    w.entry   = '{row: row_t'($urandom), val: $urandom};
    w.desc    = '{start: addr_t'($urandom), diag: addr_t'($urandom), fin: addr_t'($urandom)};
    return w;
  endfunction

  task automatic put(input wr_req_t w);
    if (w.is_desc) m_dsc[w.addr] = w.desc;
    else           m_ent[w.addr] = w.entry;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    @(negedge clk);
    // fill everything from the switch (driver) port
    for (int i = 0; i < DEPTH + DESC_DEPTH; i++) begin
      sw_we = 1'b1;
      sw_wr = rand_wr(i >= DEPTH);
      sw_wr.addr = addr_t'(i >= DEPTH ? i - DEPTH : i);
      put(sw_wr);
      @(negedge clk);
    end
    sw_we = 1'b0;
    for (int it = 0; it < 3000; it++) begin
      rd_req_t a, b;
      entry_t ea, eb;
      desc_t  da, db;
      a.is_desc = $urandom_range(1, 0) == 1;
      b.is_desc = $urandom_range(1, 0) == 1;
      a.addr = addr_t'($urandom_range(a.is_desc ? DESC_DEPTH - 1 : DEPTH - 1, 0));
      b.addr = addr_t'($urandom_range(b.is_desc ? DESC_DEPTH - 1 : DEPTH - 1, 0));
      loc_re = 1'b1; loc_rd = a; ext_re = 1'b1; ext_rd = b;
      ea = m_ent[a.addr]; da = m_dsc[a.addr % DESC_DEPTH];
      eb = m_ent[b.addr]; db = m_dsc[b.addr % DESC_DEPTH];
      // one writer per clock, PE port or switch port
      if ($urandom_range(1, 0) == 1) begin pe_we = 1'b1; pe_wr = rand_wr($urandom_range(1, 0) == 1); put(pe_wr); end
      else begin sw_we = 1'b1; sw_wr = rand_wr($urandom_range(1, 0) == 1); put(sw_wr); end
      @(negedge clk);
      loc_re = 1'b0; ext_re = 1'b0; pe_we = 1'b0; sw_we = 1'b0;
      if (a.is_desc) check(loc_rsp.desc == da, $sformatf("local desc %0d", a.addr));
      else           check(loc_rsp.entry == ea, $sformatf("local entry %0d", a.addr));
      if (b.is_desc) check(ext_rsp.desc == db, $sformatf("external desc %0d", b.addr));
      else           check(ext_rsp.entry == eb, $sformatf("external entry %0d", b.addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
