// tb_lu_switch: the switch with four model caches behind it. Five
// requesters (four PEs and the driver) issue random reads; every response
// must come exactly one clock after its grant and carry the data of the
// target cache at the requested address. Requesters that collide on one
// target must all be served within NR grants of that target (round robin),
// collisions must show in wait_cycles, and driver writes must reach only
// the addressed cache.
module tb_lu_switch;
  import lu_pkg::*;

  localparam int NUM_PE = 4;
  localparam int NR = NUM_PE + 1;
  localparam int TW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic          req_valid [NR], req_ready [NR], rsp_valid [NR];
  logic [TW-1:0] req_tgt [NR];
  rd_req_t       req [NR];
  rd_rsp_t       rsp [NR];
  logic          drv_we = 1'b0;
  logic [TW-1:0] drv_tgt = '0;
  wr_req_t       drv_wr = '0;
  logic          ext_re [NUM_PE], sw_we [NUM_PE];
  rd_req_t       ext_rd [NUM_PE];
  rd_rsp_t       ext_rsp [NUM_PE];
  wr_req_t       sw_wr [NUM_PE];
  logic [31:0]   wait_cycles;
  int checks = 0, failures = 0;

  // model caches: entry value = {target, addr}; writes land in wmem
  logic [31:0] wmem [NUM_PE][16];

  lu_switch #(.NUM_PE(NUM_PE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk)
    for (int t = 0; t < NUM_PE; t++) begin
      if (ext_re[t]) begin
        ext_rsp[t].entry.val <= {8'(t), 11'd0, ext_rd[t].addr};
        ext_rsp[t].entry.row <= row_t'(ext_rd[t].is_desc);
        ext_rsp[t].desc      <= '0;
      end
      if (sw_we[t]) wmem[t][sw_wr[t].addr[3:0]] <= sw_wr[t].entry.val;
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // one requester: random reads, checks its own responses
  int served [NR];
  int max_wait [NR];
  for (genvar r = 0; r < NR; r++) begin : g_req
    initial begin
      served[r] = 0;
      max_wait[r] = 0;
      req_valid[r] = 1'b0;
      req_tgt[r] = '0;
      req[r] = '0;
      wait (rst_n);
      for (int it = 0; it < 400; it++) begin
        int t, a, w;
        bit d;
        @(negedge clk);
        t = $urandom_range(NUM_PE - 1, 0);
        if (it % 3 == 0) t = 1;               // make collisions frequent
        a = $urandom_range(4095, 0);
        d = $urandom_range(1, 0) == 1;
        req_valid[r] = 1'b1;
        req_tgt[r] = TW'(t);
        req[r] = '{is_desc: d, addr: addr_t'(a)};
        w = 0;
        @(posedge clk);
        while (!req_ready[r]) begin
          w++;
          @(posedge clk);
        end
        if (w > max_wait[r]) max_wait[r] = w;
        @(negedge clk);
        req_valid[r] = 1'b0;
        check(rsp_valid[r], $sformatf("requester %0d: no response one clock after grant", r));
        check(rsp[r].entry.val == {8'(t), 11'd0, 13'(a)} && rsp[r].entry.row == row_t'(d),
              $sformatf("requester %0d: data %h from target %0d addr %0d", r, rsp[r].entry.val, t, a));
        served[r]++;
      end
    end
  end

  // every response belongs to a granted request
  int rsp_count [NR];
  initial for (int r = 0; r < NR; r++) rsp_count[r] = 0;
  always @(posedge clk)
    if (rst_n) for (int r = 0; r < NR; r++) if (rsp_valid[r]) rsp_count[r]++;

  initial begin
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // driver writes go to the addressed cache only
    for (int t = 0; t < NUM_PE; t++)
      for (int a = 0; a < 16; a++) wmem[t][a] = 32'hdead0000;
    for (int t = 0; t < NUM_PE; t++) begin
      @(negedge clk);
      drv_we = 1'b1; drv_tgt = TW'(t);
      drv_wr = '0; drv_wr.addr = addr_t'(t + 2); drv_wr.entry.val = 32'h1000 + t;
    end
    @(negedge clk);
    drv_we = 1'b0;
    @(negedge clk);
    for (int t = 0; t < NUM_PE; t++)
      for (int a = 0; a < 16; a++)
        check(wmem[t][a] == ((a == t + 2) ? 32'h1000 + t : 32'hdead0000),
              $sformatf("driver write: cache %0d addr %0d = %h", t, a, wmem[t][a]));
    wait (served[0] == 400 && served[1] == 400 && served[2] == 400 && served[3] == 400 && served[4] == 400);
    repeat (3) @(negedge clk);
    for (int r = 0; r < NR; r++)
      check(rsp_count[r] == 400, $sformatf("requester %0d: %0d responses", r, rsp_count[r]));
    for (int r = 0; r < NR; r++)
      check(max_wait[r] <= NR, $sformatf("requester %0d waited %0d clocks", r, max_wait[r]));
    check(wait_cycles > 0, "collisions not counted");
    $display("switch wait cycles %0d", wait_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
