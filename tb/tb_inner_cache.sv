// tb_inner_cache: random writes and reads of the column buffer against a
// model array; read data must appear one clock after the read enable and
// hold while no read is enabled.
module tb_inner_cache;
  import lu_pkg::*;

  localparam int DEPTH = 64;

  logic clk = 1'b0;
  logic we = 1'b0, rd_en = 1'b0;
  addr_t waddr = '0, raddr = '0;
  entry_t wdata = '0, rdata;
  int checks = 0, failures = 0;
  entry_t model [DEPTH];

  inner_cache #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1'b1; waddr = addr_t'(i); wdata = '{row: row_t'($urandom), val: $urandom};
      model[i] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int it = 0; it < 3000; it++) begin
      automatic int r = $urandom_range(DEPTH - 1, 0);
      automatic int w = $urandom_range(DEPTH - 1, 0);
      entry_t exp_d;
      rd_en = 1'b1; raddr = addr_t'(r);
      we = $urandom_range(1, 0) == 1; waddr = addr_t'(w);
      wdata = '{row: row_t'($urandom), val: $urandom};
      exp_d = model[r];                 // read-before-write on the same address
      if (we) model[w] = wdata;
      @(negedge clk);
      rd_en = 1'b0; we = 1'b0;
      raddr = addr_t'((r + 1) % DEPTH);
      checks++;
      if (rdata !== exp_d) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d: %h expected %h", r, rdata, exp_d);
      end
      @(negedge clk);
      checks++;
      if (rdata !== exp_d) failures++;  // held without rd_en
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
