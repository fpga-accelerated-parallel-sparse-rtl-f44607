// tb_fp_div: checks fp_div against the double-precision reference model on
// directed and random operands, checks the fixed start-to-done latency and
// the division-by-zero flag.
module tb_fp_div;
  import fp_ref_pkg::*;

  localparam int LATENCY = 28;     // clocks from the start clock to the done clock

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done, dz;
  logic [31:0] a = '0, b = '0, y;
  int checks = 0, failures = 0;

  fp_div dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .y, .div_by_zero(dz));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x, input logic [31:0] z);
    logic [31:0] exp_y;
    int n;
    exp_y = (z[30:23] == 8'd0) ? {x[31] ^ z[31], 8'hff, 23'd0} : ref_div(x, z);
    @(negedge clk);
    a = x; b = z; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 1;
    while (!done && n < 100) begin
      @(negedge clk);
      n++;
    end
    checks += 2;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h / %h: got %h expected %h", x, z, y, exp_y);
    end
    if (n != LATENCY) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d, expected %0d", n, LATENCY);
    end
    checks++;
    if (dz !== (z[30:23] == 8'd0 && x[30:23] != 8'd0)) begin
      failures++;
      $display("FAIL div_by_zero flag %b for %h / %h", dz, x, z);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(32'h3f800000, 32'h40400000);        // 1/3
    run(32'h40400000, 32'h3f800000);
    run(32'hc1200000, 32'h40000000);
    run(32'h00000000, 32'h40000000);        // zero dividend
    run(32'h3f800000, 32'h00000000);        // zero divisor
    run(32'h3fffffff, 32'h3f800001);
    for (int i = 0; i < 3000; i++) run(rand_fp(30), rand_fp(30));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
