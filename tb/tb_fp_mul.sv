// tb_fp_mul: checks fp_mul against the double-precision reference model on
// directed cases (signs, zero operands, equal operands, carries from
// rounding) and on random operands, and checks the one-clock latency.
module tb_fp_mul;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic [31:0] a = '0, b = '0, y;
  int checks = 0, failures = 0;

  fp_mul dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x, input logic [31:0] z);
    logic [31:0] exp_y;
    exp_y = ref_mul(x, z);
    @(negedge clk);
    a = x; b = z; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h mul %h: got %h (valid %b) expected %h", x, z, y, out_valid, exp_y);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(32'h3f800000, 32'h40000000);        // 1, 2
    run(32'h40400000, 32'h40400000);        // equal operands
    run(32'hc0a00000, 32'h3f000000);        // -5, 0.5
    run(32'h00000000, 32'h40490fdb);        // zero operand
    run(32'h40490fdb, 32'h00000000);
    run(32'h3f7fffff, 32'h33800000);        // rounding across a binade
    run(32'h3f800001, 32'h3f800000);        // cancellation
    run(32'h4b800000, 32'h3f800000);
    for (int i = 0; i < 3000; i++) run(rand_fp(20), rand_fp(20));
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] x;
      x = rand_fp(5);
      run(x, {x[31:2], 2'($urandom)});     // near-equal operands
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
