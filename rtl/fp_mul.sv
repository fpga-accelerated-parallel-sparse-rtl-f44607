// fp_mul: single precision floating-point multiplier, one register stage.
//
// y = a * b, rounded to nearest even. The 24x24-bit significand product is
// normalised by at most one bit, rounded with guard and sticky bits, and the
// exponent is checked for overflow (result infinity) and underflow (result
// signed zero). Subnormal inputs are read as zero and no subnormal is
// produced; infinities and NaNs are not given special treatment, because the
// factorization never creates them from finite, non-singular input. The
// number format and rounding are this design's choices: the multiplier is
// named but not specified beyond its role in the arithmetic logic.
// Timing: inputs sampled when in_valid is high, result and out_valid one
// clock later. A new operation may start every clock.
module fp_mul
  import lu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);

  fp32_t y_c;

  always_comb begin
    logic        s;
    logic [7:0]  ea, eb;
    logic [23:0] ma, mb;
    logic [47:0] p;
    logic [24:0] m;          // rounded significand with carry bit
    logic        g, st;
    logic signed [10:0] e;

    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    p  = ma * mb;
    if (p[47]) begin
      m  = {1'b0, p[47:24]};
      g  = p[23];
      st = |p[22:0];
      e  = 11'(signed'({3'b0, ea})) + 11'(signed'({3'b0, eb})) - 11'sd126;
    end else begin
      m  = {1'b0, p[46:23]};
      g  = p[22];
      st = |p[21:0];
      e  = 11'(signed'({3'b0, ea})) + 11'(signed'({3'b0, eb})) - 11'sd127;
    end
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 11'sd1;
    end
    if (ea == 8'd0 || eb == 8'd0 || e <= 11'sd0) y_c = {s, 31'd0};
    else if (e >= 11'sd255)                     y_c = {s, 8'hff, 23'd0};
    else                                        y_c = {s, e[7:0], m[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= y_c;
    end
  end

endmodule
