// fp_sub: single precision floating-point subtractor, one register stage.
//
// y = a - b, rounded to nearest even. The operand of larger magnitude is
// taken as the base; the other is shifted right by the exponent difference
// into a significand extended by 27 fraction bits, with everything shifted
// out collapsed into a sticky bit, so the sum is exact enough for correct
// rounding. The sum is normalised with a leading-zero count, rounded, and
// checked for overflow (infinity) and underflow (signed zero). Subnormal
// inputs are read as zero; an exact zero difference is +0. Infinities and
// NaNs get no special treatment. Format and rounding are this design's
// choices. Timing: as fp_mul, one clock from in_valid to out_valid.
module fp_sub
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
    logic        sa, sb, sbig;
    logic [7:0]  ea, eb, ebig, esml, d;
    logic [23:0] mbig, msml;
    logic [50:0] xbig, xsml;
    logic [51:0] sum;
    logic [50:0] nrm;
    logic [23:0] mt;
    logic [24:0] m;
    logic        g, st, sub, az, bz;
    logic [5:0]  lz;
    logic signed [10:0] e;

    nrm = '0;
    st  = 1'b0;
    y_c = '0;
    sa = a[31];
    sb = ~b[31];                          // a - b = a + (-b)
    ea = a[30:23];
    eb = b[30:23];
    az = (ea == 8'd0);
    bz = (eb == 8'd0);
    if ({ea, a[22:0]} >= {eb, b[22:0]}) begin
      sbig = sa; ebig = ea; esml = eb;
      mbig = {1'b1, a[22:0]}; msml = {1'b1, b[22:0]};
    end else begin
      sbig = sb; ebig = eb; esml = ea;
      mbig = {1'b1, b[22:0]}; msml = {1'b1, a[22:0]};
    end
    sub  = sa ^ sb;
    d    = ebig - esml;
    xbig = {mbig, 27'd0};
    xsml = {msml, 27'd0};
    if (d > 8'd50) xsml = 51'd1;
    else begin
      for (int i = 0; i < 51; i++)
        if (i < int'(d) && xsml[i]) st = 1'b1;
      xsml = (xsml >> d) | {50'd0, st};
    end
    sum = sub ? ({1'b0, xbig} - {1'b0, xsml}) : ({1'b0, xbig} + {1'b0, xsml});

    lz = 6'd0;
    for (int i = 0; i <= 50; i++)
      if (sum[i]) lz = 6'(50 - i);
    if (sum[51]) begin
      mt = sum[51:28];
      g  = sum[27];
      st = |sum[26:0];
      e  = 11'(signed'({3'b0, ebig})) + 11'sd1;
    end else begin
      nrm = sum[50:0] << lz;
      mt  = nrm[50:27];
      g   = nrm[26];
      st  = |nrm[25:0];
      e   = 11'(signed'({3'b0, ebig})) - 11'(signed'({5'b0, lz}));
    end
    m = {1'b0, mt};
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 11'sd1;
    end

    if (az && bz)         y_c = {sa & sb, 31'd0};
    else if (bz)          y_c = a;
    else if (az)          y_c = {sb, b[30:0]};
    else if (sum == 52'd0) y_c = 32'd0;
    else if (e <= 11'sd0) y_c = {sbig, 31'd0};
    else if (e >= 11'sd255) y_c = {sbig, 8'hff, 23'd0};
    else                  y_c = {sbig, e[7:0], m[22:0]};
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
