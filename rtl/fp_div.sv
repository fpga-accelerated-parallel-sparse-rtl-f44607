// fp_div: single precision floating-point divider, radix-2 sequential.
//
// y = a / b, rounded to nearest even. The significand quotient is built one
// bit per clock by restoring division: 26 quotient bits (weights 2^0 down to
// 2^-25) cover the 24 result bits and a guard bit whichever of [0.5,1) or
// [1,2) the quotient falls in, and a non-zero final remainder is the sticky
// bit. Subnormal inputs are read as zero; a zero divisor sets div_by_zero and
// gives infinity (the pivot of a non-singular matrix is never zero). The
// divider is named in the arithmetic logic without internals; the radix-2
// sequential scheme and the number format are this design's choices.
// Interface: pulse start with a and b while busy is low; done pulses with y
// LATENCY = 28 clocks after start. busy is high in between.
module fp_div
  import lu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t a,
  input  fp32_t b,
  output logic  busy,
  output logic  done,
  output fp32_t y,
  output logic  div_by_zero
);

  localparam int QBITS = 26;

  logic        s_q;
  logic [9:0]  e_q;          // biased exponent ea - eb + 127, 10 bits signed range
  logic [24:0] rem_q;        // partial remainder, < 2 * divisor
  logic [23:0] div_q;
  logic [QBITS-1:0] quo_q;
  logic [4:0]  cnt_q;
  logic        zero_q, dz_q;

  typedef enum logic [1:0] {D_IDLE, D_ITER, D_ROUND} dstate_e;
  dstate_e st_q;

  assign busy = (st_q != D_IDLE);

  // Rounding of the finished quotient.
  fp32_t y_c;
  always_comb begin
    logic [23:0] mt;
    logic [24:0] m;
    logic        g, sticky;
    logic signed [10:0] e;
    sticky = (rem_q != 25'd0);
    if (quo_q[QBITS-1]) begin
      mt = quo_q[QBITS-1:2];
      g  = quo_q[1];
      sticky = sticky | quo_q[0];
      e  = 11'(signed'(e_q));
    end else begin
      mt = quo_q[QBITS-2:1];
      g  = quo_q[0];
      e  = 11'(signed'(e_q)) - 11'sd1;
    end
    m = {1'b0, mt};
    if (g && (sticky || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 11'sd1;
    end
    if (dz_q)               y_c = {s_q, 8'hff, 23'd0};
    else if (zero_q || e <= 11'sd0) y_c = {s_q, 31'd0};
    else if (e >= 11'sd255) y_c = {s_q, 8'hff, 23'd0};
    else                    y_c = {s_q, e[7:0], m[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= D_IDLE;
      done <= 1'b0;
      y    <= '0;
      div_by_zero <= 1'b0;
      s_q <= 1'b0; e_q <= '0; rem_q <= '0; div_q <= '0; quo_q <= '0;
      cnt_q <= '0; zero_q <= 1'b0; dz_q <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        D_IDLE: if (start) begin
          s_q    <= a[31] ^ b[31];
          e_q    <= 10'({2'b0, a[30:23]}) - 10'({2'b0, b[30:23]}) + 10'd127;
          rem_q  <= {1'b0, 1'b1, a[22:0]};
          div_q  <= {1'b1, b[22:0]};
          zero_q <= (a[30:23] == 8'd0);
          dz_q   <= (b[30:23] == 8'd0);
          quo_q  <= '0;
          cnt_q  <= '0;
          st_q   <= D_ITER;
        end
        D_ITER: begin
          if (rem_q >= {1'b0, div_q}) begin
            quo_q <= {quo_q[QBITS-2:0], 1'b1};
            rem_q <= (rem_q - {1'b0, div_q}) << 1;
          end else begin
            quo_q <= {quo_q[QBITS-2:0], 1'b0};
            rem_q <= rem_q << 1;
          end
          cnt_q <= cnt_q + 5'd1;
          if (cnt_q == 5'(QBITS - 1)) st_q <= D_ROUND;
        end
        D_ROUND: begin
          y           <= y_c;
          div_by_zero <= dz_q && !zero_q;
          done        <= 1'b1;
          st_q        <= D_IDLE;
        end
        default: st_q <= D_IDLE;
      endcase
    end
  end

endmodule
