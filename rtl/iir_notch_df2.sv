// iir_notch_df2: second-order IIR notch (narrow band stop) filter, direct
// form II, on IEEE-754 single-precision samples.
//
// Transfer function (pole radius r, notch angle alpha = 2*pi*f_notch/f_s):
//   T(z) = 1/2 * ((1+r^2) - 4 r cos(alpha) z^-1 + (1+r^2) z^-2)
//                / (1 - 2 r cos(alpha) z^-1 + r^2 z^-2)
// so B0 = B2 = (1+r^2)/2, B1 = A1 = -2 r cos(alpha), A2 = r^2. The zeros sit
// on the unit circle at the notch frequency and the poles just inside it, so
// only a narrow band around the notch is suppressed.
//
// Direct form II keeps a single two-deep delay line of the internal state w:
//   w[n] = x[n] + ( (-A1) * w[n-1] + (-A2) * w[n-2] )
//   y[n] = B0 * w[n] + ( B1 * w[n-1] + B2 * w[n-2] )
// The grouping of the additions follows the summing nodes of the block
// diagram: the two feedback products are summed first and then added to
// the input; the two delayed feed-forward products are summed first and then
// added to B0 * w[n]. The feedback multipliers are given the negated
// coefficients -A1 and -A2 directly. Five binary32 multipliers (fp_mul) and
// four binary32 adders (fp_add) form one combinational path per sample.
//
// Default coefficients: r = 0.992 and a 300 Hz notch at 1000 samples/s
// (alpha = 0.6*pi), both from the filter's specification. Each coefficient is
// that real value rounded to the nearest binary32 number:
//   B0 = B2 = 0.992032 (0x3F7DF5CF), B1 = 0.61309 (0x3F1CF373),
//   -A1 = -0.61309 (0xBF1CF373), -A2 = -0.984064 (0xBF7BEB9E).
//
// Interface: x_in is presented with in_valid high for one clock per sample.
// On that clock the state advances (w[n-1] -> w[n-2], w[n] -> w[n-1]) and
// y_out is registered. Timing: latency one clock (out_valid follows in_valid
// by one cycle), throughput one sample per clock; with in_valid low the
// state and output hold. rst_n is an active-low synchronous reset that
// clears the delay line to +0. The valid handshake, the reset and the
// single-cycle schedule are this design's choices.
module iir_notch_df2
  import fp32_pkg::*;
#(
  parameter logic [31:0] B0     = 32'h3F7D_F5CF,
  parameter logic [31:0] B1     = 32'h3F1C_F373,
  parameter logic [31:0] B2     = 32'h3F7D_F5CF,
  parameter logic [31:0] NEG_A1 = 32'hBF1C_F373,
  parameter logic [31:0] NEG_A2 = 32'hBF7B_EB9E
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x_in,
  output logic        out_valid,
  output logic [31:0] y_out
);

  // Delay line (the two z^-1 elements).
  logic [31:0] w1, w2;

  // Feedback half.
  logic [31:0] fb1, fb2, fb_sum, w0;
  fp_mul u_mul_a1 (.a(NEG_A1), .b(w1), .y(fb1));
  fp_mul u_mul_a2 (.a(NEG_A2), .b(w2), .y(fb2));
  fp_add u_add_fb (.a(fb1),    .b(fb2), .y(fb_sum));
  fp_add u_add_in (.a(x_in),   .b(fb_sum), .y(w0));

  // Feed-forward half.
  logic [31:0] ff0, ff1, ff2, ff_sum, y_next;
  fp_mul u_mul_b0 (.a(B0), .b(w0), .y(ff0));
  fp_mul u_mul_b1 (.a(B1), .b(w1), .y(ff1));
  fp_mul u_mul_b2 (.a(B2), .b(w2), .y(ff2));
  fp_add u_add_ff (.a(ff1), .b(ff2),    .y(ff_sum));
  fp_add u_add_y  (.a(ff0), .b(ff_sum), .y(y_next));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w1        <= '0;
      w2        <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        w2    <= w1;
        w1    <= w0;
        y_out <= y_next;
      end
    end
  end

endmodule
