// tb_notch_response: measures the magnitude response of the notch filter
// and compares it with the analytic response of its transfer function.
//
// Three filters run side by side on the same input, all with the notch at
// alpha = 0.6*pi (300 Hz at 1000 samples/s):
//   * the default configuration, pole radius r = 0.992;
//   * r = 0.9 and r = 0.99, the two radii whose responses are usually
//     compared to show how the pole radius sets the notch width.
// Coefficients: B0 = B2 = (1+r^2)/2, B1 = -2 r cos(alpha), -A1 = 2 r cos(alpha),
// -A2 = -r^2, each rounded to binary32. The testbench first recomputes these
// from r and alpha and checks the constants below against them.
//
// For each test frequency w = 2*pi*k/3000 a unit sine is applied for 1500
// settling samples and 3000 measured samples (an integer number of periods).
// The measured output amplitude must match |T(e^jw)|, evaluated in double
// precision from the binary32 coefficients, within 0.003 + 1 %. At alpha the
// gain must be below 0.02 (-34 dB) for every radius; it is not exactly zero
// because the zeros sit at beta, cos(beta) = 2 r cos(alpha) / (1 + r^2),
// which differs slightly from alpha (most for r = 0.9). The notch must also
// widen as r falls: the gain at 0.58*pi must be lowest for r = 0.9 and
// highest for r = 0.992.
module tb_notch_response;
  import fp32_ref_pkg::*;

  localparam real PI     = 3.14159265358979323846;
  localparam real ALPHA  = 0.6 * PI;
  localparam int  NSET   = 1500;
  localparam int  NWIN   = 3000;
  localparam int  NCFG   = 3;
  localparam int  NFREQ  = 13;

  // Per configuration: r, then B0, B1, B2, -A1, -A2 as binary32.
  localparam real         R_CFG [NCFG] = '{0.992, 0.9, 0.99};
  localparam logic [0:NCFG-1][0:4][31:0] C_CFG = '{
    '{32'h3F7DF5CF, 32'h3F1CF373, 32'h3F7DF5CF, 32'hBF1CF373, 32'hBF7BEB9E},
    '{32'h3F67AE14, 32'h3F0E6521, 32'h3F67AE14, 32'hBF0E6521, 32'hBF4F5C29},
    '{32'h3F7D73EB, 32'h3F1CA271, 32'h3F7D73EB, 32'hBF1CA271, 32'hBF7AE7D5}};
  // Test frequencies as k in w = 2*pi*k/3000 (w/pi = k/1500).
  localparam int K_LIST [NFREQ] = '{150, 300, 450, 750, 870, 885, 900, 915, 930,
                                    1000, 1050, 1200, 1350};

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  logic [31:0] x_in;
  logic [NCFG-1:0] out_valid;
  logic [31:0] y_out [NCFG];

  int checks = 0, failures = 0;

  iir_notch_df2 dut_r992 (.clk, .rst_n, .in_valid, .x_in, .out_valid(out_valid[0]), .y_out(y_out[0]));
  iir_notch_df2 #(.B0(C_CFG[1][0]), .B1(C_CFG[1][1]), .B2(C_CFG[1][2]),
                  .NEG_A1(C_CFG[1][3]), .NEG_A2(C_CFG[1][4]))
    dut_r90 (.clk, .rst_n, .in_valid, .x_in, .out_valid(out_valid[1]), .y_out(y_out[1]));
  iir_notch_df2 #(.B0(C_CFG[2][0]), .B1(C_CFG[2][1]), .B2(C_CFG[2][2]),
                  .NEG_A1(C_CFG[2][3]), .NEG_A2(C_CFG[2][4]))
    dut_r99 (.clk, .rst_n, .in_valid, .x_in, .out_valid(out_valid[2]), .y_out(y_out[2]));

  always #5 clk = ~clk;

  task automatic fail_if(input logic bad, input string msg);
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // |T(e^jw)| from binary32 coefficients.
  function automatic real mag(int c, real w);
    real b0, b1, b2, a1, a2, nr, ni, dr, di;
    b0 = f2r(C_CFG[c][0]); b1 = f2r(C_CFG[c][1]); b2 = f2r(C_CFG[c][2]);
    a1 = -f2r(C_CFG[c][3]); a2 = -f2r(C_CFG[c][4]);
    nr = b0 + b1 * $cos(w) + b2 * $cos(2.0 * w);
    ni = -(b1 * $sin(w) + b2 * $sin(2.0 * w));
    dr = 1.0 + a1 * $cos(w) + a2 * $cos(2.0 * w);
    di = -(a1 * $sin(w) + a2 * $sin(2.0 * w));
    return $sqrt((nr * nr + ni * ni) / (dr * dr + di * di));
  endfunction

  initial begin
    repeat (NFREQ * (NSET + NWIN + 4) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real amp_058 [NCFG];
    // The coefficient constants follow from r and alpha.
    for (int c = 0; c < NCFG; c++) begin
      real r;
      r = R_CFG[c];
      fail_if(C_CFG[c][0] != r2f((1.0 + r * r) / 2.0), "B0 constant");
      fail_if(C_CFG[c][1] != r2f(-2.0 * r * $cos(ALPHA)), "B1 constant");
      fail_if(C_CFG[c][2] != r2f((1.0 + r * r) / 2.0), "B2 constant");
      fail_if(C_CFG[c][3] != r2f(2.0 * r * $cos(ALPHA)), "-A1 constant");
      fail_if(C_CFG[c][4] != r2f(-r * r), "-A2 constant");
    end

    in_valid = 1'b0;
    x_in     = '0;
    foreach (K_LIST[fi]) begin
      real w, re [NCFG], im [NCFG];
      w = 2.0 * PI * real'(K_LIST[fi]) / real'(NWIN);
      rst_n = 1'b0;
      @(posedge clk);
      #1;
      rst_n = 1'b1;
      for (int c = 0; c < NCFG; c++) begin
        re[c] = 0.0;
        im[c] = 0.0;
      end
      for (int n = 0; n < NSET + NWIN + 1; n++) begin
        if (n < NSET + NWIN) begin
          in_valid = 1'b1;
          x_in     = r2f($sin(w * real'(n)));
        end else begin
          in_valid = 1'b0;
        end
        @(posedge clk);
        #1;
        // y_out now holds the output for sample n.
        if (n >= NSET) begin
          for (int c = 0; c < NCFG; c++) begin
            re[c] += f2r(y_out[c]) * $cos(w * real'(n));
            im[c] += f2r(y_out[c]) * $sin(w * real'(n));
          end
        end
      end
      for (int c = 0; c < NCFG; c++) begin
        real amp, expv;
        amp  = 2.0 * $sqrt(re[c] * re[c] + im[c] * im[c]) / real'(NWIN);
        expv = mag(c, w);
        $display("r=%0.3f w/pi=%0.4f measured %f expected %f", R_CFG[c],
                 real'(K_LIST[fi]) / 1500.0, amp, expv);
        fail_if(amp > expv * 1.01 + 0.003 || amp < expv * 0.99 - 0.003, "response mismatch");
        if (K_LIST[fi] == 900) fail_if(amp > 0.02, "notch shallower than -34 dB");
        if (K_LIST[fi] == 870) amp_058[c] = amp;
      end
    end
    // Wider notch for the smaller radius.
    fail_if(!(amp_058[1] < amp_058[2] && amp_058[2] < amp_058[0]), "notch width order");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
