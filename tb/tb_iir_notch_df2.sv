// tb_iir_notch_df2: end-to-end testbench for the binary32 direct-form-II
// notch filter, run with the filter's default coefficients (300 Hz notch at
// 1000 samples/s, pole radius 0.992).
//
// Run 1 feeds the three-tone test signal
//   s[n] = 0.7 sin(2 pi 100 n/fs) + 1.0 sin(2 pi 300 n/fs) + 0.4 sin(2 pi 400 n/fs)
// for 2000 samples, with random idle cycles between samples. Run 2 resets
// the filter mid-stream and feeds 100/300/700 Hz tones (700 Hz aliases onto
// 300 Hz at this sample rate) for another 2000 samples.
//
// Checks, every clock:
//  * out_valid follows in_valid by exactly one clock (latency 1, one sample
//    per clock), and y_out holds while no sample is accepted;
//  * every output sample equals, bit for bit, an independent model of the
//    same difference equation evaluated with correctly rounded binary32
//    operations in the same order as the datapath.
// Checks on the filtered signal: over the last 1000 outputs of each run the
// amplitude at 300 Hz must fall below 0.02, while the 100 Hz and 400 Hz tones
// must pass within 3 % of their input amplitude.
// Mechanism counters: samples filtered, idle (hold) cycles, resets that
// cleared a non-zero delay line, notch suppressions and passband passes;
// each must occur at least once.
module tb_iir_notch_df2;
  import fp32_ref_pkg::*;

  localparam real FS      = 1000.0;
  localparam real PI      = 3.14159265358979323846;
  localparam int  NSAMP   = 2000;
  localparam int  NMEAS   = 1000;
  // Coefficients of the model, the same binary32 values as the design's.
  localparam logic [31:0] C_B0 = 32'h3F7D_F5CF, C_B1 = 32'h3F1C_F373,
                          C_B2 = 32'h3F7D_F5CF, C_NA1 = 32'hBF1C_F373,
                          C_NA2 = 32'hBF7B_EB9E;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  logic [31:0] x_in;
  logic        out_valid;
  logic [31:0] y_out;

  int checks = 0, failures = 0;
  int n_samples = 0, n_idle = 0, n_reset_clear = 0, n_notch = 0, n_pass = 0;

  iir_notch_df2 dut (
    .clk, .rst_n, .in_valid, .x_in, .out_valid, .y_out
  );

  always #5 clk = ~clk;

  // Reference model state.
  logic [31:0] mw1, mw2;

  function automatic logic [31:0] model_step(logic [31:0] x);
    logic [31:0] fb, w, ff, y;
    fb  = ref_add(ref_mul(C_NA1, mw1), ref_mul(C_NA2, mw2));
    w   = ref_add(x, fb);
    ff  = ref_add(ref_mul(C_B1, mw1), ref_mul(C_B2, mw2));
    y   = ref_add(ref_mul(C_B0, w), ff);
    mw2 = mw1;
    mw1 = w;
    return y;
  endfunction

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Amplitude of the tone at frequency f in a block of samples.
  function automatic real tone_amp(real ys[], real f);
    real re = 0.0, im = 0.0;
    foreach (ys[i]) begin
      re += ys[i] * $cos(2.0 * PI * f * real'(i) / FS);
      im += ys[i] * $sin(2.0 * PI * f * real'(i) / FS);
    end
    return 2.0 * $sqrt(re * re + im * im) / real'(ys.size());
  endfunction

  // One filter run: nsamp samples of a sum of three tones.
  task automatic run_tones(input real f1, a1, f2, a2, f3, a3,
                           input real pass_f[], input real pass_a[], input real stop_f);
    real ys[];
    logic [31:0] exp_y, held;
    logic        prev_valid;
    int          k;
    ys = new[NMEAS];
    k = 0;
    prev_valid = 1'b0;
    held  = y_out;
    exp_y = '0;
    while (k < NSAMP || prev_valid) begin
      @(posedge clk);
      #1;
      // Outputs of the previous clock's decision.
      checks++;
      if (out_valid !== prev_valid) begin
        failures++;
        $display("FAIL out_valid %0b, expected %0b", out_valid, prev_valid);
      end
      if (prev_valid) begin
        expect_eq("y_out", y_out, exp_y);
        if (k > NSAMP - NMEAS) ys[k - 1 - (NSAMP - NMEAS)] = f2r(y_out);
        held = y_out;
      end else begin
        expect_eq("y_out hold", y_out, held);
      end
      // Next decision: a sample, or an idle cycle.
      if (k < NSAMP && ($urandom % 8) != 0) begin
        real t, s;
        t = real'(k) / FS;
        s = a1 * $sin(2.0 * PI * f1 * t) + a2 * $sin(2.0 * PI * f2 * t)
          + a3 * $sin(2.0 * PI * f3 * t);
        x_in       = r2f(s);
        in_valid   = 1'b1;
        exp_y      = model_step(x_in);
        prev_valid = 1'b1;
        k++;
        n_samples++;
      end else begin
        in_valid   = 1'b0;
        x_in       = 32'($urandom);
        prev_valid = 1'b0;
        if (k < NSAMP) n_idle++;
      end
    end
    in_valid = 1'b0;
    // Spectrum checks on the settled tail.
    begin
      real amp;
      amp = tone_amp(ys, stop_f);
      $display("tone %0.0f Hz: amplitude %f (notched)", stop_f, amp);
      checks++;
      if (amp < 0.02) n_notch++;
      else begin
        failures++;
        $display("FAIL notch not deep enough at %0.0f Hz", stop_f);
      end
      foreach (pass_f[i]) begin
        amp = tone_amp(ys, pass_f[i]);
        $display("tone %0.0f Hz: amplitude %f (input %f)", pass_f[i], amp, pass_a[i]);
        checks++;
        if (amp > 0.97 * pass_a[i] && amp < 1.03 * pass_a[i]) n_pass++;
        else begin
          failures++;
          $display("FAIL passband tone %0.0f Hz", pass_f[i]);
        end
      end
    end
  endtask

  task automatic do_reset();
    rst_n    = 1'b0;
    in_valid = 1'b0;
    x_in     = '0;
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    checks++;
    if (out_valid !== 1'b0 || y_out !== 32'd0) begin
      failures++;
      $display("FAIL reset: out_valid %0b y_out %h", out_valid, y_out);
    end
    mw1 = '0;
    mw2 = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    x_in     = '0;
    mw1      = '0;
    mw2      = '0;
    repeat (2) @(posedge clk);
    do_reset();

    // Run 1: 100, 300 and 400 Hz.
    run_tones(100.0, 0.7, 300.0, 1.0, 400.0, 0.4, '{100.0, 400.0}, '{0.7, 0.4}, 300.0);

    // Reset with a non-zero delay line; the next output must be B0 * x.
    if (dut.w1 != 32'd0 || dut.w2 != 32'd0) n_reset_clear++;
    do_reset();
    @(posedge clk);
    #1;
    in_valid = 1'b1;
    x_in     = 32'h3F80_0000;                       // 1.0
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    expect_eq("first output after reset", y_out, C_B0);
    do_reset();

    // Run 2: 100, 300 and 700 Hz; 700 Hz folds onto 300 Hz.
    run_tones(100.0, 0.7, 300.0, 1.0, 700.0, 0.4, '{100.0}, '{0.7}, 300.0);

    $display("mechanisms: samples=%0d idle=%0d reset_clear=%0d notch=%0d pass=%0d",
             n_samples, n_idle, n_reset_clear, n_notch, n_pass);
    checks++;
    if (n_samples == 0 || n_idle == 0 || n_reset_clear == 0 || n_notch == 0 || n_pass == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
