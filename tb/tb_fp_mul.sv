// tb_fp_mul: self-checking testbench for the binary32 multiplier.
//
// Directed cases cover signed zeros, infinities, NaN, infinity times zero,
// overflow, flush-to-zero underflow, subnormal inputs, rounding and the
// one-place normalisation of the product. Random cases cover moderate
// exponents, the full normal range and products near both range limits. Each result must match the reference model bit for bit. One
// operation is applied per clock; a watchdog stops the run after a fixed
// number of clocks.
module tb_fp_mul;
  import fp32_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  int cycles = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] expect_y);
    a = ta;
    b = tb_;
    @(posedge clk);
    #1;
    checks++;
    if (y !== expect_y) begin
      failures++;
      if (failures <= 10)
        $display("FAIL mul %h * %h = %h, expected %h", ta, tb_, y, expect_y);
    end
  endtask

  task automatic check_ref(input logic [31:0] ta, input logic [31:0] tb_);
    check(ta, tb_, ref_mul(ta, tb_));
  endtask

  initial begin
    // Watchdog.
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0;
    b = '0;
    // Directed values with known results.
    check(32'h3F80_0000, 32'h4049_0FDB, 32'h4049_0FDB);  // 1 * pi
    check(32'h4000_0000, 32'h4040_0000, 32'h40C0_0000);  // 2 * 3 = 6
    check(32'hBF80_0000, 32'h3F80_0000, 32'hBF80_0000);  // -1 * 1
    check(32'h0000_0000, 32'hBF80_0000, 32'h8000_0000);  // 0 * -1 = -0
    check(32'h7F80_0000, 32'hC000_0000, 32'hFF80_0000);  // inf * -2 = -inf
    check(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);  // inf * 0 = NaN
    check(32'h7FC0_0001, 32'h3F80_0000, 32'h7FC0_0000);  // NaN in
    check(32'h7F00_0000, 32'h4000_0000, 32'h7F80_0000);  // 2^127 * 2 overflows
    check(32'h0080_0000, 32'h3F00_0000, 32'h0000_0000);  // 2^-126 / 2 flushed
    check(32'h0000_0001, 32'h4000_0000, 32'h0000_0000);  // subnormal read as 0
    check(32'h3F80_0001, 32'h3F80_0001, 32'h3F80_0002);  // (1+u)^2 rounds to 1+2u
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF, 32'h407F_FFFE);  // carry normalisation
    check(32'h3DCC_CCCD, 32'h4120_0000, 32'h3F80_0000);  // 0.1 * 10 = 1
    check(32'h3F7D_F5CF, 32'h3F1C_F373, ref_mul(32'h3F7D_F5CF, 32'h3F1C_F373));

    // Random: moderate exponents, full range, near overflow and underflow.
    repeat (30000) check_ref(rand_fp(90, 160), rand_fp(90, 160));
    repeat (20000) check_ref(rand_fp(1, 254), rand_fp(1, 254));
    repeat (10000) check_ref(rand_fp(1, 70), rand_fp(50, 130));
    repeat (10000) check_ref(rand_fp(180, 254), rand_fp(120, 200));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
