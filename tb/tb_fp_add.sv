// tb_fp_add: self-checking testbench for the binary32 adder.
//
// Directed cases cover signed zeros, exact cancellation, infinities, NaN,
// overflow, flush-to-zero underflow, subnormal inputs and rounding ties.
// Random cases use operands with close exponents (massive cancellation and
// carry), far-apart exponents (sticky-bit rounding) and the full normal
// range. Each result must match the reference model bit for bit. One
// operation is applied per clock; a watchdog stops the run after a fixed
// number of clocks.
module tb_fp_add;
  import fp32_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  int cycles = 0;

  fp_add dut (.a(a), .b(b), .y(y));

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
        $display("FAIL add %h + %h = %h, expected %h", ta, tb_, y, expect_y);
    end
  endtask

  task automatic check_ref(input logic [31:0] ta, input logic [31:0] tb_);
    check(ta, tb_, ref_add(ta, tb_));
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
    check(32'h3F80_0000, 32'h3F80_0000, 32'h4000_0000);  // 1 + 1 = 2
    check(32'h3F80_0000, 32'hBF80_0000, 32'h0000_0000);  // 1 - 1 = +0
    check(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);  // -0 + -0 = -0
    check(32'h8000_0000, 32'h0000_0000, 32'h0000_0000);  // -0 + +0 = +0
    check(32'h4049_0FDB, 32'h0000_0000, 32'h4049_0FDB);  // x + 0 = x
    check(32'h7F80_0000, 32'h3F80_0000, 32'h7F80_0000);  // inf + 1
    check(32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000);  // inf - inf = NaN
    check(32'h7FC0_0001, 32'h3F80_0000, 32'h7FC0_0000);  // NaN in
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 32'h7F80_0000);  // overflow
    check(32'h0080_0001, 32'h8080_0000, 32'h0000_0000);  // underflow flushed
    check(32'h0000_0001, 32'h3F80_0000, 32'h3F80_0000);  // subnormal read as 0
    check(32'h4B80_0000, 32'h3F80_0000, 32'h4B80_0000);  // 2^24 + 1: tie to even
    check(32'h4B80_0000, 32'h4000_0000, 32'h4B80_0001);  // 2^24 + 2
    check(32'h4B80_0000, 32'h4040_0000, 32'h4B80_0002);  // 2^24 + 3: tie up to even
    check(32'h3F80_0000, 32'h3380_0000, 32'h3F80_0000);  // 1 + 2^-24: tie to even
    check(32'h3F80_0001, 32'h3380_0000, 32'h3F80_0002);  // tie rounds up to even
    check(32'h3F80_0000, 32'hB380_0000, 32'h3F7F_FFFF);  // 1 - 2^-24, exact
    check(32'h3F80_0000, 32'h4000_0000, 32'h4040_0000);  // 1 + 2 = 3
    check(32'h3DCC_CCCD, 32'h3E4C_CCCD, 32'h3E99_999A);  // 0.1 + 0.2

    // Random: close exponents.
    repeat (20000) begin
      logic [31:0] ra, rb;
      ra = rand_fp(100, 150);
      rb = {1'($urandom), 8'(int'(ra[30:23]) + int'($urandom % 3) - 1), 23'($urandom)};
      check_ref(ra, rb);
    end
    // Random: exponent differences up to 40.
    repeat (20000) begin
      logic [31:0] ra, rb;
      ra = rand_fp(60, 190);
      rb = {1'($urandom), 8'(int'(ra[30:23]) - int'($urandom % 41)), 23'($urandom)};
      check_ref(ra, rb);
    end
    // Random: full normal range, including near overflow and underflow.
    repeat (20000) check_ref(rand_fp(1, 254), rand_fp(1, 254));
    repeat (5000)  check_ref(rand_fp(1, 4), rand_fp(1, 4));
    repeat (5000)  check_ref(rand_fp(252, 254), rand_fp(252, 254));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
