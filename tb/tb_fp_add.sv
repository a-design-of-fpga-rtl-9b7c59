// tb_fp_add: self-checking test of the single-precision adder/subtractor.
// Random operands (wide exponent spread, and close exponents that cancel)
// are compared bit for bit against the simulator's own floating-point
// arithmetic: the exact sum is formed in double precision and rounded once
// to single precision, which gives the correctly rounded result. Expected
// subnormal results are taken as zero of either sign, as the unit flushes.
module tb_fp_add;
  import solver_pkg::*;
  import fp_ref_pkg::*;
  fp32_t a, b, s;
  logic  sub;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .sub(sub), .s(s));

  function automatic fp32_t rnd_fp(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + ($urandom % (emax - emin + 1)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  task automatic check_one(input fp32_t x, input fp32_t y, input logic sb);
    real r;
    fp32_t exp_bits;
    a = x; b = y; sub = sb;
    #1;
    r = sb ? (to_real(x) - to_real(y))
           : (to_real(x) + to_real(y));
    exp_bits = from_real(r);
    checks++;
    if (exp_bits[30:23] == 8'd0) begin
      if (s[30:0] != 31'd0) begin
        failures++;
        $display("FAIL %h %s %h: got %h, expected zero", x, sb ? "-" : "+", y, s);
      end
    end else if (s != exp_bits) begin
      failures++;
      $display("FAIL %h %s %h: got %h, expected %h", x, sb ? "-" : "+", y, s, exp_bits);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp32_t x, y;
    // directed cases
    check_one(32'h3f80_0000, 32'h3f80_0000, 1'b0);  // 1 + 1
    check_one(32'h3f80_0000, 32'h3f80_0000, 1'b1);  // 1 - 1
    check_one(32'h4049_0fdb, 32'h3f80_0000, 1'b1);  // pi - 1
    check_one(32'h3f80_0000, 32'h3380_0000, 1'b0);  // 1 + 2^-24 (tie, even)
    check_one(32'h3f80_0001, 32'h3380_0000, 1'b0);  // tie, round up
    check_one(32'h0000_0000, 32'hc2c8_0000, 1'b0);  // 0 + -100
    check_one(32'h7f7f_ffff, 32'h7f7f_ffff, 1'b0);  // overflow
    for (int n = 0; n < 4000; n++) begin
      x = rnd_fp(90, 160);
      y = rnd_fp(90, 160);
      check_one(x, y, 1'($urandom));
    end
    for (int n = 0; n < 4000; n++) begin
      x = rnd_fp(120, 130);
      y = {x[31:23] + 9'($urandom % 3) - 9'd1, 23'($urandom)};
      check_one(x, y, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
