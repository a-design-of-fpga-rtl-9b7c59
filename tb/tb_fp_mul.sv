// tb_fp_mul: self-checking test of the single-precision multiplier.
// The product of two singles is exact in double precision, so rounding it
// once to single gives the correctly rounded reference. Random operands
// with short significands (many exact ties) and directed cases (ties,
// overflow, underflow, zero) are compared bit for
// bit; expected subnormal results are taken as zero, as the unit flushes.
module tb_fp_mul;
  import solver_pkg::*;
  import fp_ref_pkg::*;
  fp32_t a, b, p;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .p(p));

  function automatic fp32_t rnd_fp(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + ($urandom % (emax - emin + 1)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  task automatic check_one(input fp32_t x, input fp32_t y);
    real r;
    fp32_t exp_bits;
    a = x; b = y;
    #1;
    r = to_real(x) * to_real(y);
    exp_bits = from_real(r);
    checks++;
    if (exp_bits[30:23] == 8'd0) begin
      if (p[30:0] != 31'd0) begin
        failures++;
        $display("FAIL %h * %h: got %h, expected zero", x, y, p);
      end
    end else if (p != exp_bits) begin
      failures++;
      $display("FAIL %h * %h: got %h, expected %h", x, y, p, exp_bits);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'h3f80_0000, 32'h4049_0fdb);  // 1 * pi
    check_one(32'hc000_0000, 32'h4040_0000);  // -2 * 3
    check_one(32'h3fc0_0000, 32'h3fc0_0000);  // 1.5 * 1.5
    check_one(32'h0000_0000, 32'h4040_0000);  // 0 * 3
    check_one(32'h7f00_0000, 32'h4100_0000);  // overflow
    check_one(32'h0100_0000, 32'h0100_0000);  // underflow
    check_one(32'h3f80_0800, 32'h3f80_0800);  // exact tie, rounds to even (down)
    for (int n = 0; n < 8000; n++) check_one(rnd_fp(60, 190), rnd_fp(60, 190));
    // short significands: exact ties are frequent
    for (int n = 0; n < 2000; n++)
      check_one(rnd_fp(100, 150) & 32'hffff_fc00, rnd_fp(100, 150) & 32'hffff_fc00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
