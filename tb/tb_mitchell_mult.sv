// End-to-end testbench of the Mitchell multiplier at its default width.
//
// Reference: with a = 2^k1 + r1 and b = 2^k2 + r2 (0 <= r < 2^k), Mitchell's
// product is, exactly and without rounding,
//   2^(k1+k2) + r1*2^k2 + r2*2^k1        if r1*2^k2 + r2*2^k1 <  2^(k1+k2)
//   2 * (r1*2^k2 + r2*2^k1)              otherwise (mantissa carry)
// and 0 when either operand is 0. The testbench also checks the error bound
// (the result never exceeds a*b and is at least 8/9 of it), reports the mean
// relative error, and counts each mechanism: zero operand, mantissa carry,
// small-characteristic decode and large-characteristic decode.
module tb_mitchell_mult;
  import mitchell_pkg::*;
  localparam int unsigned N = DEFAULT_N;
  localparam int unsigned NVEC = 100000;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  int n_zero = 0, n_carry = 0, n_small = 0, n_large = 0;
  real err_sum = 0.0, err_max = 0.0;
  int  n_err = 0;

  mitchell_mult dut (.a(a), .b(b), .p(p));

  function automatic int msb_pos(logic [N-1:0] v);
    for (int j = N - 1; j >= 0; j--) if (v[j]) return j;
    return -1;
  endfunction

  task automatic apply(logic [N-1:0] va, logic [N-1:0] vb);
    logic [2*N+1:0] expv, exact, xsum;
    int k1, k2, c;
    real rel;
    a = va;
    b = vb;
    #1;
    exact = (2*N+8)'(va) * (2*N+8)'(vb);
    if (va == '0 || vb == '0) begin
      expv = '0;
      n_zero++;
    end else begin
      k1 = msb_pos(va);
      k2 = msb_pos(vb);
      xsum = (((2*N+8)'(va) - ((2*N+8)'(1) << k1)) << k2)
            + (((2*N+8)'(vb) - ((2*N+8)'(1) << k2)) << k1);
      c = k1 + k2;
      if (xsum < ((2*N+8)'(1) << (k1 + k2))) begin
        expv = ((2*N+8)'(1) << (k1 + k2)) + xsum;
      end else begin
        expv = xsum << 1;
        c++;
        n_carry++;
      end
      if (c >= N - 1) n_large++;
      else n_small++;
      // error bound of Mitchell's method: 8/9 * a*b <= p <= a*b
      checks++;
      if ((2*N+8)'(p) > exact || 9 * (2*N+8)'(p) < 8 * exact) begin
        failures++;
        $display("FAIL bound a=%h b=%h p=%h exact=%h", va, vb, p, exact);
      end
      rel = (real'(exact) - real'(p)) / real'(exact);
      err_sum += rel;
      n_err++;
      if (rel > err_max) err_max = rel;
    end
    checks++;
    if ((2*N+8)'(p) !== expv) begin
      failures++;
      $display("FAIL a=%h b=%h p=%h expected %h", va, vb, p, expv);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corner cases
    apply('0, '0);
    apply('0, '1);
    apply('1, '0);
    apply(1, 1);
    apply('1, '1);
    apply(3, 3);            // x1 + x2 = 1: carry with zero mantissa
    apply(6, 12);           // worst case x1 = x2 = 0.5 -> 1/9 error
    apply((N)'(3) << (N - 2), (N)'(3) << (N - 2));
    for (int i = 0; i < N; i++) apply((N)'(1) << i, '1);
    // random operands of random magnitude, with some zeros
    for (int i = 0; i < NVEC; i++) begin
      logic [N-1:0] va, vb;
      va = N'($urandom) >> $urandom_range(0, N - 1);
      vb = N'($urandom) >> $urandom_range(0, N - 1);
      if (i % 50 == 0) va = '0;
      if (i % 50 == 25) vb = '0;
      apply(va, vb);
    end
    $display("mean relative error %0.3f %%, worst %0.3f %% over %0d products",
             100.0 * err_sum / n_err, 100.0 * err_max, n_err);
    $display("zero operands %0d, mantissa carries %0d, small characteristic %0d, large characteristic %0d",
             n_zero, n_carry, n_small, n_large);
    checks++;
    if (n_zero == 0 || n_carry == 0 || n_small == 0 || n_large == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
