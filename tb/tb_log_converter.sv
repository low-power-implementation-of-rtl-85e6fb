// Self-checking testbench for the binary-to-logarithm converter. For random
// non-zero operands of random width it checks that a = 2^k * (1 + mant/2^(N-1))
// exactly, with 0 <= mant < 2^(N-1); for zero it expects k = 0, mant = 0.
module tb_log_converter;
  localparam int unsigned N = 32;
  localparam int unsigned L = $clog2(N);

  logic [N-1:0] a;
  logic [L-1:0] k;
  logic [N-2:0] mant;
  int checks = 0, failures = 0;

  log_converter #(.N(N)) dut (.a(a), .k(k), .mant(mant));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0;
    #1;
    checks++;
    if (k !== '0 || mant !== '0) begin
      failures++;
      $display("FAIL zero operand: k=%0d mant=%h", k, mant);
    end
    for (int i = 0; i < 5000; i++) begin
      logic [2*N-1:0] rebuilt, full;
      a = N'($urandom) >> $urandom_range(0, N - 1);
      if (i < N) a = (N)'(1) << i;
      if (a == '0) a = 1;
      #1;
      // 2^k * (2^(N-1) + mant) must equal a * 2^(N-1)
      rebuilt = ((2*N)'(1) << (N - 1) | (2*N)'(mant)) << k;
      full    = (2*N)'(a) << (N - 1);
      checks++;
      if (rebuilt !== full) begin
        failures++;
        $display("FAIL a=%h k=%0d mant=%h", a, k, mant);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
