// Self-checking testbench for the zero detection unit: zero must be high
// exactly when either operand is zero.
module tb_zero_detect;
  localparam int unsigned N = 32;

  logic [N-1:0] a, b;
  logic         zero;
  int checks = 0, failures = 0;

  zero_detect #(.N(N)) dut (.a(a), .b(b), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = N'($urandom) >> $urandom_range(0, N - 1);
      b = N'($urandom) >> $urandom_range(0, N - 1);
      if (i % 4 == 1) a = '0;
      if (i % 4 == 2) b = '0;
      if (i % 8 == 3) begin a = '0; b = '0; end
      if (i % 8 == 7) begin a = (N)'(1) << (i % N); b = '1; end
      #1;
      checks++;
      if (zero !== (a == '0 || b == '0)) begin
        failures++;
        $display("FAIL a=%h b=%h zero=%b", a, b, zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
