// Self-checking testbench for the normalising shifter. For random operands
// a with leading one at k, the mantissa must equal (a - 2^k) * 2^(N-1-k).
module tb_norm_shifter;
  localparam int unsigned N = 32;
  localparam int unsigned L = $clog2(N);

  logic [N-1:0] a;
  logic [L-1:0] k;
  logic [N-2:0] mant;
  int checks = 0, failures = 0;

  norm_shifter #(.N(N)) dut (.a_low(a[N-2:0]), .k(k), .mant(mant));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int unsigned kk;
      longint unsigned expv;
      kk = (i < N) ? i : $urandom_range(0, N - 1);
      a  = ((N)'(1) << kk) | (N'($urandom) & (((N)'(1) << kk) - 1));
      k  = L'(kk);
      #1;
      expv = (longint'(a) - (longint'(1) << kk)) << (N - 1 - kk);
      checks++;
      if (mant !== (N-1)'(expv)) begin
        failures++;
        $display("FAIL a=%h k=%0d mant=%h expected %h", a, kk, mant, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
