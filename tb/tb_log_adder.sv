// Self-checking testbench for the log-domain adder. The reference adds the
// mantissas as integers, and on overflow past 2^(N-1) moves one into the
// characteristic, checking both the carry and the no-carry case.
module tb_log_adder;
  localparam int unsigned N = 32;
  localparam int unsigned L = $clog2(N);

  logic [L-1:0] k1, k2;
  logic [N-2:0] m1, m2;
  logic [L:0]   ksum;
  logic [N-2:0] msum;
  int checks = 0, failures = 0;
  int carries = 0, no_carries = 0;

  log_adder #(.N(N)) dut (.k1(k1), .m1(m1), .k2(k2), .m2(m2), .ksum(ksum), .msum(msum));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint unsigned ms;
      int unsigned ke;
      k1 = L'($urandom);
      k2 = L'($urandom);
      m1 = (N-1)'($urandom);
      m2 = (N-1)'($urandom);
      #1;
      ms = longint'(m1) + longint'(m2);
      ke = k1 + k2;
      if (ms >= (longint'(1) << (N - 1))) begin
        ms -= longint'(1) << (N - 1);
        ke++;
        carries++;
      end else begin
        no_carries++;
      end
      checks++;
      if (int'(ksum) != ke || longint'(msum) != ms) begin
        failures++;
        $display("FAIL k=%0d,%0d m=%h,%h -> %0d/%h expected %0d/%h", k1, k2, m1, m2, ksum, msum, ke, ms);
      end
    end
    checks++;
    if (carries == 0 || no_carries == 0) begin
      failures++;
      $display("FAIL carry coverage: %0d carries, %0d without", carries, no_carries);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
