// Self-checking testbench for the Mitchell decoder. For every characteristic
// c in 0..2N-1 and random mantissas f it expects
// floor((2^(N-1) + f) * 2^c / 2^(N-1)), computed with a wide integer, and
// counts how often the small and large characteristic cases were used.
module tb_mitchell_decoder;
  localparam int unsigned N = 32;
  localparam int unsigned L = $clog2(N);

  logic [L:0]     c;
  logic [N-2:0]   f;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  int small_cases = 0, large_cases = 0;

  mitchell_decoder #(.N(N)) dut (.c(c), .f(f), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cc = 0; cc < 2 * N; cc++) begin
      for (int i = 0; i < 60; i++) begin
        logic [3*N-1:0] wide;
        logic [2*N-1:0] expv;
        c = (L+1)'(cc);
        f = (i == 0) ? '0 : (i == 1) ? '1 : (N-1)'($urandom);
        #1;
        wide = (((3*N)'(1) << (N - 1)) | (3*N)'(f)) << cc;
        expv = (2*N)'(wide >> (N - 1));
        if (cc >= N - 1) large_cases++;
        else small_cases++;
        checks++;
        if (p !== expv) begin
          failures++;
          $display("FAIL c=%0d f=%h p=%h expected %h", cc, f, p, expv);
        end
      end
    end
    $display("small characteristic cases %0d, large %0d", small_cases, large_cases);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
