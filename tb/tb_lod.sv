// Self-checking testbench for the parallel leading-one detector.
// Drives every single-bit vector, pairs of bits near and far apart (so
// that every prefix-OR level matters), zero, all-ones and random vectors with
// random widths, and compares h with a one-hot reference found by scanning
// from the MSB down.
module tb_lod;
  localparam int unsigned N = 32;

  logic [N-1:0] z, h;
  int checks = 0, failures = 0;

  lod #(.N(N)) dut (.z(z), .h(h));

  function automatic logic [N-1:0] ref_lod(logic [N-1:0] v);
    for (int j = N - 1; j >= 0; j--)
      if (v[j]) return (N)'(1) << j;
    return '0;
  endfunction

  task automatic check(logic [N-1:0] v);
    z = v;
    #1;
    checks++;
    if (h !== ref_lod(v)) begin
      failures++;
      $display("FAIL z=%h h=%h expected %h", v, h, ref_lod(v));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check('1);
    for (int j = 0; j < N; j++) begin
      check((N)'(1) << j);
      check(((N)'(1) << j) | ((N)'(1) << (j / 2)));
      check(((N)'(1) << (N - 1)) | ((N)'(1) << j));
    end
    for (int i = 0; i < 5000; i++)
      check(N'($urandom) >> ($urandom_range(0, N - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
