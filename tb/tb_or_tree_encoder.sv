// Self-checking testbench for the OR-tree encoder: every one-hot input must
// encode to its bit index, and the all-zero input to zero.
module tb_or_tree_encoder;
  localparam int unsigned N = 32;
  localparam int unsigned L = $clog2(N);

  logic [N-1:0] h;
  logic [L-1:0] k;
  int checks = 0, failures = 0;

  or_tree_encoder #(.N(N)) dut (.h(h), .k(k));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h = '0;
    #1;
    checks++;
    if (k !== '0) begin
      failures++;
      $display("FAIL zero input gave k=%0d", k);
    end
    for (int j = 0; j < N; j++) begin
      h = (N)'(1) << j;
      #1;
      checks++;
      if (int'(k) != j) begin
        failures++;
        $display("FAIL h=%h k=%0d expected %0d", h, k, j);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
