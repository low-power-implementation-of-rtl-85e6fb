// Error-statistics workload for the Mitchell multiplier at the three
// operand widths of the accuracy/power comparison: 8 bits (all 255 x 255
// non-zero operand pairs), 16 and 32 bits (uniformly random non-zero
// operands). It measures the mean and the worst relative error
// (a*b - p) / (a*b) and checks them against the expected figures for
// Mitchell's method: worst case 1/9 = 11.11 % at every width, mean about
// 3.8 % (3.77 %, 3.83 % and 3.87 % for 8, 16 and 32 bits), with a tolerance
// of 0.1 percentage point on the mean.
module tb_mitchell_error;
  localparam int unsigned NRAND = 200000;

  logic [7:0]  a8,  b8;
  logic [15:0] a16, b16;
  logic [31:0] a32, b32;
  logic [15:0] p8;
  logic [31:0] p16;
  logic [63:0] p32;
  int checks = 0, failures = 0;

  mitchell_mult #(.N(8))  u8  (.a(a8),  .b(b8),  .p(p8));
  mitchell_mult #(.N(16)) u16 (.a(a16), .b(b16), .p(p16));
  mitchell_mult #(.N(32)) u32 (.a(a32), .b(b32), .p(p32));

  task automatic judge(string name, real sum, real worst, int n, real mean_exp);
    real mean;
    mean = 100.0 * sum / n;
    $display("%s: mean relative error %0.3f %% (expected %0.2f %%), worst %0.3f %% over %0d products",
             name, mean, mean_exp, 100.0 * worst, n);
    checks++;
    if (mean < mean_exp - 0.1 || mean > mean_exp + 0.1) begin
      failures++;
      $display("FAIL %s mean relative error out of range", name);
    end
    checks++;
    if (worst > 1.0 / 9.0 + 1e-9) begin
      failures++;
      $display("FAIL %s worst relative error above 1/9", name);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real sum, worst, rel;
  int  n;

  initial begin

    sum = 0.0; worst = 0.0; n = 0;
    for (int idx = 0; idx < 255 * 255; idx++) begin
      int i, j;
      i = idx / 255 + 1;
      j = idx % 255 + 1;
      a8 = 8'(i);
      b8 = 8'(j);
      #1;
      rel = real'(i * j - int'(p8)) / real'(i * j);
      sum += rel;
      n++;
      if (rel > worst) worst = rel;
    end
    judge("8-bit", sum, worst, n, 3.77);
    checks++;
    if (worst < 0.111) begin
      failures++;
      $display("FAIL 8-bit worst case 1/9 not reached");
    end

    sum = 0.0; worst = 0.0; n = 0;
    for (int i = 0; i < NRAND; i++) begin
      longint unsigned ex;
      a16 = 16'($urandom_range(1, 65535));
      b16 = 16'($urandom_range(1, 65535));
      #1;
      ex = longint'(a16) * longint'(b16);
      rel = real'(ex - longint'(p16)) / real'(ex);
      sum += rel;
      n++;
      if (rel > worst) worst = rel;
    end
    judge("16-bit", sum, worst, n, 3.83);

    sum = 0.0; worst = 0.0; n = 0;
    for (int i = 0; i < NRAND; i++) begin
      logic [63:0] ex;
      a32 = $urandom();
      b32 = $urandom();
      if (a32 == 0) a32 = 1;
      if (b32 == 0) b32 = 1;
      #1;
      ex = 64'(a32) * 64'(b32);
      rel = (real'(ex) - real'(p32)) / real'(ex);
      sum += rel;
      n++;
      if (rel > worst) worst = rel;
    end
    judge("32-bit", sum, worst, n, 3.87);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
