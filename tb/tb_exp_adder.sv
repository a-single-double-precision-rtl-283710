// Testbench of exp_adder: the double-width (11-bit) and single-width (8-bit)
// adders against integer sums, random and corner operands.
module tb_exp_adder;
  int checks = 0, failures = 0;

  logic [10:0] ea11, eb11;
  logic [11:0] s11;
  logic [7:0]  ea8, eb8;
  logic [8:0]  s8;

  exp_adder #(.W(11)) dut11 (.ea(ea11), .eb(eb11), .sum(s11));
  exp_adder #(.W(8))  dut8  (.ea(ea8),  .eb(eb8),  .sum(s8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int a11, int b11, int a8, int b8);
    ea11 = 11'(a11); eb11 = 11'(b11); ea8 = 8'(a8); eb8 = 8'(b8);
    #1;
    checks += 2;
    if (int'(s11) != a11 + b11) begin failures++; $display("FAIL 11: %0d+%0d=%0d", a11, b11, s11); end
    if (int'(s8)  != a8 + b8)   begin failures++; $display("FAIL 8: %0d+%0d=%0d", a8, b8, s8); end
  endtask

  initial begin
    check(0, 0, 0, 0);
    check(2047, 2047, 255, 255);
    check(1023, 1024, 127, 128);
    for (int i = 0; i < 2000; i++)
      check(int'($urandom_range(0, 2047)), int'($urandom_range(0, 2047)),
            int'($urandom_range(0, 255)), int'($urandom_range(0, 255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
