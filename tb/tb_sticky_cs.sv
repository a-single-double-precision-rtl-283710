// Testbench of sticky_cs: T must be 1 exactly when the 22-bit sum of the two
// vectors is non-zero. A third of the cases are built to sum to zero, and
// many more to sum to a single set bit.
module tb_sticky_cs;
  int checks = 0, failures = 0;
  logic [21:0] c, s, sum;
  logic        t;

  sticky_cs #(.K(22)) dut (.c(c), .s(s), .t(t));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      c = 22'($urandom);
      case (i % 3)
        0:       s = 22'(-c);
        1:       s = 22'(-c) + (22'd1 << $urandom_range(0, 21));
        default: s = 22'($urandom);
      endcase
      #1;
      sum = c + s;
      checks++;
      if (t != (sum != 0)) begin
        failures++;
        $display("FAIL c=%h s=%h t=%b", c, s, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
