// Testbench of carry_net: carry out of the 22-bit sum of the low carry-save
// bits, against a wide integer addition.
module tb_carry_net;
  int checks = 0, failures = 0;
  logic [21:0] c, s;
  logic        cout;

  carry_net #(.K(22)) dut (.c(c), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      c = 22'($urandom);
      s = (i % 3 == 0) ? 22'(-c) : (i % 3 == 1) ? 22'(~c) : 22'($urandom);
      #1;
      checks++;
      if (cout != ((int'(c) + int'(s)) >= (1 << 22))) begin
        failures++;
        $display("FAIL c=%h s=%h cout=%b", c, s, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
