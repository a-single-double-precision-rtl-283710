// Testbench of sign_xor: all four sign combinations.
module tb_sign_xor;
  int checks = 0, failures = 0;
  logic sa, sb, sp;

  sign_xor dut (.sa(sa), .sb(sb), .sp(sp));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {sa, sb} = 2'(i);
      #1;
      checks++;
      // the product is negative exactly when one operand is negative
      if (sp != ((i == 1) || (i == 2))) begin failures++; $display("FAIL %b%b -> %b", sa, sb, sp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
