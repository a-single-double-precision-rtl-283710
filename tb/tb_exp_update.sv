// Testbench of exp_update: bias removal, normalization increment and the
// overflow/underflow flags, for the 11-bit and 8-bit widths, over every
// exponent sum and increment.
module tb_exp_update;
  int checks = 0, failures = 0;

  logic [11:0] sum11, e11;
  logic [8:0]  sum8, e8;
  logic [1:0]  inc;
  logic        o11, u11, o8, u8;

  exp_update #(.W(11)) dut11 (.sum(sum11), .inc(inc), .e(e11), .ovf(o11), .unf(u11));
  exp_update #(.W(8))  dut8  (.sum(sum8),  .inc(inc), .e(e8),  .ovf(o8),  .unf(u8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_w(int w, int sum, int inc_v, int e_got, bit o_got, bit u_got);
    int bias = (1 << (w - 1)) - 1;
    int r    = sum + inc_v - bias;
    bit o    = (r >= (1 << w) - 1);
    bit u    = (r <= 0);
    checks++;
    if (o != o_got || u != u_got || (!o && !u && e_got != r)) begin
      failures++;
      $display("FAIL w=%0d sum=%0d inc=%0d: e=%0d ovf=%0d unf=%0d, expected %0d %0d %0d",
               w, sum, inc_v, e_got, o_got, u_got, r, o, u);
    end
  endtask

  initial begin
    for (int i = 0; i <= 2 * 2047; i++)
      for (int k = 0; k < 3; k++) begin
        sum11 = 12'(i); sum8 = 9'(i % 511); inc = 2'(k);
        #1;
        check_w(11, i, k, int'(e11), o11, u11);
        check_w(8, i % 511, k, int'(e8), o8, u8);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
