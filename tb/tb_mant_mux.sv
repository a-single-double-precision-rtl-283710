// Testbench of mant_mux: selects the double mantissa in double mode and the
// packed single mantissas in single mode.
module tb_mant_mux;
  import fpm_pkg::*;
  int checks = 0, failures = 0;
  mode_e       sw;
  logic [52:0] m_dbl, m_sgl, m;

  mant_mux dut (.sw(sw), .m_dbl(m_dbl), .m_sgl(m_sgl), .m(m));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      m_dbl = {$urandom, $urandom} & 53'h1F_FFFF_FFFF_FFFF;
      m_sgl = ~m_dbl;
      sw    = (i % 2 == 0) ? MODE_DOUBLE : MODE_SINGLE;
      #1;
      checks++;
      if (m !== ((i % 2 == 0) ? m_dbl : m_sgl)) begin
        failures++;
        $display("FAIL mode=%s m=%h", sw.name(), m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
