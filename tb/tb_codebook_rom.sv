// tb_codebook_rom: checks the four rank-1 weight vectors [1 1], [1 -1],
// [1 j], [1 -j] over sqrt(2) against the 16-bit words +-2896 (Q3.12).
module tb_codebook_rom;
  import lte_pkg::*;
  pmi_t                 pmi;
  logic signed [15:0]   cb1, cb2;
  logic                 imag;
  int                   checks = 0, failures = 0;

  codebook_rom dut (.pmi_i(pmi), .cb1_o(cb1), .cb2_o(cb2), .cb2_imag_o(imag));

  // Expected antenna-1 weight as (real, imaginary) in units of 1/sqrt(2).
  int exp_re [4] = '{1, -1, 0, 0};
  int exp_im [4] = '{0, 0, 1, -1};

  initial begin
    for (int p = 0; p < 4; p++) begin
      int w_re, w_im, mag;
      pmi = pmi_t'(p);
      #1;
      mag  = int'($floor(4096.0 / $sqrt(2.0) + 0.5));
      w_re = imag ? 0 : int'(cb2);
      w_im = imag ? int'(cb2) : 0;
      checks++;
      if (int'(cb1) != mag) begin failures++; $display("FAIL pmi %0d: cb1=%0d", p, cb1); end
      checks++;
      if (w_re != exp_re[p] * mag || w_im != exp_im[p] * mag) begin
        failures++;
        $display("FAIL pmi %0d: w2=(%0d,%0d)", p, w_re, w_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
