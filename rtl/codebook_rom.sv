// codebook_rom: precoding codebook for closed-loop rank-1 transmission on two
// antennas.
//
// The 2-bit precoder matrix estimation (PMI) selects one of the four LTE
// one-layer weight vectors w = [w1 w2]^T / sqrt(2):
//   PMI 00 -> [1  1]   PMI 01 -> [1 -1]   PMI 10 -> [1  j]   PMI 11 -> [1 -j]
// Each weight is given as a 16-bit Q3.12 word (0000101101010000 = +1/sqrt(2),
// 1111010010110000 = -1/sqrt(2)) plus a flag telling whether the weight lies
// on the imaginary axis, so that +-j/sqrt(2) needs no second word. The first
// weight is +1/sqrt(2) for every PMI, so antenna 0 always sends the same
// symbol. The weight vectors and the 16-bit words follow the design; the
// imaginary-axis flag is this design's way of carrying the j weights.
//
// Timing: purely combinational.
module codebook_rom
  import lte_pkg::*;
(
  input  pmi_t                 pmi_i,
  output logic signed [DW-1:0] cb1_o,      // weight of antenna 0 (real)
  output logic signed [DW-1:0] cb2_o,      // weight of antenna 1, magnitude/sign
  output logic                 cb2_imag_o  // antenna-1 weight is cb2_o * j
);

  always_comb begin
    cb1_o = CB_POS;
    unique case (pmi_i)
      2'b00: begin cb2_o = CB_POS; cb2_imag_o = 1'b0; end
      2'b01: begin cb2_o = CB_NEG; cb2_imag_o = 1'b0; end
      2'b10: begin cb2_o = CB_POS; cb2_imag_o = 1'b1; end
      default: begin cb2_o = CB_NEG; cb2_imag_o = 1'b1; end
    endcase
  end

endmodule
