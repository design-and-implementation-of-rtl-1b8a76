// precoder: rank-1 linear precoder for two transmit antennas.
//
// Each 64-QAM symbol s is multiplied by the weight vector chosen by the
// precoder matrix estimation (see codebook_rom):
//   y0 = w1 * s,  y1 = w2 * s
// giving one in-phase and one quadrature output per antenna. A real weight c
// scales both parts of s; an imaginary weight j*c gives re = -c*s.im,
// im = c*s.re. Products are Q3.12 x Q3.12, rounded to nearest back to Q3.12;
// with mapper inputs (|s.re|,|s.im| <= 7/sqrt(42)) no result can overflow.
// The design fixes the function and the 16-bit word format; the two-stage
// pipeline and rounding are this design's own.
//
// Timing: fully pipelined, one symbol per cycle, outputs valid two cycles
// after valid_i. pmi_i is sampled together with the symbol.
module precoder
  import lte_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid_i,
  input  cplx_t sym_i,
  input  pmi_t  pmi_i,
  output cplx_t ant0_o,
  output cplx_t ant1_o,
  output logic  valid_o
);

  localparam int unsigned PW = 2 * DW;

  logic signed [DW-1:0] cb1, cb2;
  logic                 cb2_imag;

  codebook_rom u_cb (
    .pmi_i      (pmi_i),
    .cb1_o      (cb1),
    .cb2_o      (cb2),
    .cb2_imag_o (cb2_imag)
  );

  // Stage 1: full-precision products.
  logic signed [PW-1:0] p0_re, p0_im, p1_re, p1_im;
  logic                 v1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1    <= 1'b0;
      p0_re <= '0;
      p0_im <= '0;
      p1_re <= '0;
      p1_im <= '0;
    end else begin
      v1 <= valid_i;
      if (valid_i) begin
        p0_re <= sym_i.re * cb1;
        p0_im <= sym_i.im * cb1;
        if (cb2_imag) begin
          p1_re <= -(sym_i.im * cb2);
          p1_im <= sym_i.re * cb2;
        end else begin
          p1_re <= sym_i.re * cb2;
          p1_im <= sym_i.im * cb2;
        end
      end
    end
  end

  // Round to nearest and return to Q3.12.
  function automatic logic signed [DW-1:0] rnd(input logic signed [PW-1:0] p);
    logic signed [PW-1:0] t;
    t = (p + (PW'(1) <<< (FRAC - 1))) >>> FRAC;
    return t[DW-1:0];
  endfunction

  // Stage 2: rounded outputs.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      ant0_o  <= '0;
      ant1_o  <= '0;
    end else begin
      valid_o <= v1;
      if (v1) begin
        ant0_o.re <= rnd(p0_re);
        ant0_o.im <= rnd(p0_im);
        ant1_o.re <= rnd(p1_re);
        ant1_o.im <= rnd(p1_im);
      end
    end
  end

endmodule
