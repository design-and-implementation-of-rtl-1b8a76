// dft8_inv: scaled 8-point inverse DFT, the radix-8 butterfly of the IFFT.
//
// Computes y[p] = (1/8) * sum_m x[m] * exp(+j*2*pi*m*p/8) for p = 0..7.
// The 8-point transform is split radix-2 style: two 4-point transforms of the
// even and odd inputs (whose twiddles are only +-1 and +-j), then the odd
// results are turned by 1, (1+j)/sqrt(2), j and (-1+j)/sqrt(2) and combined.
// The only true multiplications are by 1/sqrt(2) (11585 in Q1.14). Sums are
// carried with four guard bits; the result is divided by 8 with round to
// nearest and saturated to W bits, so the magnitude of the output never
// exceeds that of the largest input.
//
// Timing: purely combinational.
module dft8_inv #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] x_re_i [8],
  input  logic signed [W-1:0] x_im_i [8],
  output logic signed [W-1:0] y_re_o [8],
  output logic signed [W-1:0] y_im_o [8]
);

  localparam int unsigned EW = W + 4;   // guard bits for the growth of 8x
  localparam int unsigned MW = EW + 16; // product width for the 1/sqrt(2) step
  localparam logic signed [MW-1:0] RSQ2 = MW'(11585);   // 1/sqrt(2), Q1.14

  typedef logic signed [EW-1:0] ew_t;

  // Multiply by 1/sqrt(2) with round to nearest.
  function automatic ew_t mul_rsq2(input ew_t v);
    logic signed [MW-1:0] p;
    p = (MW'(v) * RSQ2 + (MW'(1) <<< 13)) >>> 14;
    return p[EW-1:0];
  endfunction

  // Divide by 8 with round to nearest, then saturate to W bits.
  function automatic logic signed [W-1:0] scale8(input ew_t v);
    ew_t t;
    t = (v + EW'(4)) >>> 3;
    if (t > ew_t'((1 <<< (W - 1)) - 1))  return {1'b0, {(W-1){1'b1}}};
    else if (t < -ew_t'(1 <<< (W - 1)))  return {1'b1, {(W-1){1'b0}}};
    else                                 return t[W-1:0];
  endfunction

  always_comb begin
    ew_t er [4], ei [4], or_ [4], oi [4];  // 4-point results of even/odd halves
    ew_t tr [4], ti [4];                   // odd results after their twiddles
    ew_t t0r, t0i, t1r, t1i, t2r, t2i, t3r, t3i;

    // 4-point inverse DFT of the even inputs x0,x2,x4,x6.
    t0r = ew_t'(x_re_i[0]) + ew_t'(x_re_i[4]);  t0i = ew_t'(x_im_i[0]) + ew_t'(x_im_i[4]);
    t1r = ew_t'(x_re_i[0]) - ew_t'(x_re_i[4]);  t1i = ew_t'(x_im_i[0]) - ew_t'(x_im_i[4]);
    t2r = ew_t'(x_re_i[2]) + ew_t'(x_re_i[6]);  t2i = ew_t'(x_im_i[2]) + ew_t'(x_im_i[6]);
    t3r = ew_t'(x_re_i[2]) - ew_t'(x_re_i[6]);  t3i = ew_t'(x_im_i[2]) - ew_t'(x_im_i[6]);
    er[0] = t0r + t2r;  ei[0] = t0i + t2i;
    er[2] = t0r - t2r;  ei[2] = t0i - t2i;
    er[1] = t1r - t3i;  ei[1] = t1i + t3r;   // t1 + j*t3
    er[3] = t1r + t3i;  ei[3] = t1i - t3r;   // t1 - j*t3

    // 4-point inverse DFT of the odd inputs x1,x3,x5,x7.
    t0r = ew_t'(x_re_i[1]) + ew_t'(x_re_i[5]);  t0i = ew_t'(x_im_i[1]) + ew_t'(x_im_i[5]);
    t1r = ew_t'(x_re_i[1]) - ew_t'(x_re_i[5]);  t1i = ew_t'(x_im_i[1]) - ew_t'(x_im_i[5]);
    t2r = ew_t'(x_re_i[3]) + ew_t'(x_re_i[7]);  t2i = ew_t'(x_im_i[3]) + ew_t'(x_im_i[7]);
    t3r = ew_t'(x_re_i[3]) - ew_t'(x_re_i[7]);  t3i = ew_t'(x_im_i[3]) - ew_t'(x_im_i[7]);
    or_[0] = t0r + t2r;  oi[0] = t0i + t2i;
    or_[2] = t0r - t2r;  oi[2] = t0i - t2i;
    or_[1] = t1r - t3i;  oi[1] = t1i + t3r;
    or_[3] = t1r + t3i;  oi[3] = t1i - t3r;

    // Twiddles exp(+j*pi*p/4) on the odd half.
    tr[0] = or_[0];                         ti[0] = oi[0];
    tr[1] = mul_rsq2(or_[1] - oi[1]);       ti[1] = mul_rsq2(or_[1] + oi[1]);
    tr[2] = -oi[2];                         ti[2] = or_[2];
    tr[3] = mul_rsq2(-or_[3] - oi[3]);      ti[3] = mul_rsq2(or_[3] - oi[3]);

    for (int p = 0; p < 4; p++) begin
      y_re_o[p]     = scale8(er[p] + tr[p]);
      y_im_o[p]     = scale8(ei[p] + ti[p]);
      y_re_o[p + 4] = scale8(er[p] - tr[p]);
      y_im_o[p + 4] = scale8(ei[p] - ti[p]);
    end
  end

endmodule
