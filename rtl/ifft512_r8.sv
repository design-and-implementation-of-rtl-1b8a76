// ifft512_r8: OFDM modulator block, a 512-point radix-8 Cooley-Tukey IFFT.
//
// One instance per transmit antenna turns 512 precoded subcarrier values
// X[k] into 512 time samples
//   x[n] = (1/512) * sum_k X[k] * exp(+j*2*pi*k*n/512).
// The transform is memory based and decimation in frequency: the 512 values
// sit in a working memory and three radix-8 passes (spans 64, 8, 1) run over
// it in place. Each cycle one radix-8 butterfly reads eight words, computes
// their scaled 8-point inverse DFT (dft8_inv), multiplies output p by the
// twiddle exp(+j*2*pi*p*k*8^s/512) (k: position of the butterfly within its
// group, s: pass number) and writes the eight results back to the same
// addresses. After the last pass the samples are in base-8 digit-reversed
// order, so they are read out at digit-reversed addresses to come out in
// natural time order. Each pass divides by 8, which gives the 1/512 and keeps
// the magnitude from growing; inputs must have magnitude below 2^15.
// The 512-point size and the radix-8 Cooley-Tukey algorithm follow the
// design; the memory-based architecture, one butterfly per cycle, scaling
// and the Q1.14 twiddles (computed at elaboration from cos/sin) are this
// design's own.
//
// Interface and timing (N = 8^STAGES):
//   LOAD    in_ready_o high; each cycle with in_valid_i takes X[k], k = 0..N-1
//   COMPUTE STAGES*N/8 cycles (192 for N = 512)
//   OUTPUT  out_valid_o high for N consecutive cycles, x[0] first, out_last_o
//           on x[N-1]; no back-pressure
// then LOAD again. With input arriving without gaps the block is back in LOAD
// N + STAGES*N/8 + N cycles (1216 for N = 512) after its first input; the
// first output appears STAGES*N/8 + 1 cycles (193) after the last input.
module ifft512_r8 #(
  parameter int unsigned STAGES = 3,    // N = 8^STAGES = 512
  parameter int unsigned W      = 16    // sample width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid_i,
  input  logic signed [W-1:0] in_re_i,
  input  logic signed [W-1:0] in_im_i,
  output logic                in_ready_o,
  output logic                out_valid_o,
  output logic signed [W-1:0] out_re_o,
  output logic signed [W-1:0] out_im_o,
  output logic                out_last_o
);

  localparam int unsigned AW = 3 * STAGES;
  localparam int unsigned N  = 1 << AW;
  localparam int unsigned NB = N / 8;            // butterflies per pass
  localparam int unsigned BW = AW - 3;           // butterfly counter width
  localparam int unsigned SW = (STAGES > 1) ? $clog2(STAGES) : 1;
  localparam int unsigned TW = 16;               // twiddle width, Q1.14
  localparam int unsigned PW = W + TW + 2;
  localparam real         PI = 3.14159265358979323846;

  typedef enum logic [1:0] {S_LOAD, S_COMPUTE, S_OUTPUT} state_t;

  // ---------------------------------------------------------------- twiddles
  // tw[e] = exp(+j*2*pi*e/N) in Q1.14, rounded to nearest.
  logic signed [TW-1:0] tw_re [N];
  logic signed [TW-1:0] tw_im [N];

  for (genvar e = 0; e < int'(N); e++) begin : g_tw
    localparam real ANG = 2.0 * PI * real'(e) / real'(N);
    localparam int  CR  = int'($floor(16384.0 * $cos(ANG) + 0.5));
    localparam int  CI  = int'($floor(16384.0 * $sin(ANG) + 0.5));
    assign tw_re[e] = TW'(CR);
    assign tw_im[e] = TW'(CI);
  end

  // ------------------------------------------------------------------- state
  state_t               state_q;
  logic [AW-1:0]        cnt_q;      // load/output sample counter
  logic [BW-1:0]        bfly_q;     // butterfly within the pass
  logic [SW-1:0]        stage_q;    // pass number

  logic signed [W-1:0]  mem_re [N];
  logic signed [W-1:0]  mem_im [N];

  // ------------------------------------------------------------ butterfly
  logic [AW-1:0]        addr [8];
  logic [AW-1:0]        texp [8];
  logic signed [W-1:0]  bx_re [8], bx_im [8];
  logic signed [W-1:0]  by_re [8], by_im [8];
  logic signed [W-1:0]  bz_re [8], bz_im [8];

  // Addresses of butterfly b in pass s: span = 8^(STAGES-1-s),
  // base = group*8*span + k, address m = base + m*span; twiddle exponent of
  // output p = p*k*8^s mod N.
  always_comb begin
    int unsigned lspan;
    logic [AW-1:0] k, base, g;
    lspan = 3 * (STAGES - 1 - int'(stage_q));
    k     = AW'(bfly_q) & ((AW'(1) << lspan) - AW'(1));
    g     = AW'(bfly_q) >> lspan;
    base  = (g << (lspan + 3)) | k;
    for (int m = 0; m < 8; m++) begin
      addr[m] = base | (AW'(m) << lspan);
      texp[m] = AW'((AW'(m) * k) << (3 * int'(stage_q)));
      bx_re[m] = mem_re[addr[m]];
      bx_im[m] = mem_im[addr[m]];
    end
  end

  dft8_inv #(.W(W)) u_dft8 (
    .x_re_i (bx_re),
    .x_im_i (bx_im),
    .y_re_o (by_re),
    .y_im_o (by_im)
  );

  function automatic logic signed [W-1:0] sat_rnd(input logic signed [PW-1:0] p);
    logic signed [PW-1:0] t;
    t = (p + (PW'(1) <<< (TW - 3))) >>> (TW - 2);
    if (t > PW'((1 <<< (W - 1)) - 1))  return {1'b0, {(W-1){1'b1}}};
    else if (t < -PW'(1 <<< (W - 1)))  return {1'b1, {(W-1){1'b0}}};
    else                               return t[W-1:0];
  endfunction

  // Twiddle multiplication of the butterfly outputs.
  always_comb begin
    for (int p = 0; p < 8; p++) begin
      bz_re[p] = sat_rnd(PW'(by_re[p]) * PW'(tw_re[texp[p]]) -
                         PW'(by_im[p]) * PW'(tw_im[texp[p]]));
      bz_im[p] = sat_rnd(PW'(by_re[p]) * PW'(tw_im[texp[p]]) +
                         PW'(by_im[p]) * PW'(tw_re[texp[p]]));
    end
  end

  // Base-8 digit reversal of the read-out address.
  function automatic logic [AW-1:0] digit_rev(input logic [AW-1:0] a);
    logic [AW-1:0] r;
    for (int d = 0; d < int'(STAGES); d++)
      r[3*d +: 3] = a[3*(STAGES-1-d) +: 3];
    return r;
  endfunction

  logic last_bfly, last_stage;
  assign last_bfly  = (bfly_q == BW'(NB - 1));
  assign last_stage = (stage_q == SW'(STAGES - 1));
  assign in_ready_o = (state_q == S_LOAD);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q     <= S_LOAD;
      cnt_q       <= '0;
      bfly_q      <= '0;
      stage_q     <= '0;
      out_valid_o <= 1'b0;
      out_last_o  <= 1'b0;
      out_re_o    <= '0;
      out_im_o    <= '0;
    end else begin
      out_valid_o <= 1'b0;
      out_last_o  <= 1'b0;
      unique case (state_q)
        S_LOAD: if (in_valid_i) begin
          mem_re[cnt_q] <= in_re_i;
          mem_im[cnt_q] <= in_im_i;
          cnt_q         <= cnt_q + AW'(1);
          if (cnt_q == AW'(N - 1)) state_q <= S_COMPUTE;
        end
        S_COMPUTE: begin
          for (int m = 0; m < 8; m++) begin
            mem_re[addr[m]] <= bz_re[m];
            mem_im[addr[m]] <= bz_im[m];
          end
          bfly_q <= bfly_q + BW'(1);
          if (last_bfly) begin
            stage_q <= stage_q + SW'(1);
            if (last_stage) begin
              stage_q <= '0;
              state_q <= S_OUTPUT;
            end
          end
        end
        S_OUTPUT: begin
          out_valid_o <= 1'b1;
          out_re_o    <= mem_re[digit_rev(cnt_q)];
          out_im_o    <= mem_im[digit_rev(cnt_q)];
          out_last_o  <= (cnt_q == AW'(N - 1));
          cnt_q       <= cnt_q + AW'(1);
          if (cnt_q == AW'(N - 1)) state_q <= S_LOAD;
        end
        default: state_q <= S_LOAD;
      endcase
    end
  end

  // Input may only be offered while the block is loading.
  a_in_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                    in_valid_i |-> in_ready_o)
    else $error("ifft512_r8: input offered outside LOAD");

endmodule
