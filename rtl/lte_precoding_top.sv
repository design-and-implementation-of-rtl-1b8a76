// lte_precoding_top: LTE downlink closed-loop rank-1 precoding transmitter
// for two antennas (transmission mode 6), from bit stream to OFDM samples.
//
// Chain: input_generator (PRBS bit stream, 6 bits per symbol) ->
// qam64_mapper (64-QAM, Q3.12) -> precoder (weights [1 w2]/sqrt(2) chosen by
// the 2-bit precoder matrix estimation pmi_i) -> one ifft512_r8 per antenna
// (512-subcarrier OFDM). sync_counter releases 512 symbols per OFDM symbol
// and waits until the IFFTs have delivered it before releasing the next.
// pmi_i is captured at the first symbol of each OFDM symbol, so the
// precoder never changes inside an OFDM symbol. The chain of blocks follows
// the design; the capture of pmi_i per OFDM symbol, the handshakes and the
// fixed-point formats are this design's own.
//
// Timing: with run_i held high an OFDM symbol (512 samples on each antenna)
// is delivered every 512 + 3 + 192 + 512 + 2 = 1221 cycles; the first sample
// of a symbol leaves 3 + 512 + 192 + 1 = 708 cycles after its first source
// symbol is released. Both antennas' outputs are aligned sample by sample.
module lte_precoding_top
  import lte_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run_i,         // keep producing OFDM symbols
  input  pmi_t        pmi_i,         // precoder matrix estimation
  output logic        out_valid_o,   // one time sample on each antenna
  output cplx_t       ant0_o,
  output cplx_t       ant1_o,
  output logic        out_last_o,    // last sample of an OFDM symbol
  output pmi_t        pmi_used_o,    // PMI of the OFDM symbol being built
  output logic [15:0] frames_o       // OFDM symbols released so far
);

  logic       issue, sof, waiting, frame_done;
  logic [5:0] bits;
  logic       bits_valid;
  cplx_t      sym;
  logic       sym_valid;
  cplx_t      pre0, pre1;
  logic       pre_valid;
  pmi_t       pmi_q;
  logic       rdy0, rdy1;
  logic       v1, last1;

  always_ff @(posedge clk) begin
    if (!rst_n)   pmi_q <= '0;
    else if (sof) pmi_q <= pmi_i;
  end
  assign pmi_used_o = pmi_q;

  sync_counter #(.N(NFFT)) u_sync (
    .clk          (clk),
    .rst_n        (rst_n),
    .run_i        (run_i),
    .frame_done_i (frame_done),
    .issue_o      (issue),
    .sof_o        (sof),
    .waiting_o    (waiting),
    .frames_o     (frames_o)
  );

  input_generator #(.BITS(6)) u_gen (
    .clk     (clk),
    .rst_n   (rst_n),
    .en_i    (issue),
    .bits_o  (bits),
    .valid_o (bits_valid)
  );

  qam64_mapper u_map (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (bits_valid),
    .bits_i  (bits),
    .sym_o   (sym),
    .valid_o (sym_valid)
  );

  precoder u_pre (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (sym_valid),
    .sym_i   (sym),
    .pmi_i   (pmi_q),
    .ant0_o  (pre0),
    .ant1_o  (pre1),
    .valid_o (pre_valid)
  );

  ifft512_r8 #(.STAGES(3), .W(DW)) u_ofdm0 (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid_i  (pre_valid),
    .in_re_i     (pre0.re),
    .in_im_i     (pre0.im),
    .in_ready_o  (rdy0),
    .out_valid_o (out_valid_o),
    .out_re_o    (ant0_o.re),
    .out_im_o    (ant0_o.im),
    .out_last_o  (out_last_o)
  );

  ifft512_r8 #(.STAGES(3), .W(DW)) u_ofdm1 (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid_i  (pre_valid),
    .in_re_i     (pre1.re),
    .in_im_i     (pre1.im),
    .in_ready_o  (rdy1),
    .out_valid_o (v1),
    .out_re_o    (ant1_o.re),
    .out_im_o    (ant1_o.im),
    .out_last_o  (last1)
  );

  assign frame_done = out_last_o;

  // The two OFDM blocks run in lock step; the counter only releases symbols
  // into blocks that are loading.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (v1 == out_valid_o) && (last1 == out_last_o) &&
                               (rdy0 == rdy1))
    else $error("lte_precoding_top: OFDM blocks out of step");
  a_issue_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                  issue |-> rdy0)
    else $error("lte_precoding_top: symbol released while OFDM block busy");
  a_no_issue_wait: assert property (@(posedge clk) disable iff (!rst_n)
                                    waiting |-> !issue);

endmodule
