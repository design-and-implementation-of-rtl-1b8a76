// tb_lte_precoding_top: end-to-end test of the two-antenna precoding
// transmitter at its full size (512 subcarriers, no parameter overrides).
//
// Five OFDM symbols are produced, with PMI 00, 01, 10, 11 and 10. An
// independent model regenerates the PRBS-15 bit stream, maps it with the LTE
// 64-QAM formula, applies w = [1 1], [1 -1], [1 j], [1 -j] over sqrt(2) and
// takes the 512-point inverse DFT in real arithmetic; every output sample of
// both antennas must match within TOL LSB. pmi_i is scrambled in the middle
// of each OFDM symbol to show that the PMI is only taken at the symbol
// start. Timing checks: 1221 cycles from one OFDM symbol to the next, 708
// cycles from the release of its first source symbol to its first sample, 512
// back-to-back samples each. After the last symbol run_i is dropped and the
// transmitter must fall silent. Mechanisms counted (each must occur): every
// PMI value, a mid-symbol PMI change that is ignored, the counter waiting
// for the OFDM blocks, and the stop on run_i low.
module tb_lte_precoding_top;
  import lte_pkg::*;
  localparam int N       = 512;
  localparam int TOL     = 3;
  localparam int NFRAMES = 5;
  localparam int PERIOD  = 1221;
  localparam int LATENCY = 708;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        run = 1'b0;
  pmi_t        pmi = '0;
  logic        vout, last;
  cplx_t       a0, a1;
  pmi_t        pmi_used;
  logic [15:0] frames;
  int          checks = 0, failures = 0;

  lte_precoding_top dut (
    .clk(clk), .rst_n(rst_n), .run_i(run), .pmi_i(pmi), .out_valid_o(vout),
    .ant0_o(a0), .ant1_o(a1), .out_last_o(last), .pmi_used_o(pmi_used),
    .frames_o(frames));

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------------------------------------------------------- model
  real         cs [N], sn [N];
  logic [14:0] lfsr = 15'h7FFF;
  int          x0r [N], x0i [N], x1r [N], x1i [N];
  real         y0r [N], y0i [N], y1r [N], y1i [N];

  function automatic int qam_axis(input int s, input int m1, input int m0);
    real v;
    v = (1 - 2*s) * (4 - (1 - 2*m1) * (2 - (1 - 2*m0))) / $sqrt(42.0);
    return int'($floor(v * 4096.0 + 0.5));
  endfunction

  function automatic int rmul(input int a, input int c);
    return int'($floor(real'(a) * real'(c) / 4096.0 + 0.5));
  endfunction

  task automatic idft(input int xr [N], input int xi [N], output real yr [N], output real yi [N]);
    for (int n = 0; n < N; n++) begin
      real ar, ai;
      ar = 0.0; ai = 0.0;
      for (int k = 0; k < N; k++) begin
        int e;
        e = (k * n) % N;
        ar += real'(xr[k]) * cs[e] - real'(xi[k]) * sn[e];
        ai += real'(xr[k]) * sn[e] + real'(xi[k]) * cs[e];
      end
      yr[n] = ar / real'(N);
      yi[n] = ai / real'(N);
    end
  endtask

  task automatic model_frame(input int p);
    for (int k = 0; k < N; k++) begin
      int b [6];
      int sr, si, c;
      for (int i = 0; i < 6; i++) begin
        logic fb;
        fb   = lfsr[14] ^ lfsr[13];
        lfsr = {lfsr[13:0], fb};
        b[i] = int'(fb);
      end
      sr = qam_axis(b[0], b[2], b[4]);
      si = qam_axis(b[1], b[3], b[5]);
      c  = 2896;
      x0r[k] = rmul(sr, c);
      x0i[k] = rmul(si, c);
      unique case (p)
        0: begin x1r[k] = rmul(sr, c);  x1i[k] = rmul(si, c);  end
        1: begin x1r[k] = rmul(sr, -c); x1i[k] = rmul(si, -c); end
        2: begin x1r[k] = rmul(si, -c); x1i[k] = rmul(sr, c);  end
        default: begin x1r[k] = rmul(si, c); x1i[k] = rmul(sr, -c); end
      endcase
    end
    idft(x0r, x0i, y0r, y0i);
    idft(x1r, x1i, y1r, y1i);
  endtask

  function automatic int absdiff(input logic signed [15:0] got, input real want);
    int d;
    d = int'(got) - int'($floor(want + 0.5));
    return (d < 0) ? -d : d;
  endfunction

  // ------------------------------------------------------------ stimulus
  int frame_pmi [NFRAMES] = '{0, 1, 2, 3, 2};
  int pmi_hits [4] = '{0, 0, 0, 0};
  int scrambles = 0, wait_cycles = 0, stops = 0, maxerr = 0;
  int first_out [NFRAMES];

  always @(posedge clk) if (rst_n && dut.u_sync.waiting_o) wait_cycles++;

  // Cycle (same count as first_out) in which the first source symbol of the
  // latest OFDM symbol is released.
  int sof_cycle = 0;
  always @(posedge clk) if (rst_n && dut.u_sync.sof_o) sof_cycle <= cycle + 1;

  initial begin
    for (int e = 0; e < N; e++) begin
      cs[e] = $cos(2.0 * 3.14159265358979323846 * real'(e) / real'(N));
      sn[e] = $sin(2.0 * 3.14159265358979323846 * real'(e) / real'(N));
    end
    pmi = pmi_t'(frame_pmi[0]);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk) #1;
    run = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      model_frame(frame_pmi[f]);
      // Scramble pmi_i once the symbol has started; it must be ignored.
      repeat (20) @(posedge clk);
      #1;
      pmi = pmi_t'(frame_pmi[f] ^ 1);
      scrambles++;
      if (f == NFRAMES - 1) run = 1'b0;
      while (!vout) @(posedge clk) #1;
      first_out[f] = cycle;
      checks++;
      if (first_out[f] - sof_cycle != LATENCY) begin
        failures++;
        $display("FAIL latency %0d cycles, expected %0d", first_out[f] - sof_cycle, LATENCY);
      end
      checks++;
      if (int'(pmi_used) != frame_pmi[f]) begin
        failures++;
        $display("FAIL frame %0d built with PMI %0d", f, pmi_used);
      end else pmi_hits[frame_pmi[f]]++;
      if (f > 0) begin
        checks++;
        if (first_out[f] - first_out[f-1] != PERIOD) begin
          failures++;
          $display("FAIL OFDM symbol period %0d, expected %0d",
                   first_out[f] - first_out[f-1], PERIOD);
        end
      end
      for (int n = 0; n < N; n++) begin
        int d [4];
        checks++;
        if (!vout || last != (n == N - 1)) begin
          failures++;
          $display("FAIL frame %0d sample %0d: valid=%0b last=%0b", f, n, vout, last);
        end
        d[0] = absdiff(a0.re, y0r[n]);
        d[1] = absdiff(a0.im, y0i[n]);
        d[2] = absdiff(a1.re, y1r[n]);
        d[3] = absdiff(a1.im, y1i[n]);
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (d[i] > maxerr) maxerr = d[i];
          if (d[i] > TOL) begin
            failures++;
            if (failures < 10)
              $display("FAIL frame %0d sample %0d part %0d off by %0d", f, n, i, d[i]);
          end
        end
        // Next symbol's PMI goes on before this one ends.
        if (n == N - 1 && f + 1 < NFRAMES) pmi = pmi_t'(frame_pmi[f + 1]);
        @(posedge clk) #1;
      end
    end
    // run_i was dropped: no further output.
    repeat (3 * PERIOD) begin
      checks++;
      if (vout) begin failures++; $display("FAIL output after stop"); end
      @(posedge clk) #1;
    end
    checks++;
    if (int'(frames) != NFRAMES) begin failures++; $display("FAIL frames_o=%0d", frames); end
    else stops++;

    for (int p = 0; p < 4; p++) begin
      $display("PMI %0d used in %0d OFDM symbols", p, pmi_hits[p]);
      checks++;
      if (pmi_hits[p] == 0) begin failures++; $display("FAIL PMI %0d never exercised", p); end
    end
    $display("mid-symbol PMI changes ignored: %0d", scrambles);
    $display("cycles the counter waited for the OFDM blocks: %0d", wait_cycles);
    $display("stops on run low: %0d", stops);
    $display("max error %0d LSB", maxerr);
    checks += 3;
    if (scrambles == 0)   begin failures++; $display("FAIL no PMI change"); end
    if (wait_cycles == 0) begin failures++; $display("FAIL counter never waited"); end
    if (stops == 0)       begin failures++; $display("FAIL never stopped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
