// tb_ifft512_r8: runs four OFDM symbols through the 512-point IFFT and
// compares every output sample with x[n] = (1/512) sum_k X[k] e^{+j2pi kn/512}
// computed in real arithmetic. Frames: random values in the precoder's
// output range, a single subcarrier, all subcarriers equal (largest possible
// peak), and random values offered with gaps on in_valid. The fixed-point
// result may differ from the real one by at most TOL LSB per component.
// Also checks the timing: 192 butterfly cycles, first output 193 cycles
// after the last input, 512 back-to-back outputs, out_last on the last one,
// and in_ready only in the load phase.
module tb_ifft512_r8;
  localparam int N   = 512;
  localparam int TOL = 3;
  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               vin = 1'b0;
  logic signed [15:0] in_re = '0, in_im = '0;
  logic               rdy, vout, last;
  logic signed [15:0] out_re, out_im;
  int                 checks = 0, failures = 0;

  ifft512_r8 #(.STAGES(3), .W(16)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid_i(vin), .in_re_i(in_re), .in_im_i(in_im),
    .in_ready_o(rdy), .out_valid_o(vout), .out_re_o(out_re), .out_im_o(out_im),
    .out_last_o(last));

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  real cs [N], sn [N];
  int  xr [N], xi [N];
  real er [N], ei [N];
  int  maxerr = 0;

  task automatic reference();
    for (int n = 0; n < N; n++) begin
      real ar, ai;
      ar = 0.0; ai = 0.0;
      for (int k = 0; k < N; k++) begin
        int e;
        e = (k * n) % N;
        ar += real'(xr[k]) * cs[e] - real'(xi[k]) * sn[e];
        ai += real'(xr[k]) * sn[e] + real'(xi[k]) * cs[e];
      end
      er[n] = ar / real'(N);
      ei[n] = ai / real'(N);
    end
  endtask

  task automatic run_frame(input int kind);
    int last_in, first_out, nout;
    for (int k = 0; k < N; k++) begin
      unique case (kind)
        1: begin xr[k] = (k == 37) ? 3000 : 0; xi[k] = (k == 37) ? -1200 : 0; end
        2: begin xr[k] = 3128; xi[k] = 3128; end
        default: begin
          xr[k] = $signed($urandom_range(0, 6256)) - 3128;
          xi[k] = $signed($urandom_range(0, 6256)) - 3128;
        end
      endcase
    end
    reference();
    // Load.
    for (int k = 0; k < N; k++) begin
      if (kind == 3) while ($urandom_range(0, 2) == 0) @(posedge clk) #1;
      checks++;
      if (!rdy) begin failures++; $display("FAIL not ready at k=%0d", k); end
      vin = 1'b1; in_re = 16'(xr[k]); in_im = 16'(xi[k]);
      @(posedge clk) #1;
      vin = 1'b0;
    end
    last_in = cycle;
    // Compute: no output, not ready.
    while (!vout) begin
      if (rdy) begin failures++; $display("FAIL ready during compute"); end
      @(posedge clk) #1;
    end
    first_out = cycle;
    checks++;
    if (first_out - last_in != 193) begin
      failures++;
      $display("FAIL latency %0d cycles, expected 193", first_out - last_in);
    end
    nout = 0;
    while (vout) begin
      int dr, di;
      dr = int'(out_re) - int'($floor(er[nout] + 0.5));
      di = int'(out_im) - int'($floor(ei[nout] + 0.5));
      if (dr < 0) dr = -dr;
      if (di < 0) di = -di;
      if (dr > maxerr) maxerr = dr;
      if (di > maxerr) maxerr = di;
      checks++;
      if (dr > TOL || di > TOL) begin
        failures++;
        if (failures < 10)
          $display("FAIL frame %0d n=%0d got (%0d,%0d) expected (%f,%f)",
                   kind, nout, out_re, out_im, er[nout], ei[nout]);
      end
      checks++;
      if (last != (nout == N - 1)) begin failures++; $display("FAIL out_last at n=%0d", nout); end
      nout++;
      @(posedge clk) #1;
    end
    checks++;
    if (nout != N) begin failures++; $display("FAIL %0d outputs", nout); end
    checks++;
    if (!rdy) begin failures++; $display("FAIL not ready after output"); end
  endtask

  initial begin
    for (int e = 0; e < N; e++) begin
      cs[e] = $cos(2.0 * 3.14159265358979323846 * real'(e) / real'(N));
      sn[e] = $sin(2.0 * 3.14159265358979323846 * real'(e) / real'(N));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk) #1;
    for (int f = 0; f < 4; f++) run_frame(f);
    $display("max error %0d LSB", maxerr);
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
