// tb_precoder: drives random Q3.12 symbols (every 64-QAM point and random
// values of the same range) with random PMIs through the precoder, one per
// cycle with random gaps, and compares both antenna outputs with
// round(w * s) computed in real numbers, w = [1 1], [1 -1], [1 j], [1 -j]
// over sqrt(2) quantised to 2896/4096. Checks the two-cycle latency and
// that every PMI was exercised. Finally checks that for every PMI the
// 64 antenna-1 symbols are the same 64 points as the antenna-0 symbols.
module tb_precoder;
  import lte_pkg::*;
  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  vin = 1'b0;
  cplx_t sym = '0;
  pmi_t  pmi = '0;
  cplx_t a0, a1;
  logic  vout;
  int    checks = 0, failures = 0;
  int    pmi_seen [4] = '{0, 0, 0, 0};

  precoder dut (.clk(clk), .rst_n(rst_n), .valid_i(vin), .sym_i(sym), .pmi_i(pmi),
                .ant0_o(a0), .ant1_o(a1), .valid_o(vout));

  always #5 clk = ~clk;

  typedef struct { int r0, i0, r1, i1; } exp_t;
  exp_t q[$];
  logic vhist [3] = '{0, 0, 0};

  function automatic int rmul(input int a, input int c);
    return int'($floor(real'(a) * real'(c) / 4096.0 + 0.5));
  endfunction

  function automatic exp_t model(input cplx_t s, input pmi_t p);
    exp_t e;
    int c;
    c = 2896;
    e.r0 = rmul(int'(s.re), c);
    e.i0 = rmul(int'(s.im), c);
    unique case (p)
      2'd0: begin e.r1 = rmul(int'(s.re), c);  e.i1 = rmul(int'(s.im), c);  end
      2'd1: begin e.r1 = rmul(int'(s.re), -c); e.i1 = rmul(int'(s.im), -c); end
      2'd2: begin e.r1 = rmul(int'(s.im), -c); e.i1 = rmul(int'(s.re), c);  end
      default: begin e.r1 = rmul(int'(s.im), c); e.i1 = rmul(int'(s.re), -c); end
    endcase
    return e;
  endfunction

  int lv [8] = '{-4424, -3160, -1896, -632, 632, 1896, 3160, 4424};

  initial begin
    exp_t e;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(posedge clk);
      #1;
      // Latency: valid_o follows valid_i two cycles later.
      checks++;
      if (vout !== vhist[1]) begin failures++; $display("FAIL latency at cycle %0d", c); end
      if (vout) begin
        e = q.pop_front();
        checks++;
        if (int'(a0.re) != e.r0 || int'(a0.im) != e.i0 ||
            int'(a1.re) != e.r1 || int'(a1.im) != e.i1) begin
          failures++;
          if (failures < 10)
            $display("FAIL got (%0d,%0d)(%0d,%0d) expected (%0d,%0d)(%0d,%0d)",
                     a0.re, a0.im, a1.re, a1.im, e.r0, e.i0, e.r1, e.i1);
        end
      end
      vhist[1] = vhist[0];
      vin = ($urandom_range(0, 4) != 0);
      if (c < 1500) begin
        sym.re = 16'(lv[$urandom_range(0, 7)]);
        sym.im = 16'(lv[$urandom_range(0, 7)]);
      end else begin
        sym.re = 16'($signed($urandom_range(0, 8848)) - 4424);
        sym.im = 16'($signed($urandom_range(0, 8848)) - 4424);
      end
      pmi = pmi_t'($urandom_range(0, 3));
      vhist[0] = vin;
      if (vin) begin
        q.push_back(model(sym, pmi));
        pmi_seen[pmi]++;
      end
    end
    // Every PMI maps the 64 constellation points onto the same 64 antenna
    // symbols: the weights +-1, +-j only rotate the square 64-QAM grid onto
    // itself, so antenna 1 carries the same alphabet as antenna 0.
    vin = 1'b0;
    repeat (4) @(posedge clk);
    for (int p = 0; p < 4; p++) begin
      cplx_t a0set [64], a1set [64];
      for (int i = 0; i < 64; i++) begin
        @(posedge clk) #1;
        vin = 1'b1; pmi = pmi_t'(p);
        sym.re = 16'(lv[i % 8]);
        sym.im = 16'(lv[i / 8]);
        @(posedge clk) #1;
        vin = 1'b0;
        @(posedge clk) #1;
        a0set[i] = a0;
        a1set[i] = a1;
      end
      for (int i = 0; i < 64; i++) begin
        int found, dup;
        found = 0; dup = 0;
        for (int j = 0; j < 64; j++) begin
          if (a1set[i] == a0set[j]) found++;
          if (j != i && a1set[i] == a1set[j]) dup++;
        end
        checks++;
        if (found != 1 || dup != 0) begin
          failures++;
          $display("FAIL pmi %0d point %0d: antenna-1 symbol not in the antenna-0 alphabet", p, i);
        end
      end
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (pmi_seen[p] == 0) begin failures++; $display("FAIL pmi %0d never used", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
