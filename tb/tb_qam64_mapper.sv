// tb_qam64_mapper: drives all 64 bit patterns through the 64-QAM mapper and
// compares each output with the LTE 64-QAM formula evaluated in real numbers
// (levels +-1..+-7 over sqrt(42), Q3.12, rounded). Also checks the one-cycle
// latency, that the 64 points are distinct and that the average symbol
// energy is 1.
module tb_qam64_mapper;
  import lte_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       vin = 1'b0;
  logic [5:0] bits = '0;
  cplx_t      sym;
  logic       vout;
  int         checks = 0, failures = 0;

  qam64_mapper dut (.clk(clk), .rst_n(rst_n), .valid_i(vin), .bits_i(bits),
                    .sym_o(sym), .valid_o(vout));

  always #5 clk = ~clk;

  function automatic int axis(input int s, input int m1, input int m0);
    real v;
    v = (1 - 2*s) * (4 - (1 - 2*m1) * (2 - (1 - 2*m0))) / $sqrt(42.0);
    return int'($floor(v * 4096.0 + 0.5));
  endfunction

  int  ei, eq;
  real energy = 0.0;
  logic [31:0] seen [64];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < 64; b++) begin
      vin  <= 1'b1;
      bits <= 6'(b);
      @(posedge clk);
      vin  <= 1'b0;
      #1;
      ei = axis(b & 1, (b >> 2) & 1, (b >> 4) & 1);
      eq = axis((b >> 1) & 1, (b >> 3) & 1, (b >> 5) & 1);
      checks++;
      if (!vout || int'(sym.re) != ei || int'(sym.im) != eq) begin
        failures++;
        $display("FAIL bits=%b got (%0d,%0d) v=%0b expected (%0d,%0d)",
                 6'(b), sym.re, sym.im, vout, ei, eq);
      end
      seen[b] = sym;
      energy += (real'(sym.re) ** 2 + real'(sym.im) ** 2) / (4096.0 * 4096.0);
      @(posedge clk);
      #1;
      checks++;
      if (vout) begin failures++; $display("FAIL valid held high"); end
    end
    for (int a = 0; a < 64; a++)
      for (int b = a + 1; b < 64; b++) begin
        checks++;
        if (seen[a] == seen[b]) begin failures++; $display("FAIL points %0d and %0d equal", a, b); end
      end
    energy = energy / 64.0;
    checks++;
    if (energy < 0.999 || energy > 1.001) begin failures++; $display("FAIL energy %f", energy); end
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
