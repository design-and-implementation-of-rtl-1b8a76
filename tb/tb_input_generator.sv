// tb_input_generator: checks the PRBS-15 bit-stream source against a
// bit-serial model of x^15 + x^14 + 1, with a random enable pattern. Checks
// that valid_o follows en_i by one cycle and that the stream does not
// advance while en_i is low.
module tb_input_generator;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       en = 1'b0;
  logic [5:0] bits;
  logic       valid;
  int         checks = 0, failures = 0;

  input_generator #(.BITS(6), .SEED(15'h7FFF)) dut (
    .clk(clk), .rst_n(rst_n), .en_i(en), .bits_o(bits), .valid_o(valid));

  always #5 clk = ~clk;

  logic [14:0] model = 15'h7FFF;
  logic [5:0]  exp_bits;
  logic        en_d;

  function automatic logic step(ref logic [14:0] s);
    logic fb;
    fb = s[14] ^ s[13];
    s  = {s[13:0], fb};
    return fb;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    en_d = 1'b0;
    for (int c = 0; c < 2000; c++) begin
      @(posedge clk);
      #1;
      // Compare what the previous enable produced.
      checks++;
      if (valid !== en_d) begin
        failures++;
        $display("FAIL cycle %0d: valid=%0b expected %0b", c, valid, en_d);
      end
      if (en_d) begin
        checks++;
        if (bits !== exp_bits) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: bits=%b expected %b", c, bits, exp_bits);
        end
      end
      en   = ($urandom_range(0, 3) != 0);
      en_d = en;
      if (en) for (int i = 0; i < 6; i++) exp_bits[i] = step(model);
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
