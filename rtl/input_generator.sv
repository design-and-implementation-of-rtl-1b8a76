// input_generator: test bit-stream source for the transmitter.
//
// The transmitter takes its data from a generated bit stream. This source is
// a PRBS-15 linear feedback shift register (polynomial x^15 + x^14 + 1, the
// choice of sequence is this design's own). Each cycle with en_i high it
// advances BITS steps and presents those BITS new stream bits on bits_o,
// bits_o[0] being the earliest bit of the stream. With BITS = 6 one 64-QAM
// symbol's worth of bits is delivered per cycle.
//
// Timing: bits_o and valid_o are registered; they appear one cycle after the
// en_i that requested them. valid_o is low in cycles that did not follow an
// enable. Reset (synchronous, active low) loads SEED.
module input_generator #(
  parameter int unsigned BITS = 6,
  parameter logic [14:0] SEED = 15'h7FFF
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en_i,
  output logic [BITS-1:0] bits_o,
  output logic            valid_o
);

  logic [14:0]     state_q;
  logic [14:0]     state_n;
  logic [BITS-1:0] bits_n;

  // Run the register BITS steps; each step's feedback bit is the next bit.
  always_comb begin
    logic fb;
    state_n = state_q;
    bits_n  = '0;
    for (int i = 0; i < int'(BITS); i++) begin
      fb        = state_n[14] ^ state_n[13];
      state_n   = {state_n[13:0], fb};
      bits_n[i] = fb;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= SEED;
      bits_o  <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= en_i;
      if (en_i) begin
        state_q <= state_n;
        bits_o  <= bits_n;
      end
    end
  end

endmodule
