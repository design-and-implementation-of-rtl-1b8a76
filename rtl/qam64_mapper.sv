// qam64_mapper: 64-QAM constellation mapper.
//
// Maps a group of six bits b0..b5 (bits_i[0] = b0) to one complex symbol with
// the Gray mapping of the LTE 64-QAM table:
//   I = (1-2b0)*(4 - (1-2b2)*(2 - (1-2b4))) / sqrt(42)
//   Q = (1-2b1)*(4 - (1-2b3)*(2 - (1-2b5))) / sqrt(42)
// so each component takes one of the levels +-1,+-3,+-5,+-7 over sqrt(42),
// output as 16-bit Q3.12 numbers. The mapper, its 64 points and its 16-bit
// output follow the design; the LTE bit-to-point table and the Q3.12 scaling
// are this design's reading of "64-QAM" and of the 16-bit word format.
//
// Timing: one symbol per cycle, registered output one cycle after valid_i.
module qam64_mapper
  import lte_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid_i,
  input  logic [5:0] bits_i,
  output cplx_t      sym_o,
  output logic       valid_o
);

  // One axis: sign bit s, then two bits selecting the magnitude:
  // for (m1,m0) = 00,01,10,11 is 3,1,5,7.
  function automatic logic signed [DW-1:0] level(input logic s, input logic m1,
                                                 input logic m0);
    logic signed [DW-1:0] mag;
    unique case ({m1, m0})
      2'b00:   mag = QAM_L3;
      2'b01:   mag = QAM_L1;
      2'b10:   mag = QAM_L5;
      default: mag = QAM_L7;
    endcase
    return s ? -mag : mag;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sym_o   <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        sym_o.re <= level(bits_i[0], bits_i[2], bits_i[4]);
        sym_o.im <= level(bits_i[1], bits_i[3], bits_i[5]);
      end
    end
  end

endmodule
