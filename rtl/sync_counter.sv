// sync_counter: block synchronisation counter of the transmitter.
//
// The blocks are kept in step by counting symbols between them. While run_i
// is high this counter releases exactly N symbols (issue_o high for N
// consecutive cycles, sof_o on the first), which is one OFDM symbol for the
// IFFT blocks, then holds the source (WAIT) until the IFFT reports the end of
// that OFDM symbol with frame_done_i, and starts the next one. The pipeline
// between source and IFFT therefore never holds more than one OFDM symbol
// and needs no back-pressure. Counting between blocks follows the design;
// the exact states and signals are this design's own.
//
// Timing: issue_o and sof_o are combinational from the registered state;
// frame_done_i moves WAIT to ISSUE for the next cycle. frames_o counts
// released OFDM symbols.
module sync_counter #(
  parameter int unsigned N = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run_i,
  input  logic        frame_done_i,
  output logic        issue_o,
  output logic        sof_o,
  output logic        waiting_o,
  output logic [15:0] frames_o
);

  localparam int unsigned CW = $clog2(N);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_t;

  state_t        state_q;
  logic [CW-1:0] cnt_q;

  assign issue_o   = (state_q == S_ISSUE);
  assign sof_o     = issue_o && (cnt_q == '0);
  assign waiting_o = (state_q == S_WAIT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      cnt_q    <= '0;
      frames_o <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (run_i) state_q <= S_ISSUE;
        S_ISSUE: begin
          cnt_q <= cnt_q + CW'(1);
          if (cnt_q == CW'(N - 1)) begin
            cnt_q    <= '0;
            frames_o <= frames_o + 16'd1;
            state_q  <= S_WAIT;
          end
        end
        S_WAIT: if (frame_done_i) state_q <= run_i ? S_ISSUE : S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
