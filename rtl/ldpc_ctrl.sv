// ldpc_ctrl: decode control with early termination and a pulse budget.
//
// A start pulse clears every state machine of the decoder for one clock
// (clear), then enables the input modulators (run). Decoding ends as soon as
// 'valid' reports a codeword that satisfies every check (success), or when the
// I&F input modulators have produced BUDGET pulses in total, i.e. an average
// of BUDGET / N per variable (failure). The result is held with 'done' until
// the next start. 'cycles' counts the clocks spent in RUN, 'pulses' the input
// pulses, both for statistics.
//
// Interface: start (pulse), valid (level), in_pulses (input pulses this clock);
// clear, run, done, success outputs; all registered.
module ldpc_ctrl #(
  parameter int PCNT_W = 11,          // width of in_pulses
  parameter int BUDGET = 32 * 1056,   // total input pulses before declaring failure
  parameter int CYC_W  = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              valid,
  input  logic [PCNT_W-1:0] in_pulses,
  output logic              clear,
  output logic              run,
  output logic              done,
  output logic              success,
  output logic [CYC_W-1:0]  cycles,
  output logic [31:0]       pulses
);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_RUN, S_DONE} state_t;
  state_t state;

  assign clear = state == S_CLEAR;
  assign run   = state == S_RUN;
  assign done  = state == S_DONE;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      success <= 1'b0;
      cycles  <= '0;
      pulses  <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) state <= S_CLEAR;
        S_CLEAR: begin
          state   <= S_RUN;
          success <= 1'b0;
          cycles  <= '0;
          pulses  <= '0;
        end
        S_RUN: begin
          cycles <= cycles + 1'b1;
          pulses <= pulses + 32'(in_pulses);
          if (valid) begin
            state   <= S_DONE;
            success <= 1'b1;
          end else if (pulses + 32'(in_pulses) >= 32'(BUDGET)) begin
            state   <= S_DONE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
